// tb_lasio_switch_control - timing and decisions of the central arbiter.
//
// Three arbiters run side by side at router address (1,1,1): the basic unit,
// one with two extra #PSS states and one with two extra #PFS states.
// Checked: the grant arrives in the 5th cycle a request is present (7th with
// +2 #PSS states); the connection table gets the XYZ output port; a request
// for a busy output is retried every 3 cycles (5 with +2 #PSS states) and
// granted after the holder's eop; two simultaneous requests are served in
// round-robin order, the second grant 5 cycles after the first (7 with +2
// #PFS states); a Local delivery and a Top delivery are connected.
module tb_lasio_switch_control;
  import lasio_pkg::*;

  logic              clk = 0, rst_n = 0;
  addr_t             here;
  logic [NPORTS-1:0] req, eop;
  addr_t             req_dst [NPORTS];
  int checks = 0, failures = 0;

  logic [NPORTS-1:0] grant   [3];
  logic [NPORTS-1:0] out_busy[3];
  logic [NPORTS-1:0] in_conn [3];
  logic [PORT_W-1:0] out_src [3][NPORTS];
  logic [PORT_W-1:0] in_dst  [3][NPORTS];

  lasio_switch_control #(.PSS_EXTRA(0), .PFS_EXTRA(0)) u_base (
    .clk, .rst_n, .here, .req, .req_dst, .eop, .grant(grant[0]),
    .out_busy(out_busy[0]), .out_src(out_src[0]), .in_conn(in_conn[0]), .in_dst(in_dst[0]));
  lasio_switch_control #(.PSS_EXTRA(2), .PFS_EXTRA(0)) u_pss (
    .clk, .rst_n, .here, .req, .req_dst, .eop, .grant(grant[1]),
    .out_busy(out_busy[1]), .out_src(out_src[1]), .in_conn(in_conn[1]), .in_dst(in_dst[1]));
  lasio_switch_control #(.PSS_EXTRA(0), .PFS_EXTRA(2)) u_pfs (
    .clk, .rst_n, .here, .req, .req_dst, .eop, .grant(grant[2]),
    .out_busy(out_busy[2]), .out_src(out_src[2]), .in_conn(in_conn[2]), .in_dst(in_dst[2]));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Cycle counter and, per arbiter and port, the cycle of the last grant.
  int cyc = 0;
  int grant_cyc [3][NPORTS];
  int retries   [3];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int a = 0; a < 3; a++)
      for (int p = 0; p < NPORTS; p++)
        if (grant[a][p]) grant_cyc[a][p] <= cyc;
  end
  // Each arbiter drops a request once granted (as the input buffer does).
  logic [NPORTS-1:0] pend [3];
  // Reswitch count: cycles in S2_CHECK with the chosen output busy.
  always @(posedge clk) begin
    if (u_base.state == 3'd4 && u_base.out_busy[u_base.dst_port]) retries[0] <= retries[0] + 1;
    if (u_pss.state  == 3'd4 && u_pss.out_busy[u_pss.dst_port])   retries[1] <= retries[1] + 1;
    if (u_pfs.state  == 3'd4 && u_pfs.out_busy[u_pfs.dst_port])   retries[2] <= retries[2] + 1;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All three see the same request vector; it is cleared per arbiter by
  // the testbench only through 'req' when all have granted, so the tests
  // below wait for the slowest arbiter before moving on.
  task automatic wait_grants(input int port, output int c0, output int c1, output int c2);
    bit g0, g1, g2;
    g0 = 0; g1 = 0; g2 = 0;
    while (!(g0 && g1 && g2)) begin
      @(posedge clk);
      if (grant[0][port]) g0 = 1;
      if (grant[1][port]) g1 = 1;
      if (grant[2][port]) g2 = 1;
    end
    c0 = grant_cyc[0][port]; c1 = grant_cyc[1][port]; c2 = grant_cyc[2][port];
  endtask

  initial begin
    int c0, c1, c2, start;
    here = '{x: 4'd1, y: 4'd1, z: 4'd1};
    req = '0; eop = '0;
    for (int p = 0; p < NPORTS; p++) req_dst[p] = '0;
    for (int a = 0; a < 3; a++) retries[a] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    // ---- switching latency: East input to (0,1,1) -> West output
    #1;
    start = cyc;
    req_dst[P_EAST] = '{x: 4'd0, y: 4'd1, z: 4'd1};
    req[P_EAST] = 1'b1;
    fork
      begin
        @(posedge clk); while (!grant[0][P_EAST]) @(posedge clk);
        expect_eq("base grant cycle", cyc - start + 1, 5);
      end
      begin
        @(posedge clk); while (!grant[1][P_EAST]) @(posedge clk);
        expect_eq("pss grant cycle", cyc - start + 1, 7);
      end
    join
    #1 req[P_EAST] = 1'b0;
    for (int a = 0; a < 3; a++) begin
      expect_eq("west busy", out_busy[a][P_WEST], 1);
      expect_eq("west src", out_src[a][P_WEST], P_EAST);
      expect_eq("east conn", in_conn[a][P_EAST], 1);
      expect_eq("east dst", in_dst[a][P_EAST], P_WEST);
      expect_eq("only west busy", out_busy[a], 7'b1 << P_WEST);
    end
    repeat (4) @(posedge clk);

    // ---- reswitching: North input also wants West, which East holds
    #1;
    req_dst[P_NORTH] = '{x: 4'd0, y: 4'd3, z: 4'd0};
    req[P_NORTH] = 1'b1;
    for (int a = 0; a < 3; a++) retries[a] = 0;
    repeat (30) @(posedge clk);
    #1;
    // base: one retry per 3 cycles; +2 #PSS: one per 5 cycles; +2 #PFS: per 3
    expect_eq("base retries in 30 cycles", retries[0], 10);
    expect_eq("pss retries in 30 cycles", retries[1], 6);
    expect_eq("pfs retries in 30 cycles", retries[2], 10);
    expect_eq("no grant while busy", int'(grant[0][P_NORTH] | grant[1][P_NORTH] | grant[2][P_NORTH]), 0);
    // East's last flit leaves: release
    eop[P_EAST] = 1'b1;
    @(posedge clk); #1 eop[P_EAST] = 1'b0;
    for (int a = 0; a < 3; a++) expect_eq("released", in_conn[a][P_EAST], 0);
    wait_grants(P_NORTH, c0, c1, c2);
    #1 req[P_NORTH] = 1'b0;
    for (int a = 0; a < 3; a++) begin
      expect_eq("west src after reswitch", out_src[a][P_WEST], P_NORTH);
      expect_eq("north dst", in_dst[a][P_NORTH], P_WEST);
    end
    eop[P_NORTH] = 1'b1;
    @(posedge clk); #1 eop[P_NORTH] = 1'b0;
    for (int a = 0; a < 3; a++) expect_eq("all free", out_busy[a], 0);
    repeat (4) @(posedge clk);

    // ---- round robin: Local (to here -> Local) and Top (to (1,1,0) -> Bottom)
    // request together; the last port served was North, so Top comes first.
    #1;
    start = cyc;
    req_dst[P_LOCAL] = here;
    req_dst[P_TOP]   = '{x: 4'd1, y: 4'd1, z: 4'd0};
    req[P_LOCAL] = 1'b1;
    req[P_TOP]   = 1'b1;
    fork
      begin
        @(posedge clk); while (!grant[0][P_TOP]) @(posedge clk);
        #1 expect_eq("base top first", cyc - start, 5);
        expect_eq("base local waits", int'(in_conn[0][P_LOCAL]), 0);
        @(posedge clk); while (!grant[0][P_LOCAL]) @(posedge clk);
        #1 expect_eq("base local second", cyc - start, 10);
      end
      begin
        @(posedge clk); while (!grant[2][P_TOP]) @(posedge clk);
        #1 expect_eq("pfs top first", cyc - start, 5);
        @(posedge clk); while (!grant[2][P_LOCAL]) @(posedge clk);
        #1 expect_eq("pfs local second", cyc - start, 12);
      end
      begin
        @(posedge clk); while (!grant[1][P_LOCAL]) @(posedge clk);
        #1 expect_eq("pss local second", cyc - start, 14);
      end
    join
    req = '0;
    for (int a = 0; a < 3; a++) begin
      expect_eq("bottom src", out_src[a][P_BOTTOM], P_TOP);
      expect_eq("local src", out_src[a][P_LOCAL], P_LOCAL);
      expect_eq("two outputs busy", out_busy[a], (7'b1 << P_BOTTOM) | (7'b1 << P_LOCAL));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
