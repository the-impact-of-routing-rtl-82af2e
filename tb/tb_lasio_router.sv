// tb_lasio_router - one router at address (1,1,1) with all seven ports.
//
// 1. A packet from West to (2,1,1) must leave on East: its header appears on
//    the output 6 cycles after it entered (5 arbitration cycles plus the
//    buffer), then one flit per cycle.
// 2. Local and North both send to (1,1,0) (Bottom) at once: the packets
//    must leave one after the other, never interleaved (wormhole).
// 3. A packet to (1,1,2) leaves on Top while Top's ready toggles at random.
// 4. Packets from Top, East and South to (1,1,1) arrive on Local, and one
//    to (1,0,1) leaves on South, all concurrently with a stalled Local.
// Every output stream is checked flit by flit against the expected packets.
module tb_lasio_router;
  import lasio_pkg::*;

  logic              clk = 0, rst_n = 0;
  addr_t             here;
  link_t             in  [NPORTS];
  logic [NPORTS-1:0] in_ready, out_ready;
  link_t             out [NPORTS];
  int checks = 0, failures = 0;
  int cyc = 0;

  lasio_router #(.BUF_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // captured output flits, and the cycle each header left
  logic [FLIT_W-1:0] got_q [NPORTS][$];
  int                hdr_cyc [NPORTS];
  logic [NPORTS-1:0] rand_ready;
  always @(posedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out[o].valid && out_ready[o]) begin
        if (got_q[o].size() % 8 == 0) hdr_cyc[o] = cyc;
        got_q[o].push_back(out[o].data);
      end
    end
  end

  function automatic logic [FLIT_W-1:0] pkt_flit(input addr_t dst, input int tag, input int i);
    if (i == 0) return make_header(dst);
    if (i == 1) return 16'd6;
    return 16'(tag * 16 + i);
  endfunction

  task automatic send(input int port, input addr_t dst, input int tag, output int hdr_in_cyc);
    for (int i = 0; i < 8; i++) begin
      bit taken;
      in[port].valid = 1'b1;
      in[port].data  = pkt_flit(dst, tag, i);
      do begin
        @(negedge clk);
        taken = in_ready[port];
        @(posedge clk);
        if (i == 0) hdr_in_cyc = cyc;
        #1;
      end while (!taken);
    end
    in[port].valid = 1'b0;
  endtask

  task automatic expect_packet(input int o, input addr_t dst, input int tag);
    for (int i = 0; i < 8; i++) begin
      logic [FLIT_W-1:0] f;
      checks++;
      if (got_q[o].size() == 0) begin
        failures++;
        $display("FAIL port %0d: packet tag %0d missing flit %0d", o, tag, i);
        return;
      end
      f = got_q[o].pop_front();
      if (f !== pkt_flit(dst, tag, i)) begin
        failures++;
        $display("FAIL port %0d tag %0d flit %0d: %h", o, tag, i, f);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, t2, t3, t4;
    addr_t a_e, a_b, a_t, a_l, a_s;
    here = '{x: 4'd1, y: 4'd1, z: 4'd1};
    a_e  = '{x: 4'd2, y: 4'd1, z: 4'd1};
    a_b  = '{x: 4'd1, y: 4'd1, z: 4'd0};
    a_t  = '{x: 4'd1, y: 4'd1, z: 4'd2};
    a_l  = here;
    a_s  = '{x: 4'd1, y: 4'd0, z: 4'd1};
    for (int p = 0; p < NPORTS; p++) in[p] = '0;
    out_ready = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;

    // ---- 1
    send(P_WEST, a_e, 1, t0);
    repeat (10) @(posedge clk); #1;
    expect_eq("header latency West->East", hdr_cyc[P_EAST] - t0, 6);
    expect_packet(P_EAST, a_e, 1);

    // ---- 2
    fork
      send(P_LOCAL, a_b, 2, t1);
      send(P_NORTH, a_b, 3, t2);
    join
    repeat (30) @(posedge clk); #1;
    expect_eq("two packets on Bottom", got_q[P_BOTTOM].size(), 16);
    if (got_q[P_BOTTOM].size() == 16 && got_q[P_BOTTOM][0] == make_header(a_b)) begin
      // round robin after West (2): North (3) is served before Local (0)
      expect_packet(P_BOTTOM, a_b, 3);
      expect_packet(P_BOTTOM, a_b, 2);
    end

    // ---- 3
    fork
      send(P_SOUTH, a_t, 4, t3);
      repeat (60) begin
        @(negedge clk);
        out_ready[P_TOP] = ($urandom % 2) == 1;
      end
    join
    out_ready[P_TOP] = 1'b1;
    repeat (20) @(posedge clk); #1;
    expect_packet(P_TOP, a_t, 4);

    // ---- 4: three packets for Local, Local stalled for a while
    out_ready[P_LOCAL] = 1'b0;
    fork
      send(P_TOP,   a_l, 5, t4);
      send(P_EAST,  a_l, 6, t4);
      send(P_SOUTH, a_l, 7, t4);
      send(P_WEST,  a_s, 8, t4);
      begin
        repeat (40) @(posedge clk);
        #1 out_ready[P_LOCAL] = 1'b1;
      end
    join
    repeat (60) @(posedge clk); #1;
    expect_eq("three packets on Local", got_q[P_LOCAL].size(), 24);
    for (int k = 0; k < 3; k++) begin
      int tag;
      tag = (got_q[P_LOCAL].size() > 2) ? int'(got_q[P_LOCAL][2] >> 4) : 0;
      expect_eq("local tag valid", int'(tag >= 5 && tag <= 7), 1);
      expect_packet(P_LOCAL, a_l, tag);
    end
    expect_packet(P_SOUTH, a_s, 8);
    for (int o = 0; o < NPORTS; o++) expect_eq("no stray flits", got_q[o].size(), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
