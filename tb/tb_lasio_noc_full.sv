// tb_lasio_noc_full - the mesh at its default size (4x4x4, 8-flit buffers,
// basic arbitration unit) under one complete all-to-all exchange.
//
// Every one of the 64 PEs sends an 8-flit packet to each of the 63 others
// (4032 packets), created at an 8% injection rate in destination order.
// Checked: all 4032 packets arrive intact, exactly once, at the right PE;
// every router switches each packet once per visit, so the switch count is
// 4032 plus the 15360 link hops of XYZ routing (5120 per axis: for a 4-wide
// axis the distances over all ordered coordinate pairs add to 20, times 16
// choices of the other two coordinates at each end); 5120*8 flits cross the
// vertical links; reswitching and contention occur. Reports average and
// worst packet latency.
module tb_lasio_noc_full;
  import lasio_pkg::*;

  localparam int unsigned N       = 64;
  localparam int unsigned PACKETS = N * (N - 1);

  logic        clk = 0, rst_n = 0;
  logic [31:0] now = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  link_t        pe_in  [N];
  link_t        pe_out [N];
  logic [N-1:0] pe_in_ready, pe_out_ready;

  int unsigned     sent, recv, errs, worst;
  longint unsigned lsum;
  logic            done;

  lasio_noc dut (.clk, .rst_n, .pe_in, .pe_in_ready, .pe_out, .pe_out_ready);

  lasio_traffic #(.X_SIZE(4), .Y_SIZE(4), .Z_SIZE(4)) u_traffic (
    .clk, .rst_n, .now, .rate_pct(8), .pe_in, .pe_in_ready, .pe_out, .pe_out_ready,
    .sent_total(sent), .recv_total(recv), .err_total(errs),
    .lat_total(lsum), .lat_worst(worst), .done(done));

  int unsigned cnt [N][8];
  int unsigned mech [8];
  for (genvar x = 0; x < 4; x++) begin : g_x
    for (genvar y = 0; y < 4; y++) begin : g_y
      for (genvar z = 0; z < 4; z++) begin : g_z
        lasio_router_monitor u_mon (
          .clk, .rst_n,
          .state    (dut.g_x[x].g_y[y].g_z[z].u_router.u_ctrl.state),
          .req      (dut.g_x[x].g_y[y].g_z[z].u_router.u_ctrl.req),
          .out_busy (dut.g_x[x].g_y[y].g_z[z].u_router.u_ctrl.out_busy),
          .dst_port (dut.g_x[x].g_y[y].g_z[z].u_router.u_ctrl.dst_port),
          .in       (dut.g_x[x].g_y[y].g_z[z].u_router.in),
          .in_ready (dut.g_x[x].g_y[y].g_z[z].u_router.in_ready),
          .out      (dut.g_x[x].g_y[y].g_z[z].u_router.out),
          .out_ready(dut.g_x[x].g_y[y].g_z[z].u_router.out_ready),
          .cnt      (cnt[(x * 4 + y) * 4 + z])
        );
      end
    end
  end
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      mech[i] = 0;
      for (int n = 0; n < N; n++) mech[i] += cnt[n][i];
    end
  end

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    $display("4x4x4 all-to-all at 8%%: %0d packets in %0d cycles, average latency %0d cycles, worst %0d",
             recv, now, lsum / recv, worst);
    $display("switch %0d reswitch %0d contention %0d full %0d vertical %0d local %0d",
             mech[0], mech[1], mech[2], mech[5], mech[6], mech[7]);
    expect_true("all packets sent", sent == PACKETS);
    expect_true("all packets received", recv == PACKETS);
    expect_true("no packet errors", errs == 0);
    expect_true("one switch per router visited", mech[0] == PACKETS + 15360);
    expect_true("vertical flits", mech[6] == 5120 * 8);
    expect_true("local flits", mech[7] == PACKETS * 8);
    expect_true("reswitching happened", mech[1] > 0);
    expect_true("contention happened", mech[2] > 0);
    expect_true("no extra states at the defaults", mech[3] == 0 && mech[4] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
