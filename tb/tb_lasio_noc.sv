// tb_lasio_noc - end-to-end test of the mesh under all-to-all traffic.
//
// Four 2x2x2 meshes with 8-flit buffers run the complete all-to-all
// pattern (every node sends one 8-flit packet to every other node, 56
// packets) at a 16% injection rate, side by side: the basic arbitration
// unit, one with 2 extra #PSS states, one with 2 extra #PFS states, and a
// second basic mesh whose PEs stall their receive side 30% of the time to
// force back-pressure. Checked: every packet arrives intact and exactly once at
// its destination; each mechanism happened (switching, reswitching,
// arbitration contention, full buffers holding a link back, vertical hops,
// Local delivery, #PSS and #PFS states); and the extra states never make the
// average packet latency lower than the basic unit's, and #PSS states cost
// more than the same number of #PFS states.
module tb_lasio_noc;
  import lasio_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] now = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  int unsigned     sent [4], recv [4], errs [4], worst [4];
  longint unsigned lsum [4];
  logic            done [4];
  int unsigned     mech [4][8];

  lasio_noc_harness #(.PSS_EXTRA(0), .PFS_EXTRA(0)) u_base (
    .clk, .rst_n, .now, .rate_pct(16), .sent_total(sent[0]), .recv_total(recv[0]), .err_total(errs[0]),
    .lat_total(lsum[0]), .lat_worst(worst[0]), .done(done[0]), .mech(mech[0]));
  lasio_noc_harness #(.PSS_EXTRA(2), .PFS_EXTRA(0)) u_pss (
    .clk, .rst_n, .now, .rate_pct(16), .sent_total(sent[1]), .recv_total(recv[1]), .err_total(errs[1]),
    .lat_total(lsum[1]), .lat_worst(worst[1]), .done(done[1]), .mech(mech[1]));
  lasio_noc_harness #(.PSS_EXTRA(0), .PFS_EXTRA(2)) u_pfs (
    .clk, .rst_n, .now, .rate_pct(16), .sent_total(sent[2]), .recv_total(recv[2]), .err_total(errs[2]),
    .lat_total(lsum[2]), .lat_worst(worst[2]), .done(done[2]), .mech(mech[2]));
  lasio_noc_harness #(.PSS_EXTRA(0), .PFS_EXTRA(0), .STALL_PCT(30)) u_stall (
    .clk, .rst_n, .now, .rate_pct(16), .sent_total(sent[3]), .recv_total(recv[3]), .err_total(errs[3]),
    .lat_total(lsum[3]), .lat_worst(worst[3]), .done(done[3]), .mech(mech[3]));

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam int MAX_CYCLES = 200000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired: received %0d/%0d/%0d/%0d", recv[0], recv[1], recv[2], recv[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [4] = '{"basic", "PSS+2", "PFS+2", "basic, stalling PEs"};
    string mnames [8] = '{"switch", "reswitch", "contention", "PSS state", "PFS state",
                          "full buffer", "vertical flit", "local flit"};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (5) @(posedge clk);
    for (int d = 0; d < 4; d++) begin
      $display("%s: %0d packets, average latency %0d.%02d cycles, worst %0d", names[d], recv[d],
               lsum[d] / recv[d], (lsum[d] * 100 / recv[d]) % 100, worst[d]);
      $display("  switch %0d reswitch %0d contention %0d pss %0d pfs %0d full %0d vertical %0d local %0d",
               mech[d][0], mech[d][1], mech[d][2], mech[d][3], mech[d][4], mech[d][5], mech[d][6], mech[d][7]);
      expect_true($sformatf("%s: 56 packets sent", names[d]), sent[d] == 56);
      expect_true($sformatf("%s: 56 packets received", names[d]), recv[d] == 56);
      expect_true($sformatf("%s: no packet errors", names[d]), errs[d] == 0);
      // each packet is switched once per router on its path (hops + 1)
      expect_true($sformatf("%s: switch count", names[d]), mech[d][0] == 56 + 96);
      expect_true($sformatf("%s: local flits", names[d]), mech[d][7] == 56 * 8);
      expect_true($sformatf("%s: vertical flits", names[d]), mech[d][6] == 32 * 8);
    end
    // 2x2x2 all-to-all: 96 link hops in total, of which 32 in z (each of the
    // 8 nodes sends to 4 nodes in the other layer).
    for (int m = 0; m < 8; m++) begin
      int unsigned total;
      total = mech[0][m] + mech[1][m] + mech[2][m] + mech[3][m];
      $display("mechanism %-14s happened %0d times", mnames[m], total);
      expect_true($sformatf("mechanism %s happened", mnames[m]), total > 0);
    end
    expect_true("PSS states only in the PSS mesh", mech[0][3] == 0 && mech[2][3] == 0 && mech[1][3] > 0);
    expect_true("PFS states only in the PFS mesh", mech[0][4] == 0 && mech[1][4] == 0 && mech[2][4] == 2 * mech[2][0]);
    expect_true("PSS: two extra states per switching attempt", mech[1][3] == 2 * (mech[1][0] + mech[1][1]));
    expect_true("PSS latency above basic", lsum[1] > lsum[0]);
    expect_true("PFS latency not below basic", lsum[2] >= lsum[0]);
    expect_true("PSS states cost more than PFS states", lsum[1] >= lsum[2]);
    expect_true("stalling PEs fill buffers", mech[3][5] > mech[0][5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
