// tb_lasio_workloads - the evaluated injection-rate sweep.
//
// All-to-all traffic (every node sends one 8-flit packet to every other
// node) at injection rates of 1, 2, 4, 8, 16, 32 and 64 percent, one rate
// after the other with a reset in between, on eight meshes side by side:
//   2x2x2 with 8-flit and with 16-flit buffers, each with the basic
//   arbitration unit, with 5 extra #PSS states and with 5 extra #PFS states
//   (st+=6, the largest evaluated variant), and
//   4x4x4 with 8-flit and with 16-flit buffers, basic unit.
// Checked: every packet of every run arrives intact and exactly once; at
// each rate and buffer depth the extra states never lower the average
// latency and #PSS states cost at least as much as #PFS states; the basic
// unit's latency does not fall as the rate rises. The latency table is
// printed.
module tb_lasio_workloads;
  import lasio_pkg::*;

  localparam int NR = 7;
  localparam int NM = 8;
  localparam int unsigned RATES [NR] = '{1, 2, 4, 8, 16, 32, 64};

  logic        clk = 0, rst_n = 0;
  logic [31:0] now = 0;
  int unsigned rate = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  int unsigned     sent [NM], recv [NM], errs [NM], worst [NM];
  longint unsigned lsum [NM];
  logic            done [NM];
  int unsigned     mech [NM][8];

  // mesh m: 0..2 = 2x2x2 depth 8 basic/PSS+5/PFS+5, 3..5 = same at depth 16,
  // 6 = 4x4x4 depth 8 basic, 7 = 4x4x4 depth 16 basic
  for (genvar m = 0; m < 6; m++) begin : g_small
    lasio_noc_harness #(
      .BUF_DEPTH ((m < 3) ? 8 : 16),
      .PSS_EXTRA ((m % 3 == 1) ? 5 : 0),
      .PFS_EXTRA ((m % 3 == 2) ? 5 : 0)
    ) u_mesh (
      .clk, .rst_n, .now, .rate_pct(rate), .sent_total(sent[m]), .recv_total(recv[m]),
      .err_total(errs[m]), .lat_total(lsum[m]), .lat_worst(worst[m]),
      .done(done[m]), .mech(mech[m]));
  end
  lasio_noc_harness #(.X_SIZE(4), .Y_SIZE(4), .Z_SIZE(4)) u_big (
    .clk, .rst_n, .now, .rate_pct(rate), .sent_total(sent[6]), .recv_total(recv[6]),
    .err_total(errs[6]), .lat_total(lsum[6]), .lat_worst(worst[6]),
    .done(done[6]), .mech(mech[6]));
  lasio_noc_harness #(.X_SIZE(4), .Y_SIZE(4), .Z_SIZE(4), .BUF_DEPTH(16)) u_big16 (
    .clk, .rst_n, .now, .rate_pct(rate), .sent_total(sent[7]), .recv_total(recv[7]),
    .err_total(errs[7]), .lat_total(lsum[7]), .lat_worst(worst[7]),
    .done(done[7]), .mech(mech[7]));

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit all_done();
    for (int m = 0; m < NM; m++) if (!done[m]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned avg [NR][NM];
    $display("average packet latency in cycles, all-to-all");
    $display(" rate%%  | 2x2x2 buf 8: basic PSS+5 PFS+5 | buf 16: basic PSS+5 PFS+5 | 4x4x4 basic buf 8  buf 16");
    for (int r = 0; r < NR; r++) begin
      rst_n = 0;
      rate  = RATES[r];
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      @(posedge clk);
      while (!all_done()) @(posedge clk);
      repeat (5) @(posedge clk);
      for (int m = 0; m < NM; m++) begin
        int unsigned pk;
        pk = (m < 6) ? 56 : 4032;
        avg[r][m] = lsum[m] / pk;
        expect_true($sformatf("rate %0d mesh %0d: all packets intact", RATES[r], m),
                    sent[m] == pk && recv[m] == pk && errs[m] == 0);
      end
      $display("%5d   |   %6d %6d %6d   |   %6d %6d %6d   |   %6d %6d", RATES[r],
               avg[r][0], avg[r][1], avg[r][2], avg[r][3], avg[r][4], avg[r][5], avg[r][6], avg[r][7]);
      for (int b = 0; b < 2; b++) begin
        expect_true($sformatf("rate %0d buf %0d: PSS not below basic", RATES[r], 8 << b),
                    lsum[3*b+1] >= lsum[3*b]);
        expect_true($sformatf("rate %0d buf %0d: PFS not below basic", RATES[r], 8 << b),
                    lsum[3*b+2] >= lsum[3*b]);
        expect_true($sformatf("rate %0d buf %0d: PSS not below PFS", RATES[r], 8 << b),
                    lsum[3*b+1] >= lsum[3*b+2]);
      end
      if (r > 0) begin
        expect_true($sformatf("rate %0d: 2x2x2 basic latency not below lower rate", RATES[r]),
                    avg[r][0] >= avg[r-1][0]);
        expect_true($sformatf("rate %0d: 4x4x4 basic latency not below lower rate", RATES[r]),
                    avg[r][6] >= avg[r-1][6] && avg[r][7] >= avg[r-1][7]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
