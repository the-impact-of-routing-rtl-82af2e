// lasio_noc_harness - a parameterised mesh under all-to-all traffic, for the
// end-to-end test: the NoC, one behavioural PE per node and a mechanism
// monitor on every router. Outputs the traffic totals and, summed over all
// routers, the eight mechanism counts of lasio_router_monitor.
module lasio_noc_harness
  import lasio_pkg::*;
#(
  parameter int unsigned X_SIZE    = 2,
  parameter int unsigned Y_SIZE    = 2,
  parameter int unsigned Z_SIZE    = 2,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned PSS_EXTRA = 0,
  parameter int unsigned PFS_EXTRA = 0,
  parameter int unsigned STALL_PCT = 0,
  localparam int unsigned N        = X_SIZE * Y_SIZE * Z_SIZE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [31:0]     now,
  input  int unsigned     rate_pct,
  output int unsigned     sent_total,
  output int unsigned     recv_total,
  output int unsigned     err_total,
  output longint unsigned lat_total,
  output int unsigned     lat_worst,
  output logic            done,
  output int unsigned     mech [8]
);
  link_t        pe_in  [N];
  link_t        pe_out [N];
  logic [N-1:0] pe_in_ready, pe_out_ready;

  lasio_noc #(
    .X_SIZE(X_SIZE), .Y_SIZE(Y_SIZE), .Z_SIZE(Z_SIZE), .BUF_DEPTH(BUF_DEPTH),
    .PSS_EXTRA(PSS_EXTRA), .PFS_EXTRA(PFS_EXTRA)
  ) dut (.clk, .rst_n, .pe_in, .pe_in_ready, .pe_out, .pe_out_ready);

  lasio_traffic #(
    .X_SIZE(X_SIZE), .Y_SIZE(Y_SIZE), .Z_SIZE(Z_SIZE),
    .STALL_PCT(STALL_PCT)
  ) u_traffic (.clk, .rst_n, .now, .rate_pct, .pe_in, .pe_in_ready, .pe_out, .pe_out_ready,
               .sent_total, .recv_total, .err_total, .lat_total, .lat_worst, .done);

  int unsigned cnt [N][8];
  for (genvar x = 0; x < X_SIZE; x++) begin : g_x
    for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
      for (genvar z = 0; z < Z_SIZE; z++) begin : g_z
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
          .cnt      (cnt[(x * Y_SIZE + y) * Z_SIZE + z])
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
endmodule
