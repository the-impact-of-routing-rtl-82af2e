// lasio_traffic - one behavioural PE per node running all-to-all traffic at
// the injection rate rate_pct (percent, may change between resets),
// plus the totals the mesh testbenches check: packets sent and received,
// packet errors, the sum and maximum of packet latencies, and done (every
// PE has sent and received all of its N-1 packets).
module lasio_traffic
  import lasio_pkg::*;
#(
  parameter int unsigned X_SIZE    = 2,
  parameter int unsigned Y_SIZE    = 2,
  parameter int unsigned Z_SIZE    = 2,
  parameter int unsigned STALL_PCT = 0,
  localparam int unsigned N        = X_SIZE * Y_SIZE * Z_SIZE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [31:0]     now,
  input  int unsigned     rate_pct,
  output link_t           pe_in  [N],
  input  logic [N-1:0]    pe_in_ready,
  input  link_t           pe_out [N],
  output logic [N-1:0]    pe_out_ready,
  output int unsigned     sent_total,
  output int unsigned     recv_total,
  output int unsigned     err_total,
  output longint unsigned lat_total,
  output int unsigned     lat_worst,
  output logic            done
);
  int unsigned     sent [N], recv [N], errs [N], lmax [N];
  longint unsigned lsum [N];

  for (genvar n = 0; n < N; n++) begin : g_pe
    lasio_pe_model #(
      .ME(n), .X_SIZE(X_SIZE), .Y_SIZE(Y_SIZE), .Z_SIZE(Z_SIZE),
      .STALL_PCT(STALL_PCT)
    ) u_pe (
      .clk, .rst_n, .now, .rate_pct,
      .tx(pe_in[n]), .tx_ready(pe_in_ready[n]),
      .rx(pe_out[n]), .rx_ready(pe_out_ready[n]),
      .sent(sent[n]), .received(recv[n]), .errors(errs[n]),
      .lat_sum(lsum[n]), .lat_max(lmax[n])
    );
  end

  always_comb begin
    sent_total = 0; recv_total = 0; err_total = 0; lat_total = 0; lat_worst = 0;
    for (int n = 0; n < N; n++) begin
      sent_total += sent[n];
      recv_total += recv[n];
      err_total  += errs[n];
      lat_total  += lsum[n];
      if (lmax[n] > lat_worst) lat_worst = lmax[n];
    end
    done = (sent_total == N * (N - 1)) && (recv_total == N * (N - 1));
  end
endmodule
