// lasio_router_monitor - counts the mechanisms of one router while a mesh
// test runs: completed switches, reswitches (the chosen output was busy),
// cycles where several inputs competed for the arbiter, extra #PSS and #PFS
// state cycles, cycles where an input link was held back by a full buffer,
// and flits that crossed a Top/Bottom (vertical) link or left on Local.
module lasio_router_monitor
  import lasio_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        state,
  input  logic [NPORTS-1:0] req,
  input  logic [NPORTS-1:0] out_busy,
  input  logic [2:0]        dst_port,
  input  link_t             in  [NPORTS],
  input  logic [NPORTS-1:0] in_ready,
  input  link_t             out [NPORTS],
  input  logic [NPORTS-1:0] out_ready,
  output int unsigned       cnt [8]
);
  // state encodings of lasio_switch_control
  localparam logic [2:0] S1 = 3'd1, SPSS = 3'd2, S2C = 3'd4, S3A = 3'd6, SPFS = 3'd7;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) cnt[i] <= 0;
    end else begin
      if (state == S3A) cnt[0] <= cnt[0] + 1;
      if (state == S2C && out_busy[dst_port]) cnt[1] <= cnt[1] + 1;
      if (state == S1 && $countones(req) > 1) cnt[2] <= cnt[2] + 1;
      if (state == SPSS) cnt[3] <= cnt[3] + 1;
      if (state == SPFS) cnt[4] <= cnt[4] + 1;
      begin
        int unsigned f;
        f = 0;
        for (int p = 0; p < NPORTS; p++) if (in[p].valid && !in_ready[p]) f++;
        cnt[5] <= cnt[5] + f;
      end
      cnt[6] <= cnt[6] + int'(out[P_TOP].valid && out_ready[P_TOP])
                       + int'(out[P_BOTTOM].valid && out_ready[P_BOTTOM]);
      cnt[7] <= cnt[7] + int'(out[P_LOCAL].valid && out_ready[P_LOCAL]);
    end
  end
endmodule
