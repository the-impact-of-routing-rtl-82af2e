// lasio_crossbar - the router's 7x7 flit switch (combinational).
//
// Each output port o forwards the head flit of the input recorded in the
// switch control's connection table (out_src[o]) while out_busy[o] is set;
// each connected input i is popped when the output it is connected to
// (in_dst[i]) accepts the flit. Data, valid and ready pass straight through,
// so a flit crosses the router in the cycle it is accepted downstream; the
// flit valid comes from a FIFO and the ready from the next FIFO's fill
// level, so no combinational path runs across more than one router.
// Multiplexer-based switch; its structure is this design's choice.
module lasio_crossbar
  import lasio_pkg::*;
(
  // from the input buffers
  input  logic [NPORTS-1:0] in_valid,
  input  logic [FLIT_W-1:0] in_data  [NPORTS],
  output logic [NPORTS-1:0] in_pop,
  // connection table
  input  logic [NPORTS-1:0] out_busy,
  input  logic [PORT_W-1:0] out_src  [NPORTS],
  input  logic [NPORTS-1:0] in_conn,
  input  logic [PORT_W-1:0] in_dst   [NPORTS],
  // output links
  output link_t             out      [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out[o].valid = out_busy[o] && in_valid[out_src[o]];
      out[o].data  = in_data[out_src[o]];
    end
    for (int i = 0; i < NPORTS; i++) begin
      in_pop[i] = in_conn[i] && out_ready[in_dst[i]];
    end
  end
endmodule
