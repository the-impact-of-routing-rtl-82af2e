// lasio_router - one Lasio router with central packet arbitration.
//
// Seven identical bidirectional ports (Local, East, West, North, South, Top,
// Bottom). Each input port has a BUF_DEPTH-flit buffer that requests
// switching when a header reaches its head. A single switch control serves
// all requests one at a time by round robin, computes the XYZ output port,
// and either connects the packet or, when the output is held by another
// packet, retries it later (reswitching). Once connected, a packet's flits
// flow through the crossbar, one per cycle while the next buffer has room,
// until its last flit releases the output (wormhole switching).
//
// Links are valid/ready: a flit moves on a cycle where valid and ready are
// both high. Timing through an idle router: a header written into an input
// buffer at edge t is requested from cycle t+1, granted at edge t+5 (five
// arbitration cycles) and appears on the output link in cycle t+6; the
// following flits follow one per cycle. The router address is an input so
// the mesh can wire it from the router's position.
module lasio_router
  import lasio_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned PSS_EXTRA = 0,
  parameter int unsigned PFS_EXTRA = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             here,
  input  link_t             in        [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output link_t             out       [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);
  logic [NPORTS-1:0] req, grant, eop, flit_valid, pop;
  addr_t             req_dst  [NPORTS];
  logic [FLIT_W-1:0] flit_data[NPORTS];
  logic [NPORTS-1:0] out_busy, in_conn;
  logic [PORT_W-1:0] out_src  [NPORTS];
  logic [PORT_W-1:0] in_dst   [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    lasio_input_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk        (clk),
      .rst_n      (rst_n),
      .in         (in[p]),
      .in_ready   (in_ready[p]),
      .req        (req[p]),
      .req_dst    (req_dst[p]),
      .grant      (grant[p]),
      .flit_valid (flit_valid[p]),
      .flit_data  (flit_data[p]),
      .pop        (pop[p]),
      .eop        (eop[p])
    );
  end

  lasio_switch_control #(.PSS_EXTRA(PSS_EXTRA), .PFS_EXTRA(PFS_EXTRA)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .here     (here),
    .req      (req),
    .req_dst  (req_dst),
    .eop      (eop),
    .grant    (grant),
    .out_busy (out_busy),
    .out_src  (out_src),
    .in_conn  (in_conn),
    .in_dst   (in_dst)
  );

  lasio_crossbar u_xbar (
    .in_valid  (flit_valid),
    .in_data   (flit_data),
    .in_pop    (pop),
    .out_busy  (out_busy),
    .out_src   (out_src),
    .in_conn   (in_conn),
    .in_dst    (in_dst),
    .out       (out),
    .out_ready (out_ready)
  );

endmodule
