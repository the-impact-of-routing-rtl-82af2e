// lasio_input_buffer - one router input port: a flit FIFO plus packet framing.
//
// Flits arrive on a valid/ready link; the port is ready while its FIFO is
// not full. A small framing machine follows the packet at the head of the
// FIFO: while the head is a header that has not been switched yet, the port
// raises req and shows the header's destination on req_dst to the central
// switch control. When the switch control has connected the packet it
// pulses grant (its last switching step, which frees this input's request);
// from the next cycle the head flit is offered to the crossbar on
// flit_valid, and it leaves whenever pop is high. The second flit of a
// packet gives the number of payload flits still to come; the pop of the
// last flit raises eop in the same cycle so that the switch control can
// release the connection, and the port goes back to waiting for a header.
//
// The FIFO depth is a parameter (the evaluated depths are 8 and 16 flits);
// the size-flit framing is this design's choice.
module lasio_input_buffer
  import lasio_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // link from the neighbour (or the PE)
  input  link_t             in,
  output logic              in_ready,
  // request to the switch control
  output logic              req,
  output addr_t             req_dst,
  input  logic              grant,
  // towards the crossbar
  output logic              flit_valid,
  output logic [FLIT_W-1:0] flit_data,
  input  logic              pop,
  output logic              eop
);
  typedef enum logic [1:0] {PH_HEADER, PH_SIZE, PH_PAYLOAD} phase_e;

  phase_e            phase;
  logic              granted;
  logic [FLIT_W-1:0] remaining;
  logic              empty, full;
  logic              popping;

  lasio_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (in.valid),
    .wr_data (in.data),
    .pop     (popping),
    .rd_data (flit_data),
    .empty   (empty),
    .full    (full)
  );

  assign in_ready   = !full;
  assign req        = !empty && (phase == PH_HEADER) && !granted;
  assign req_dst    = addr_t'(flit_data[3*COORD_W-1:0]);
  assign flit_valid = !empty && granted;
  assign popping    = flit_valid && pop;
  assign eop        = popping && (((phase == PH_SIZE) && (flit_data == '0)) ||
                                  ((phase == PH_PAYLOAD) && (remaining == FLIT_W'(1))));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= PH_HEADER;
      granted   <= 1'b0;
      remaining <= '0;
    end else begin
      if (grant) granted <= 1'b1;
      if (popping) begin
        unique case (phase)
          PH_HEADER: phase <= PH_SIZE;
          PH_SIZE: begin
            remaining <= flit_data;
            phase     <= (flit_data == '0) ? PH_HEADER : PH_PAYLOAD;
          end
          PH_PAYLOAD: begin
            remaining <= remaining - 1'b1;
            if (remaining == FLIT_W'(1)) phase <= PH_HEADER;
          end
          default: phase <= PH_HEADER;
        endcase
        if (eop) granted <= 1'b0;
      end
    end
  end

  // The switch control only grants a port that is requesting.
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);
  // A flit leaves only once the packet has been switched.
  a_pop_after_grant: assert property (@(posedge clk) disable iff (!rst_n) popping |-> granted);

endmodule
