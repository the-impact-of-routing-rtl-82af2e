// lasio_switch_control - the router's single, central arbiter.
//
// One finite state machine serves all seven input ports in turn:
//   S0        once after reset: clears the connection table, then S1.
//   S1        waits until some input holds an unswitched header and picks
//             one by round robin, starting after the port picked last.
//   S2 (2 cycles) S2_ROUTE computes the XYZ output port of the header;
//             S2_CHECK looks up whether that output is free. If it is busy
//             the FSM returns to S1 (a reswitch: the packet is retried
//             later and other ports get their turn); otherwise S3.
//   S3 (2 cycles) S3_CONNECT writes the connection (input -> output) into
//             the table that steers the crossbar and marks the output busy;
//             S3_ACK pulses grant to the input, freeing its request so its
//             flits start to flow. Then back to S1.
// A header seen in S1 thus gets its grant 5 cycles later, and a reswitch
// costs 3 cycles (S1-S2), as in the description of the arbitration unit.
//
// PSS_EXTRA extra wait states are inserted between S1 and S2 (the #PSS
// scenario: every switch and every reswitch gets slower); PFS_EXTRA extra
// states after S3 (the #PFS scenario: only completed switches get slower).
// Both default to 0, the basic unit.
//
// A connection is released, independently of the FSM, in the cycle the
// input's last flit leaves (eop). Everything is synchronous to clk with a
// synchronous active-low reset. Round-robin order, table layout and the
// busy check on the registered table are this design's choices.
module lasio_switch_control
  import lasio_pkg::*;
#(
  parameter int unsigned PSS_EXTRA = 0,
  parameter int unsigned PFS_EXTRA = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  addr_t                   here,
  input  logic  [NPORTS-1:0]      req,
  input  addr_t                   req_dst [NPORTS],
  input  logic  [NPORTS-1:0]      eop,
  output logic  [NPORTS-1:0]      grant,
  // connection table, read by the crossbar
  output logic  [NPORTS-1:0]      out_busy,
  output logic  [PORT_W-1:0]      out_src [NPORTS],
  output logic  [NPORTS-1:0]      in_conn,
  output logic  [PORT_W-1:0]      in_dst  [NPORTS]
);
  typedef enum logic [2:0] {
    S0_INIT, S1_WAIT, SX_PSS, S2_ROUTE, S2_CHECK, S3_CONNECT, S3_ACK, SX_PFS
  } state_e;

  state_e            state;
  logic [PORT_W-1:0] sel, last;
  port_e             route_port, dst_port;
  logic [7:0]        extra_cnt;
  logic              any_req;
  logic [PORT_W-1:0] rr_pick;

  assign any_req = |req;

  // Round robin: first requesting port after 'last', wrapping around.
  always_comb begin
    rr_pick = last;
    for (int k = NPORTS; k >= 1; k--) begin
      logic [PORT_W-1:0] idx;
      idx = PORT_W'((int'(last) + k) % NPORTS);
      if (req[idx]) rr_pick = idx;
    end
  end

  lasio_xyz_route u_route (
    .here     (here),
    .dst      (req_dst[sel]),
    .out_port (route_port)
  );

  always_comb begin
    grant = '0;
    if (state == S3_ACK) grant[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S0_INIT;
      sel       <= '0;
      last      <= PORT_W'(NPORTS-1);
      dst_port  <= P_LOCAL;
      extra_cnt <= '0;
      out_busy  <= '0;
      in_conn   <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        out_src[p] <= '0;
        in_dst[p]  <= '0;
      end
    end else begin
      // releases, at the last flit of a packet
      for (int p = 0; p < NPORTS; p++) begin
        if (eop[p] && in_conn[p]) begin
          in_conn[p]           <= 1'b0;
          out_busy[in_dst[p]]  <= 1'b0;
        end
      end

      unique case (state)
        S0_INIT: begin
          out_busy <= '0;
          in_conn  <= '0;
          state    <= S1_WAIT;
        end
        S1_WAIT: begin
          if (any_req) begin
            sel       <= rr_pick;
            last      <= rr_pick;
            extra_cnt <= '0;
            state     <= (PSS_EXTRA > 0) ? SX_PSS : S2_ROUTE;
          end
        end
        SX_PSS: begin
          extra_cnt <= extra_cnt + 1'b1;
          if (extra_cnt == 8'(PSS_EXTRA - 1)) state <= S2_ROUTE;
        end
        S2_ROUTE: begin
          dst_port <= route_port;
          state    <= S2_CHECK;
        end
        S2_CHECK: begin
          state <= out_busy[dst_port] ? S1_WAIT : S3_CONNECT;
        end
        S3_CONNECT: begin
          out_busy[dst_port] <= 1'b1;
          out_src[dst_port]  <= sel;
          in_conn[sel]       <= 1'b1;
          in_dst[sel]        <= dst_port;
          state              <= S3_ACK;
        end
        S3_ACK: begin
          extra_cnt <= '0;
          state     <= (PFS_EXTRA > 0) ? SX_PFS : S1_WAIT;
        end
        SX_PFS: begin
          extra_cnt <= extra_cnt + 1'b1;
          if (extra_cnt == 8'(PFS_EXTRA - 1)) state <= S1_WAIT;
        end
        default: state <= S1_WAIT;
      endcase
    end
  end

  // A packet never leaves on the port it came in on under XYZ routing.
  a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S3_CONNECT) |-> (PORT_W'(dst_port) != sel) || (dst_port == P_LOCAL));
  // Only a free output is connected.
  a_connect_free: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S3_CONNECT) |-> !out_busy[dst_port]);

endmodule
