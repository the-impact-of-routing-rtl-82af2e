// lasio_noc - the Lasio 3D-mesh network-on-chip (top level).
//
// X_SIZE x Y_SIZE x Z_SIZE routers, each at address (x,y,z) and each with
// one processing element (PE) on its Local port; a PE's address is the
// address of its router. Neighbouring routers are joined by a pair of
// opposite links: East/West along x, North/South along y, and Top/Bottom
// along z between stacked 2D layers (the through-silicon-via links, which
// are plain wires here). Ports on the mesh boundary are tied off: nothing
// arrives on them and nothing is ever routed to them by XYZ routing.
// Packets are routed deterministically X, then Y, then Z.
//
// PE interface: node n = (x*Y_SIZE + y)*Z_SIZE + z. pe_in[n]/pe_in_ready[n]
// is the valid/ready link from the PE into its router, pe_out[n]/
// pe_out_ready[n] the link from the router to the PE. The defaults are the
// larger evaluated configuration (4x4x4 mesh, 16-bit flits, 8-flit buffers)
// with the basic arbitration unit (no extra #PSS or #PFS states).
module lasio_noc
  import lasio_pkg::*;
#(
  parameter int unsigned X_SIZE    = 4,
  parameter int unsigned Y_SIZE    = 4,
  parameter int unsigned Z_SIZE    = 4,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned PSS_EXTRA = 0,
  parameter int unsigned PFS_EXTRA = 0,
  localparam int unsigned N        = X_SIZE * Y_SIZE * Z_SIZE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  link_t        pe_in        [N],
  output logic [N-1:0] pe_in_ready,
  output link_t        pe_out       [N],
  input  logic [N-1:0] pe_out_ready
);
  link_t             r_in       [N][NPORTS];
  link_t             r_out      [N][NPORTS];
  logic [NPORTS-1:0] r_in_ready [N];
  logic [NPORTS-1:0] r_out_ready[N];

  function automatic int unsigned node(input int unsigned x, y, z);
    return (x * Y_SIZE + y) * Z_SIZE + z;
  endfunction

  for (genvar x = 0; x < X_SIZE; x++) begin : g_x
    for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
      for (genvar z = 0; z < Z_SIZE; z++) begin : g_z
        localparam int unsigned ME = node(x, y, z);
        addr_t here;
        assign here.x = COORD_W'(x);
        assign here.y = COORD_W'(y);
        assign here.z = COORD_W'(z);

        lasio_router #(
          .BUF_DEPTH (BUF_DEPTH),
          .PSS_EXTRA (PSS_EXTRA),
          .PFS_EXTRA (PFS_EXTRA)
        ) u_router (
          .clk       (clk),
          .rst_n     (rst_n),
          .here      (here),
          .in        (r_in[ME]),
          .in_ready  (r_in_ready[ME]),
          .out       (r_out[ME]),
          .out_ready (r_out_ready[ME])
        );

        // Local port
        assign r_in[ME][P_LOCAL]        = pe_in[ME];
        assign pe_in_ready[ME]          = r_in_ready[ME][P_LOCAL];
        assign pe_out[ME]               = r_out[ME][P_LOCAL];
        assign r_out_ready[ME][P_LOCAL] = pe_out_ready[ME];

        // x links
        if (x + 1 < X_SIZE) begin : g_east
          assign r_in[ME][P_EAST]        = r_out[node(x+1, y, z)][P_WEST];
          assign r_out_ready[ME][P_EAST] = r_in_ready[node(x+1, y, z)][P_WEST];
        end else begin : g_east_edge
          assign r_in[ME][P_EAST]        = '0;
          assign r_out_ready[ME][P_EAST] = 1'b0;
        end
        if (x > 0) begin : g_west
          assign r_in[ME][P_WEST]        = r_out[node(x-1, y, z)][P_EAST];
          assign r_out_ready[ME][P_WEST] = r_in_ready[node(x-1, y, z)][P_EAST];
        end else begin : g_west_edge
          assign r_in[ME][P_WEST]        = '0;
          assign r_out_ready[ME][P_WEST] = 1'b0;
        end
        // y links
        if (y + 1 < Y_SIZE) begin : g_north
          assign r_in[ME][P_NORTH]        = r_out[node(x, y+1, z)][P_SOUTH];
          assign r_out_ready[ME][P_NORTH] = r_in_ready[node(x, y+1, z)][P_SOUTH];
        end else begin : g_north_edge
          assign r_in[ME][P_NORTH]        = '0;
          assign r_out_ready[ME][P_NORTH] = 1'b0;
        end
        if (y > 0) begin : g_south
          assign r_in[ME][P_SOUTH]        = r_out[node(x, y-1, z)][P_NORTH];
          assign r_out_ready[ME][P_SOUTH] = r_in_ready[node(x, y-1, z)][P_NORTH];
        end else begin : g_south_edge
          assign r_in[ME][P_SOUTH]        = '0;
          assign r_out_ready[ME][P_SOUTH] = 1'b0;
        end
        // z links (between layers)
        if (z + 1 < Z_SIZE) begin : g_top
          assign r_in[ME][P_TOP]        = r_out[node(x, y, z+1)][P_BOTTOM];
          assign r_out_ready[ME][P_TOP] = r_in_ready[node(x, y, z+1)][P_BOTTOM];
        end else begin : g_top_edge
          assign r_in[ME][P_TOP]        = '0;
          assign r_out_ready[ME][P_TOP] = 1'b0;
        end
        if (z > 0) begin : g_bottom
          assign r_in[ME][P_BOTTOM]        = r_out[node(x, y, z-1)][P_TOP];
          assign r_out_ready[ME][P_BOTTOM] = r_in_ready[node(x, y, z-1)][P_TOP];
        end else begin : g_bottom_edge
          assign r_in[ME][P_BOTTOM]        = '0;
          assign r_out_ready[ME][P_BOTTOM] = 1'b0;
        end
      end
    end
  end

  // The mesh must fit the address fields of the header flit.
  initial begin
    if (X_SIZE > (1 << COORD_W) || Y_SIZE > (1 << COORD_W) || Z_SIZE > (1 << COORD_W))
      $error("mesh dimension exceeds the %0d-bit coordinate field", COORD_W);
  end

endmodule
