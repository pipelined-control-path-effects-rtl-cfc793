// noc_mesh: MESH_X x MESH_Y 2D mesh network-on-chip of noc_router tiles.
//
// Router (x, y) sits at node index y*MESH_X + x; y grows towards North. Its
// East port links to the West port of (x+1, y) and its North port to the South
// port of (x, y+1), each link being a flit, a write enable (ew) driven by the
// sending MIM's register and a full flag (ff) returned by the receiving queue.
// Links that would leave the mesh are tied off: no flit enters there and the
// full flag is held high so nothing is ever switched out there. Static XY
// routing never sends a flit towards the mesh edge for a destination inside
// the mesh.
//
// The Local port of every router is brought out: inj_* feeds the router's
// Local input queue (the tile's network interface writes a flit with inj_ew
// when inj_ff is low) and ej_* is the router's Local output link (the tile
// raises ej_ff when it cannot take another flit in the next cycles).
//
// The 4x4 default and the per-tile structure follow the source design;
// CTRL_PIPE chooses the router control path (see noc_router).
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned CTRL_PIPE = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  flit_t                    inj_flit [MESH_X*MESH_Y],
  input  logic [MESH_X*MESH_Y-1:0] inj_ew,
  output logic [MESH_X*MESH_Y-1:0] inj_ff,
  output flit_t                    ej_flit  [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0] ej_ew,
  input  logic [MESH_X*MESH_Y-1:0] ej_ff
);

  localparam int unsigned NN = MESH_X * MESH_Y;

  flit_t         r_in_flit  [NN][NP];
  flit_t         r_out_flit [NN][NP];
  logic [NP-1:0] r_in_ew  [NN];
  logic [NP-1:0] r_in_ff  [NN];
  logic [NP-1:0] r_out_ew [NN];
  logic [NP-1:0] r_out_ff [NN];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      noc_router #(
        .CTRL_PIPE(CTRL_PIPE),
        .MY_X(COORD_W'(x)),
        .MY_Y(COORD_W'(y))
      ) u_r (
        .clk, .rst_n,
        .in_flit(r_in_flit[N]),   .in_ew(r_in_ew[N]),   .in_ff(r_in_ff[N]),
        .out_flit(r_out_flit[N]), .out_ew(r_out_ew[N]), .out_ff(r_out_ff[N])
      );

      // East neighbour
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_flit[N][P_E] = r_out_flit[N+1][P_W];
        assign r_in_ew[N][P_E]   = r_out_ew[N+1][P_W];
        assign r_out_ff[N][P_E]  = r_in_ff[N+1][P_W];
      end else begin : g_e_edge
        assign r_in_flit[N][P_E] = '0;
        assign r_in_ew[N][P_E]   = 1'b0;
        assign r_out_ff[N][P_E]  = 1'b1;
      end

      // West neighbour
      if (x > 0) begin : g_w
        assign r_in_flit[N][P_W] = r_out_flit[N-1][P_E];
        assign r_in_ew[N][P_W]   = r_out_ew[N-1][P_E];
        assign r_out_ff[N][P_W]  = r_in_ff[N-1][P_E];
      end else begin : g_w_edge
        assign r_in_flit[N][P_W] = '0;
        assign r_in_ew[N][P_W]   = 1'b0;
        assign r_out_ff[N][P_W]  = 1'b1;
      end

      // North neighbour
      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_flit[N][P_N] = r_out_flit[N+MESH_X][P_S];
        assign r_in_ew[N][P_N]   = r_out_ew[N+MESH_X][P_S];
        assign r_out_ff[N][P_N]  = r_in_ff[N+MESH_X][P_S];
      end else begin : g_n_edge
        assign r_in_flit[N][P_N] = '0;
        assign r_in_ew[N][P_N]   = 1'b0;
        assign r_out_ff[N][P_N]  = 1'b1;
      end

      // South neighbour
      if (y > 0) begin : g_s
        assign r_in_flit[N][P_S] = r_out_flit[N-MESH_X][P_N];
        assign r_in_ew[N][P_S]   = r_out_ew[N-MESH_X][P_N];
        assign r_out_ff[N][P_S]  = r_in_ff[N-MESH_X][P_N];
      end else begin : g_s_edge
        assign r_in_flit[N][P_S] = '0;
        assign r_in_ew[N][P_S]   = 1'b0;
        assign r_out_ff[N][P_S]  = 1'b1;
      end

      // Local port: the tile interface
      assign r_in_flit[N][P_L] = inj_flit[N];
      assign r_in_ew[N][P_L]   = inj_ew[N];
      assign r_out_ff[N][P_L]  = ej_ff[N];
      assign inj_ff[N]         = r_in_ff[N][P_L];
      assign ej_flit[N]        = r_out_flit[N][P_L];
      assign ej_ew[N]          = r_out_ew[N][P_L];
    end
  end

endmodule
