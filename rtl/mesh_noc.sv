// mesh_noc: 2-D mesh of routers.
//
// MESH_X x MESH_Y routers (4 x 4 by default, as in the design's network
// drawing), each linked to its four neighbours by one channel in each
// direction. Router (x, y) is node n = y * MESH_X + x; its local port is
// brought out as the node's injection (loc_in_*) and ejection (loc_out_*)
// channels, where a network interface controller attaches. Channels at the
// mesh edge are tied off: nothing arrives on them and, since XY routing
// never sends a flit off the mesh for a valid destination, nothing leaves.
// Timing: 4 cycles per router passed when there is no contention, so a
// flit from node a to node b takes 4 * (hops + 1) cycles. arb_conflict has
// one bit per router.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int NX = MESH_X,
  parameter int NY = MESH_Y
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NX*NY-1:0]  loc_in_valid,
  output logic [NX*NY-1:0]  loc_in_ready,
  input  flit_t             loc_in_flit [NX*NY],
  output logic [NX*NY-1:0]  loc_out_valid,
  input  logic [NX*NY-1:0]  loc_out_ready,
  output flit_t             loc_out_flit [NX*NY],
  output logic [NX*NY-1:0]  arb_conflict
);
  localparam int NN = NX * NY;

  // per router and port, the router's input side and output side
  logic [NPORT-1:0] i_valid [NN];
  logic [NPORT-1:0] i_ready [NN];
  flit_t            i_flit  [NN][NPORT];
  logic [NPORT-1:0] o_valid [NN];
  logic [NPORT-1:0] o_ready [NN];
  flit_t            o_flit  [NN][NPORT];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int N = y * NX + x;

      router #(.X(x), .Y(y)) u_router (
        .clk, .rst,
        .in_valid(i_valid[N]), .in_ready(i_ready[N]), .in_flit(i_flit[N]),
        .out_valid(o_valid[N]), .out_ready(o_ready[N]), .out_flit(o_flit[N]),
        .arb_conflict(arb_conflict[N]));

      // local port
      assign i_valid[N][P_LOCAL] = loc_in_valid[N];
      assign i_flit[N][P_LOCAL]  = loc_in_flit[N];
      assign loc_in_ready[N]     = i_ready[N][P_LOCAL];
      assign loc_out_valid[N]    = o_valid[N][P_LOCAL];
      assign loc_out_flit[N]     = o_flit[N][P_LOCAL];
      assign o_ready[N][P_LOCAL] = loc_out_ready[N];

      // east neighbour feeds our east input from its west output, etc.
      if (x < NX-1) begin : g_e
        assign i_valid[N][P_EAST] = o_valid[N+1][P_WEST];
        assign i_flit[N][P_EAST]  = o_flit[N+1][P_WEST];
        assign o_ready[N][P_EAST] = i_ready[N+1][P_WEST];
      end else begin : g_e_edge
        assign i_valid[N][P_EAST] = 1'b0;
        assign i_flit[N][P_EAST]  = '0;
        assign o_ready[N][P_EAST] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign i_valid[N][P_WEST] = o_valid[N-1][P_EAST];
        assign i_flit[N][P_WEST]  = o_flit[N-1][P_EAST];
        assign o_ready[N][P_WEST] = i_ready[N-1][P_EAST];
      end else begin : g_w_edge
        assign i_valid[N][P_WEST] = 1'b0;
        assign i_flit[N][P_WEST]  = '0;
        assign o_ready[N][P_WEST] = 1'b1;
      end
      if (y < NY-1) begin : g_n
        assign i_valid[N][P_NORTH] = o_valid[N+NX][P_SOUTH];
        assign i_flit[N][P_NORTH]  = o_flit[N+NX][P_SOUTH];
        assign o_ready[N][P_NORTH] = i_ready[N+NX][P_SOUTH];
      end else begin : g_n_edge
        assign i_valid[N][P_NORTH] = 1'b0;
        assign i_flit[N][P_NORTH]  = '0;
        assign o_ready[N][P_NORTH] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign i_valid[N][P_SOUTH] = o_valid[N-NX][P_NORTH];
        assign i_flit[N][P_SOUTH]  = o_flit[N-NX][P_NORTH];
        assign o_ready[N][P_SOUTH] = i_ready[N-NX][P_NORTH];
      end else begin : g_s_edge
        assign i_valid[N][P_SOUTH] = 1'b0;
        assign i_flit[N][P_SOUTH]  = '0;
        assign o_ready[N][P_SOUTH] = 1'b1;
      end
    end
  end
endmodule
