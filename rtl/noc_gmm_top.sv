// noc_gmm_top: network on chip with a GMM image classifier node.
//
// A 4 x 4 mesh of routers (mesh_noc) with one IP core per router. The core
// at node (GMM_X, GMM_Y) is the GMM classifier (gmm_node); every other node
// has a network interface controller whose IP-core side is brought out as
// ports, so any core outside this design can send the classifier its
// parameters and patterns and get class decisions back, or exchange
// messages with any other node. Port arrays are indexed by node number
// n = y * 4 + x; the entries of the classifier's node are unused (ready and
// valid held low). arb_conflict shows, per router, cycles in which two
// inputs competed for one output; gmm_busy is high while a pattern is being
// classified.
// The mesh of routers with attached IP cores follows the design; where the
// classifier sits and what the other cores are is left open there, so the
// other cores stay outside this top.
module noc_gmm_top
  import noc_pkg::*;
#(
  parameter int GMM_X = 0,
  parameter int GMM_Y = 0
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [MESH_X*MESH_Y-1:0]  ip_tx_valid,
  output logic [MESH_X*MESH_Y-1:0]  ip_tx_ready,
  input  ip_msg_t                   ip_tx [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0]  ip_rx_valid,
  input  logic [MESH_X*MESH_Y-1:0]  ip_rx_ready,
  output ip_msg_t                   ip_rx [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0]  arb_conflict,
  output logic                      gmm_busy
);
  localparam int NN   = MESH_X * MESH_Y;
  localparam int GMMN = GMM_Y * MESH_X + GMM_X;

  logic [NN-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t         in_flit  [NN];
  flit_t         out_flit [NN];

  mesh_noc u_mesh (
    .clk, .rst,
    .loc_in_valid(in_valid), .loc_in_ready(in_ready), .loc_in_flit(in_flit),
    .loc_out_valid(out_valid), .loc_out_ready(out_ready), .loc_out_flit(out_flit),
    .arb_conflict);

  for (genvar n = 0; n < NN; n++) begin : g_node
    if (n == GMMN) begin : g_gmm
      gmm_node #(.X(GMM_X), .Y(GMM_Y)) u_gmm (
        .clk, .rst,
        .net_tx_valid(in_valid[n]), .net_tx_ready(in_ready[n]), .net_tx(in_flit[n]),
        .net_rx_valid(out_valid[n]), .net_rx_ready(out_ready[n]), .net_rx(out_flit[n]),
        .busy(gmm_busy));
      assign ip_tx_ready[n] = 1'b0;
      assign ip_rx_valid[n] = 1'b0;
      assign ip_rx[n]       = '0;
    end else begin : g_ip
      nic #(.X(n % MESH_X), .Y(n / MESH_X)) u_nic (
        .clk, .rst,
        .ip_tx_valid(ip_tx_valid[n]), .ip_tx_ready(ip_tx_ready[n]), .ip_tx(ip_tx[n]),
        .ip_rx_valid(ip_rx_valid[n]), .ip_rx_ready(ip_rx_ready[n]), .ip_rx(ip_rx[n]),
        .net_tx_valid(in_valid[n]), .net_tx_ready(in_ready[n]), .net_tx(in_flit[n]),
        .net_rx_valid(out_valid[n]), .net_rx_ready(out_ready[n]), .net_rx(out_flit[n]));
    end
  end
endmodule
