// router: five-port mesh router (local, north, east, south, west).
//
// Forwards single-flit packets towards their destination. Port 0 is the
// local port: its input is the injection channel from the network
// interface and its output the ejection channel. Every channel passes, in
// the order of the design's generic router diagram, through a link
// controller and a buffer on the way in, then the switch, then a buffer and
// a link controller on the way out. The routing and arbitration unit looks
// at the head flit of every input buffer, picks its output by XY routing
// and grants at most one input per output (round robin) when the output
// buffer has room; the crossbar then moves all granted flits at once.
// Interface: valid/ready per port on both sides, flits as noc_pkg::flit_t.
// Timing: with no contention a flit needs 4 cycles from in_valid to
// out_valid (link controller, input buffer, switch into the output
// buffer, link controller). Buffer depths are parameters (chosen; the
// design gives none). arb_conflict is high in cycles where two inputs
// wanted the same output.
module router
  import noc_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int IN_DEPTH  = 4,
  parameter int OUT_DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NPORT-1:0] in_valid,
  output logic [NPORT-1:0] in_ready,
  input  flit_t            in_flit [NPORT],
  output logic [NPORT-1:0] out_valid,
  input  logic [NPORT-1:0] out_ready,
  output flit_t            out_flit [NPORT],
  output logic             arb_conflict
);
  logic [NPORT-1:0] lci_valid, lci_ready, q_valid, oq_ready, oq_valid, lco_ready;
  flit_t            lci_flit [NPORT];
  flit_t            q_flit   [NPORT];
  flit_t            oq_flit  [NPORT];
  logic [FLIT_W-1:0] sw_in  [NPORT];
  logic [FLIT_W-1:0] sw_out [NPORT];
  logic [NPORT-1:0] sw_valid, pop;
  logic [NPORT-1:0] gnt [NPORT];
  coord_t           head_dst [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    link_ctrl #(.W(FLIT_W)) u_lc_in (
      .clk, .rst, .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_data(in_flit[p]),
      .out_valid(lci_valid[p]), .out_ready(lci_ready[p]), .out_data(lci_flit[p]));

    flit_fifo #(.W(FLIT_W), .DEPTH(IN_DEPTH)) u_in_q (
      .clk, .rst, .in_valid(lci_valid[p]), .in_ready(lci_ready[p]), .in_data(lci_flit[p]),
      .out_valid(q_valid[p]), .out_ready(pop[p]), .out_data(q_flit[p]));

    assign head_dst[p] = q_flit[p].dst;
    assign sw_in[p]    = q_flit[p];
  end

  route_arb #(.X(X), .Y(Y)) u_ra (
    .clk, .rst, .head_valid(q_valid), .head_dst, .out_room(oq_ready),
    .gnt, .pop, .contention(arb_conflict));

  crossbar #(.N(NPORT), .W(FLIT_W)) u_xbar (
    .in_data(sw_in), .sel(gnt), .out_valid(sw_valid), .out_data(sw_out));

  for (genvar p = 0; p < NPORT; p++) begin : g_out
    flit_fifo #(.W(FLIT_W), .DEPTH(OUT_DEPTH)) u_out_q (
      .clk, .rst, .in_valid(sw_valid[p]), .in_ready(oq_ready[p]), .in_data(sw_out[p]),
      .out_valid(oq_valid[p]), .out_ready(lco_ready[p]), .out_data(oq_flit[p]));

    link_ctrl #(.W(FLIT_W)) u_lc_out (
      .clk, .rst, .in_valid(oq_valid[p]), .in_ready(lco_ready[p]), .in_data(oq_flit[p]),
      .out_valid(out_valid[p]), .out_ready(out_ready[p]), .out_data(out_flit[p]));
  end
endmodule
