// gmm_node: the GMM classifier as an IP core on the network.
//
// Couples a gmm_classifier to a network interface controller. Other cores
// drive the classifier with messages whose kind selects the operation and
// whose low 10 data bits are the bus word:
//   LOAD_X, LOAD_GMM, LOAD_K, LOAD_LPF  one word into the register file
//   RESET                               restart the load positions
//   START                               classify; data[3:0] = models/class
// and, when the classification ends, the node sends a RESULT message with
// the one-hot winning class in data[4:0] back to the node that sent START.
// A message is taken from the NIC only while no classification is running
// (loads would otherwise change Reg-X under the running pattern) and while
// no result is waiting to be sent, so commands that arrive meanwhile wait
// in the network. The design puts the classifier on the network without
// saying how; this message protocol is this implementation's choice.
// Timing: one command per cycle; a result leaves on the cycle after
// out_valid (or later if the NIC is full).
module gmm_node
  import noc_pkg::*;
  import gmm_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic  clk,
  input  logic  rst,
  output logic  net_tx_valid,
  input  logic  net_tx_ready,
  output flit_t net_tx,
  input  logic  net_rx_valid,
  output logic  net_rx_ready,
  input  flit_t net_rx,
  output logic  busy
);
  logic    tx_valid, tx_ready, rx_valid, rx_ready;
  ip_msg_t tx_msg, rx_msg;

  nic #(.X(X), .Y(Y)) u_nic (
    .clk, .rst,
    .ip_tx_valid(tx_valid), .ip_tx_ready(tx_ready), .ip_tx(tx_msg),
    .ip_rx_valid(rx_valid), .ip_rx_ready(rx_ready), .ip_rx(rx_msg),
    .net_tx_valid, .net_tx_ready, .net_tx, .net_rx_valid, .net_rx_ready, .net_rx);

  logic                       take, cls_busy, out_valid, res_pending, reset_cls;
  logic [N_CLASS-1:0]         class_out;
  coord_t                     requester;
  logic [$clog2(M_MAX+1)-1:0] num_m;

  assign rx_ready  = !cls_busy && !res_pending;
  assign take      = rx_valid && rx_ready;
  assign reset_cls = rst || (take && rx_msg.kind == K_RESET);
  assign num_m     = rx_msg.data[$clog2(M_MAX+1)-1:0];

  gmm_classifier u_cls (
    .clk, .reset(reset_cls), .data(rx_msg.data[BUS_W-1:0]),
    .load_x  (take && rx_msg.kind == K_LOAD_X),
    .load_gmm(take && rx_msg.kind == K_LOAD_GMM),
    .load_k  (take && rx_msg.kind == K_LOAD_K),
    .load_lpf(take && rx_msg.kind == K_LOAD_LPF),
    .enable  (take && rx_msg.kind == K_START),
    .num_m, .busy(cls_busy), .out_valid, .class_out);

  always_ff @(posedge clk) begin
    if (rst) begin
      res_pending <= 1'b0;
      requester   <= '0;
      tx_msg      <= '0;
    end else begin
      if (take && rx_msg.kind == K_START) requester <= rx_msg.peer;
      if (out_valid) begin
        res_pending <= 1'b1;
        tx_msg.peer <= requester;
        tx_msg.kind <= K_RESULT;
        tx_msg.data <= DATA_W'(class_out);
      end else if (tx_valid && tx_ready) res_pending <= 1'b0;
    end
  end

  assign tx_valid = res_pending;
  assign busy     = cls_busy;
endmodule
