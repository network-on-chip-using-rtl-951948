// nic: network interface controller between an IP core and its router.
//
// Has the two halves the design describes: a bus side facing the IP core
// and a network side facing the router's local port. Sending, the IP core
// hands over a message (destination coordinates, kind, data); the bus side
// queues it and the network side turns it into a flit by adding this node's
// own coordinates as the source. Receiving, the network side takes flits
// from the router's ejection channel, the bus side queues them and shows
// them to the IP core as messages whose peer is the sender. All four
// channels are valid/ready; each direction has a FIFO of DEPTH messages so
// neither side stalls the other for short bursts.
// Timing: a message leaves towards the router one cycle after it is
// accepted, and a flit reaches the IP core one cycle after it arrives.
// The split into two halves follows the design; the message format and the
// queues are this implementation's choice.
module nic
  import noc_pkg::*;
#(
  parameter int X     = 0,
  parameter int Y     = 0,
  parameter int DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst,
  // bus side: IP core
  input  logic    ip_tx_valid,
  output logic    ip_tx_ready,
  input  ip_msg_t ip_tx,
  output logic    ip_rx_valid,
  input  logic    ip_rx_ready,
  output ip_msg_t ip_rx,
  // network side: router local port
  output logic    net_tx_valid,
  input  logic    net_tx_ready,
  output flit_t   net_tx,
  input  logic    net_rx_valid,
  output logic    net_rx_ready,
  input  flit_t   net_rx
);
  localparam int MSG_W = $bits(ip_msg_t);
  localparam coord_t HERE = '{x: CW'(X), y: CW'(Y)};

  logic    txq_valid, rxq_ready;
  ip_msg_t txq_msg, rx_msg_in;

  // bus side queues
  flit_fifo #(.W(MSG_W), .DEPTH(DEPTH)) u_txq (
    .clk, .rst, .in_valid(ip_tx_valid), .in_ready(ip_tx_ready), .in_data(ip_tx),
    .out_valid(txq_valid), .out_ready(net_tx_ready), .out_data(txq_msg));

  flit_fifo #(.W(MSG_W), .DEPTH(DEPTH)) u_rxq (
    .clk, .rst, .in_valid(net_rx_valid), .in_ready(rxq_ready), .in_data(rx_msg_in),
    .out_valid(ip_rx_valid), .out_ready(ip_rx_ready), .out_data(ip_rx));

  // network side: packetise and depacketise
  always_comb begin
    net_tx_valid = txq_valid;
    net_tx.dst   = txq_msg.peer;
    net_tx.src   = HERE;
    net_tx.kind  = txq_msg.kind;
    net_tx.data  = txq_msg.data;
    rx_msg_in.peer = net_rx.src;
    rx_msg_in.kind = net_rx.kind;
    rx_msg_in.data = net_rx.data;
    net_rx_ready   = rxq_ready;
  end
endmodule
