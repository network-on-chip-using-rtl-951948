// link_ctrl: link controller at one end of a router channel.
//
// Registers a channel in both directions of its flow control: data and
// valid go forward through a register, and the ready seen by the sender is
// itself a register, so no combinational path crosses the link. It is a
// two-entry skid buffer: it accepts a word every cycle while the receiver
// takes one every cycle, and when the receiver stalls, the word already in
// flight is parked in the skid register instead of being lost.
// Interface: valid/ready on both sides. Timing: 1 cycle latency, full rate.
// The design shows a link controller on every router channel without
// describing it; the skid-buffer form is this implementation's choice.
module link_ctrl #(
  parameter int W = 27
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic [W-1:0] skid;
  logic         skid_valid;
  logic         accept;

  assign in_ready = !skid_valid;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      skid_valid <= 1'b0;
    end else if (!out_valid || out_ready) begin
      // output register free: refill from the skid register, else the input
      if (skid_valid) begin
        out_data   <= skid;
        out_valid  <= 1'b1;
        skid_valid <= 1'b0;
      end else begin
        out_valid <= accept;
        if (accept) out_data <= in_data;
      end
    end else if (accept) begin
      // receiver stalled: park the word in flight
      skid       <= in_data;
      skid_valid <= 1'b1;
    end
  end
endmodule
