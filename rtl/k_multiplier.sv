// k_multiplier: weights the exponential approximation by the model constant K.
//
// Returns K * f(z) one cycle after its inputs, full width, unsigned. K is
// the per-model constant of the Gaussian (mixing weight times normalisation)
// read from Reg-K. The design names the unit; the register stage is chosen.
module k_multiplier #(
  parameter int F_W = 40,
  parameter int K_W = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [F_W-1:0]     f,
  input  logic [K_W-1:0]     k,
  output logic               out_valid,
  output logic [F_W+K_W-1:0] p
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= f * k;
    end
  end
endmodule
