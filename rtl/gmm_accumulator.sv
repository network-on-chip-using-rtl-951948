// gmm_accumulator: run accumulator with saturation.
//
// Sums a run of unsigned values. The run opens with first (the register is
// loaded instead of added to) and closes with last, when the sum is
// presented on sum with out_valid for one cycle. The classifier uses it twice:
// over the D squared components (giving z) and over the M weighted
// exponentials of a class (giving the class score). The sum saturates at the
// largest OUT_W-bit value; used for z this is exact because the LPF unit
// maps every large z to the same output. The design gives the function; the
// first/last framing and saturation are this implementation's choice.
// Timing: the sum of a run is valid the cycle after its last input.
module gmm_accumulator #(
  parameter int IN_W  = 47,
  parameter int OUT_W = 40
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  logic [IN_W-1:0]  din,
  output logic             out_valid,
  output logic [OUT_W-1:0] sum
);
  localparam int W = (IN_W > OUT_W ? IN_W : OUT_W) + 1;
  localparam logic [W-1:0] MAXV = W'({OUT_W{1'b1}});

  logic [OUT_W-1:0] acc_q;
  logic [W-1:0]     base, nxt, sat;

  assign base = first ? '0 : W'(acc_q);
  assign nxt  = base + W'(din);
  assign sat  = (nxt > MAXV) ? MAXV : nxt;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) acc_q <= sat[OUT_W-1:0];
    end
  end

  assign sum = acc_q;
endmodule
