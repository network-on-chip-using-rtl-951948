// square_unit: registered square of a signed value.
//
// Takes one component y of the vector-matrix product and returns y^2 as an
// unsigned number one cycle later. The width of the result is 2*Y_W-1 bits,
// enough for the largest magnitude. The design names the unit; the pipeline
// register and widths are this implementation's choice.
module square_unit #(
  parameter int Y_W = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [Y_W-1:0]   y,
  output logic                    out_valid,
  output logic [2*Y_W-2:0]        sq
);
  logic [Y_W-1:0] mag;
  assign mag = y[Y_W-1] ? Y_W'(-y) : Y_W'(y);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sq        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sq <= (2*Y_W-1)'(mag * mag);
    end
  end
endmodule
