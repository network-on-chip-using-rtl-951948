// reg_x: input pattern register (Reg-X).
//
// Holds the D components of the test pattern x. Each cycle with load high
// writes bus word data into the next component, x_1 first; rst restarts the
// write position (loading more than D words wraps to x_1). The processor
// reads component rd_idx (0-based) combinationally. The design gives the
// register and its load signal; the sequential write order is chosen.
module reg_x #(
  parameter int D = 5,
  parameter int W = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [W-1:0]         data,
  input  logic [$clog2(D)-1:0] rd_idx,
  output logic [W-1:0]         x
);
  logic [W-1:0]         mem [D];
  logic [$clog2(D)-1:0] wptr;

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else if (load) begin
      mem[wptr] <= data;
      wptr      <= (int'(wptr) == D-1) ? '0 : wptr + 1'b1;
    end
  end

  assign x = mem[rd_idx];
endmodule
