// flit_fifo: synchronous first-in first-out buffer with valid/ready ports.
//
// Used for the input and output queues of the router and the queues of the
// network interface. A word is written when in_valid && in_ready and read
// when out_valid && out_ready; in_ready is low when full, out_valid high
// when not empty. Both can happen in the same cycle. The head word is shown
// combinationally on out_data; a written word is readable the next cycle.
// Depth and width are parameters; DEPTH must be a power of two.
module flit_fifo #(
  parameter int W     = 27,
  parameter int DEPTH = 4
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
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         push, pop;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = wptr != rptr;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) begin
        mem[wptr[AW-1:0]] <= in_data;
        wptr <= wptr + 1'b1;
      end
      if (pop) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (wptr - rptr) <= (AW+1)'(DEPTH));
endmodule
