// sp_vm_mult: serial-parallel systolic vector x triangular-matrix multiplier.
//
// Computes Y = S^T G for a lower-triangular D x D matrix G with a chain of D
// processing elements P1..PD. Every cycle one component s_i enters serially
// (broadcast to all PEs) together with one aligned row of G in parallel
// (g[p] feeds PE p+1). PE 1 registers s*g[0]; PE p registers the previous
// PE's register plus s*g[p]. The last register is the output y.
//
// Feeding order (as in the computation sequence of the design): rows are fed
// from i = D down to 1, and element g_ij of row i must sit on PE p = j + D - i
// (zeros on the PEs to its left). Then the cycle after row i is fed, y equals
// y_i = sum_k s_k g_ki, so the outputs leave in the order y_D, ..., y_1, one per
// cycle. Because each row leaves zeros on the PEs to its left, consecutive
// vectors stream back to back with no flush: the array is fully pipelined.
// A smaller dimension is handled by loading zero rows and coefficients.
//
// Interface: in_valid qualifies s and g; out_valid/y follow one cycle later.
// Timing: latency 1 cycle, one y per cycle. Widths are parameters; the PE
// structure and the feeding order follow the design, the widths are chosen.
module sp_vm_mult #(
  parameter int D   = 5,
  parameter int S_W = 11,
  parameter int G_W = 10,
  parameter int Y_W = S_W + G_W + $clog2(D)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [S_W-1:0] s,
  input  logic signed [G_W-1:0] g [D],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y
);
  logic signed [Y_W-1:0] pe_q [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < D; p++) pe_q[p] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pe_q[0] <= Y_W'(s) * Y_W'(g[0]);
        for (int p = 1; p < D; p++) pe_q[p] <= pe_q[p-1] + Y_W'(s) * Y_W'(g[p]);
      end
    end
  end

  assign y = pe_q[D-1];
endmodule
