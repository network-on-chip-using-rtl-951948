// wta: winner-takes-all over the class scores of one pattern.
//
// The class scores P(x|Ck)P(Ck) arrive one per enable, class 1 first. Each
// is loaded into R10 and compared with R11, the largest score so far. When
// the new score is larger, R11 takes it over and the class's flip-flop D_k is
// set while the flip-flops of earlier classes are cleared, so at the end
// exactly one D_k is high: the winning class, as a one-hot code. A one-hot
// control word in shift register SR2 (initially 1 at class 1) picks which
// D_k the comparison writes and moves on by one class per enable.
// These parts and their roles follow the design's WTA block diagram.
// Choices made here: the comparison is strict (on a tie the earlier class
// keeps the win, and a pattern whose scores are all zero gives an all-zero
// code, i.e. no class); R10 is loaded in one cycle and compared in the
// next; the first score of a pattern (in_first) restarts SR2 and compares
// against zero instead of R11, so patterns can follow back to back.
// Interface: in_valid/in_first/score in; out_valid pulses for one cycle
// with the one-hot winner on class_out (held until the next result).
// Timing: out_valid comes 2 cycles after the last class's score.
module wta #(
  parameter int N   = 5,
  parameter int S_W = 54
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic [S_W-1:0] score,
  output logic           out_valid,
  output logic [N-1:0]   class_out
);
  logic [S_W-1:0] r10, r11;
  logic [N-1:0]   sr2;       // one-hot class select
  logic [N-1:0]   sel_b;     // select of the score held in R10
  logic           v_b, first_b;
  logic [N-1:0]   d_q;       // D1..DN
  logic           cmp;
  logic [N-1:0]   lower;     // flip-flops of the classes before sel_b

  assign cmp   = r10 > (first_b ? '0 : r11);
  assign lower = sel_b - 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      r10 <= '0; r11 <= '0;
      sr2 <= N'(1);
      sel_b <= '0; v_b <= 1'b0; first_b <= 1'b0;
      d_q <= '0; out_valid <= 1'b0; class_out <= '0;
    end else begin
      // stage A: load R10, step SR2
      v_b <= in_valid;
      if (in_valid) begin
        r10     <= score;
        first_b <= in_first;
        sel_b   <= in_first ? N'(1) : sr2;
        sr2     <= in_first ? N'(2) : {sr2[N-2:0], sr2[N-1]};
      end
      // stage B: compare, update R11 and D1..DN
      out_valid <= 1'b0;
      if (v_b) begin
        logic [N-1:0] d_n;
        d_n = first_b ? '0 : d_q;
        if (cmp) begin
          r11 <= r10;
          d_n = (d_n & ~lower) | sel_b;
        end else begin
          if (first_b) r11 <= '0;
          d_n = d_n & ~sel_b;
        end
        d_q <= d_n;
        if (sel_b[N-1]) begin
          out_valid <= 1'b1;
          class_out <= d_n;
        end
      end
    end
  end
endmodule
