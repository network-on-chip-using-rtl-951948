// lpf_unit: linear piecewise approximation of exp(-z).
//
// Replaces the exponential of the Gaussian by a piecewise-linear function of
// z that needs only comparators, one subtractor and a shifter. The same
// datapath realises three approximations; which one is chosen only by what
// is written into registers R1..R6:
//   f1: 1 for z < a, else 0                      R1=R2=a
//   f2: 1 for z < a, b-z for a<=z<b, else 0      R1=R3=a, R2=R5=b
//   f3: 1 for z < a, 2^(n-m)(b-z) for a<=z<b,
//       c-z for b<=z<c, else 0                   R1=a, R3=R4=b, R2=R5=c, R6=n-m
// Datapath, per the design's block diagram: z enters input register R7 and
// moves through R8 and R9. Comparator C1 (z < R1) sets the output register
// SR1, C2 (z >= R2) resets it, C3 (z >= R3) selects the subtractor's minuend
// (R5 when high, R4 when low) and the shift (0 when high, R6 when low); SR1
// then loads (minuend - z) shifted left. "1" is SR1 set, i.e. all ones,
// which is the full-scale value of the Z_W-bit output. A shifted result that
// overflows saturates at all ones, a negative difference gives 0 (neither
// happens with breakpoints ordered a <= b <= c). C1, C2 and C3 look at z in
// R7, R8 and R9 respectively, so the unit is a 4-stage pipeline with one
// result per cycle; this staging, the all-ones "1" and the shift in one step
// are this implementation's reading of the diagram.
//
// Configuration: with cfg_load high, cfg_data words are written in order
// R1..R5 (four 10-bit words each, least significant first) then R6 (one
// word): 21 words. cfg_rst restarts the word count.
// Timing: out_valid/f follow in_valid/z by 4 cycles.
module lpf_unit
  import gmm_pkg::*;
#(
  parameter int ZW = Z_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cfg_rst,
  input  logic              cfg_load,
  input  logic [BUS_W-1:0]  cfg_data,
  input  logic              in_valid,
  input  logic [ZW-1:0]     z,
  output logic              out_valid,
  output logic [ZW-1:0]     f
);
  localparam int WPR   = (ZW + BUS_W - 1) / BUS_W;   // bus words per register
  localparam int NWORD = 5 * WPR + 1;

  logic [ZW-1:0]      r [1:5];
  logic [SHIFT_W-1:0] r6;
  logic [$clog2(NWORD+1)-1:0] widx;

  // Parameter registers R1..R6, written word by word over the bus.
  always_ff @(posedge clk) begin
    if (rst || cfg_rst) begin
      widx <= '0;
    end else if (cfg_load && int'(widx) < NWORD) begin
      widx <= widx + 1'b1;
      if (int'(widx) == NWORD - 1) r6 <= cfg_data[SHIFT_W-1:0];
      else begin
        for (int k = 1; k <= 5; k++)
          for (int w = 0; w < WPR; w++)
            if (int'(widx) == (k-1)*WPR + w)
              for (int b = 0; b < BUS_W; b++)
                if (w*BUS_W + b < ZW) r[k][w*BUS_W + b] <= cfg_data[b];
      end
    end
  end

  // Pipeline R7 -> R8 -> R9 -> SR1 with the comparator flags.
  logic [ZW-1:0] r7, r8, r9, sr1;
  logic          v7, v8, v9, v_out;
  logic          c1_8, c1_9, c2_9;

  logic          c3;
  logic [ZW-1:0] minuend, diff;
  logic [SHIFT_W-1:0] sh;
  logic [ZW+63:0] shifted;
  logic [ZW-1:0]  lin;

  always_comb begin
    c3      = (r9 >= r[3]);
    minuend = c3 ? r[5] : r[4];
    sh      = c3 ? '0 : r6;
    diff    = (minuend > r9) ? minuend - r9 : '0;
    shifted = (ZW+64)'(diff) << sh;
    lin     = (shifted[ZW+63:ZW] != '0) ? '1 : shifted[ZW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {v7, v8, v9, v_out} <= '0;
      {r7, r8, r9, sr1}   <= '0;
      {c1_8, c1_9, c2_9}  <= '0;
    end else begin
      v7 <= in_valid;
      v8 <= v7;
      v9 <= v8;
      v_out <= v9;
      if (in_valid) r7 <= z;
      if (v7) begin
        r8   <= r7;
        c1_8 <= (r7 < r[1]);
      end
      if (v8) begin
        r9   <= r8;
        c1_9 <= c1_8;
        c2_9 <= (r8 >= r[2]);
      end
      if (v9) begin
        if (c1_9)      sr1 <= '1;   // set
        else if (c2_9) sr1 <= '0;   // reset
        else           sr1 <= lin;  // load (minuend - z) << shift
      end
    end
  end

  assign out_valid = v_out;
  assign f         = sr1;
endmodule
