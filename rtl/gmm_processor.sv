// gmm_processor: the GMM processor pipeline.
//
// For each Gaussian model j of each class k it computes
//   s = x - mu_j,  y = s^T G_j,  z = sum_i y_i^2,  K_j * f(z)
// and for each class the score sum_j K_j f(z_j), where f is the piecewise-
// linear approximation of exp(-z) (here z already holds the 1/2 and any
// scaling folded into G). The winner-takes-all stage then returns the class
// with the largest score as a one-hot code. The order of units follows the
// design: subtractor, serial-parallel vector-matrix multiplier, square unit,
// accumulator over the D components, LPF unit, K multiplier, accumulator
// over the M models of a class, WTA.
//
// Input, one row per cycle (from ctrl_unit and the register files): x_i,
// mu_i, the aligned row i of G_j, K_j and the tag of the row. Rows of a model
// come from i = D down to 1. Everything is streamed with no stalls: each
// unit takes one value per cycle and the tag travels beside the data in a
// delay line, so models and patterns follow each other back to back.
// Timing from a row entering to its results: input register 1, multiplier 1,
// square 1, accumulator 1 (z valid 1 cycle after the model's last row), LPF
// 4, K multiplier 1, accumulator 1 (score), WTA 2: the one-hot class is out
// 12 cycles after the last row of the last class. The input register and
// the tag delay line are this implementation's choice.
module gmm_processor
  import gmm_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               cfg_rst,
  input  logic               lpf_load,
  input  logic [BUS_W-1:0]   data,
  input  tag_t               tag_in,
  input  logic [BUS_W-1:0]   x_i,
  input  logic [BUS_W-1:0]   mu_i,
  input  logic signed [BUS_W-1:0] g_row [D],
  input  logic [BUS_W-1:0]   k_in,
  output logic               z_valid,
  output logic [Z_W-1:0]     z,
  output logic               score_valid,
  output logic [SCORE_W-1:0] score,
  output logic               out_valid,
  output logic [N_CLASS-1:0] class_out
);
  localparam int NDLY = 10;

  // Stage 0: subtractor and input register.
  tag_t                     tag_d [NDLY];
  logic [BUS_W-1:0]         k_d   [NDLY];
  logic signed [S_W-1:0]    s_q;
  logic signed [BUS_W-1:0]  g_q [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NDLY; t++) begin
        tag_d[t] <= '0;
        k_d[t]   <= '0;
      end
      s_q <= '0;
      for (int p = 0; p < D; p++) g_q[p] <= '0;
    end else begin
      tag_d[0] <= tag_in;
      k_d[0]   <= k_in;
      for (int t = 1; t < NDLY; t++) begin
        tag_d[t] <= tag_d[t-1];
        k_d[t]   <= k_d[t-1];
      end
      if (tag_in.valid) begin
        s_q <= S_W'(signed'({1'b0, x_i})) - S_W'(signed'({1'b0, mu_i}));
        g_q <= g_row;
      end
    end
  end

  // Multiplier, square, accumulator over D.
  logic                  y_valid, sq_valid;
  logic signed [Y_W-1:0] y;
  logic [SQ_W-1:0]       sq;

  sp_vm_mult #(.D(D), .S_W(S_W), .G_W(BUS_W), .Y_W(Y_W)) u_mult (
    .clk, .rst, .in_valid(tag_d[0].valid), .s(s_q), .g(g_q),
    .out_valid(y_valid), .y);

  square_unit #(.Y_W(Y_W)) u_sq (
    .clk, .rst, .in_valid(y_valid), .y, .out_valid(sq_valid), .sq);

  gmm_accumulator #(.IN_W(SQ_W), .OUT_W(Z_W)) u_acc_d (
    .clk, .rst, .in_valid(sq_valid), .first(tag_d[2].row_first),
    .last(tag_d[2].row_last), .din(sq), .out_valid(z_valid), .sum(z));

  // Exponential approximation and K weighting.
  logic           f_valid, p_valid;
  logic [Z_W-1:0] f;
  logic [P_W-1:0] pk;

  lpf_unit u_lpf (
    .clk, .rst, .cfg_rst, .cfg_load(lpf_load), .cfg_data(data),
    .in_valid(z_valid), .z, .out_valid(f_valid), .f);

  k_multiplier #(.F_W(Z_W), .K_W(BUS_W)) u_kmul (
    .clk, .rst, .in_valid(f_valid), .f, .k(k_d[7]),
    .out_valid(p_valid), .p(pk));

  // Accumulator over the models of a class, then WTA.
  gmm_accumulator #(.IN_W(P_W), .OUT_W(SCORE_W)) u_acc_m (
    .clk, .rst, .in_valid(p_valid), .first(tag_d[8].model_first),
    .last(tag_d[8].model_last), .din(pk), .out_valid(score_valid), .sum(score));

  wta #(.N(N_CLASS), .S_W(SCORE_W)) u_wta (
    .clk, .rst, .in_valid(score_valid), .in_first(tag_d[9].class_first),
    .score, .out_valid, .class_out);
endmodule
