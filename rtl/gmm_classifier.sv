// gmm_classifier: complete GMM classifier with its register files.
//
// Classifies a D-dimensional pattern x into one of N_CLASS classes, each
// modelled by up to M_MAX Gaussians. All parameters and the pattern come in
// over one 10-bit bus (data), steered by four load strobes: load_x (Reg-X,
// D words), load_gmm (Reg-GMM, mu and G, 20 words per model, models in class
// order), load_k (Reg-K, one word per model) and load_lpf (LPF registers
// R1..R6, 21 words). Once loaded, a pulse on enable runs a classification:
// the control unit streams N_CLASS * num_m * D rows through the GMM
// processor and, 12 cycles after the last row, out_valid pulses with the
// winning class one-hot on class_out (5 bits, as the design's OUT). The
// parameters stay loaded, so further patterns need only load_x and enable.
// reset restarts all load positions and the control unit; it does not clear
// the parameter memories. busy is high from enable until out_valid.
// The block structure (Reg-X, Reg-GMM, Reg-K, control unit, GMM processor,
// 10-bit bus with load signals, 5-bit output) follows the design; the load
// order and the handshake are this implementation's choice.
module gmm_classifier
  import gmm_pkg::*;
(
  input  logic                       clk,
  input  logic                       reset,
  input  logic [BUS_W-1:0]           data,
  input  logic                       load_x,
  input  logic                       load_gmm,
  input  logic                       load_k,
  input  logic                       load_lpf,
  input  logic                       enable,
  input  logic [$clog2(M_MAX+1)-1:0] num_m,
  output logic                       busy,
  output logic                       out_valid,
  output logic [N_CLASS-1:0]         class_out
);
  localparam int NM = N_CLASS * M_MAX;

  logic                    run;
  logic [$clog2(NM)-1:0]   model;
  logic [$clog2(D)-1:0]    row;
  tag_t                    tag;
  logic [BUS_W-1:0]        x_i, mu_i, k;
  logic signed [BUS_W-1:0] g_row [D];
  logic                    pending;

  ctrl_unit u_ctrl (
    .clk, .rst(reset), .start(enable && !pending), .num_m,
    .busy(run), .model, .row, .tag);

  reg_x #(.D(D), .W(BUS_W)) u_reg_x (
    .clk, .rst(reset), .load(load_x), .data, .rd_idx(row), .x(x_i));

  reg_gmm #(.D(D), .NM(NM), .W(BUS_W)) u_reg_gmm (
    .clk, .rst(reset), .load(load_gmm), .data,
    .rd_model(model), .rd_row(row), .mu(mu_i), .g(g_row));

  reg_k #(.NM(NM), .W(BUS_W)) u_reg_k (
    .clk, .rst(reset), .load(load_k), .data, .rd_model(model), .k);

  logic               z_valid, score_valid;
  logic [Z_W-1:0]     z;
  logic [SCORE_W-1:0] score;

  gmm_processor u_proc (
    .clk, .rst(reset), .cfg_rst(reset), .lpf_load(load_lpf), .data,
    .tag_in(tag), .x_i, .mu_i, .g_row, .k_in(k),
    .z_valid, .z, .score_valid, .score, .out_valid, .class_out);

  always_ff @(posedge clk) begin
    if (reset) pending <= 1'b0;
    else if (enable && !pending) pending <= 1'b1;
    else if (out_valid) pending <= 1'b0;
  end

  assign busy = pending;

  // Rows are issued only inside a classification that has not yet returned.
  a_run_in_pending: assert property (@(posedge clk) disable iff (reset) run |-> pending);
endmodule
