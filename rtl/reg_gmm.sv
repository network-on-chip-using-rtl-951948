// reg_gmm: Gaussian model parameter register file (Reg-GMM).
//
// Holds, for each of NM Gaussian models, the mean vector mu and the lower-
// triangular D x D matrix G. It is organised by rows so that one read gives
// what the vector-matrix multiplier needs in one cycle: mu_i and the whole
// row i of G, already aligned to the processing elements (g_ij on element
// j + D - i, zeros on the elements to its left; see sp_vm_mult).
// Loading over the W-bit bus, one word per cycle with load high, per model
// and per row i = 1..D: mu_i, then g_i1 .. g_ii (i+1 words; D(D+3)/2 = 20
// words per model for D = 5). Models follow each other in class order. rst
// restarts the write position. Read address: model index and row index
// (0-based), combinational. The design gives the register, the parameters it
// holds and their parallel output to the multiplier; the load order and the
// triangular packing are chosen here.
module reg_gmm #(
  parameter int D  = 5,
  parameter int NM = 50,
  parameter int W  = 10
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        load,
  input  logic [W-1:0]                data,
  input  logic [$clog2(NM)-1:0]       rd_model,
  input  logic [$clog2(D)-1:0]        rd_row,
  output logic [W-1:0]                mu,
  output logic signed [W-1:0]         g [D]
);
  localparam int AW = $clog2(NM * D);

  logic [W-1:0]   mu_mem [NM*D];
  logic [D*W-1:0] g_mem  [NM*D];

  logic [$clog2(NM)-1:0] wm;     // model being written
  logic [$clog2(D)-1:0]  wr;     // row i-1
  logic [$clog2(D+1)-1:0] ww;    // word in row: 0 = mu, j = g_ij
  logic [AW-1:0] waddr, raddr;

  assign waddr = AW'(wm) * AW'(D) + AW'(wr);
  assign raddr = AW'(rd_model) * AW'(D) + AW'(rd_row);

  always_ff @(posedge clk) begin
    if (rst) begin
      wm <= '0; wr <= '0; ww <= '0;
    end else if (load) begin
      if (ww == 0) begin
        mu_mem[waddr] <= data;
        g_mem[waddr]  <= '0;
      end else begin
        // g_ij (j = ww) sits on element j + D - i - 1 (0-based), i = wr + 1
        g_mem[waddr][(int'(ww) + D - int'(wr) - 2) * W +: W] <= data;
      end
      if (int'(ww) == int'(wr) + 1) begin
        ww <= '0;
        if (int'(wr) == D-1) begin
          wr <= '0;
          wm <= (int'(wm) == NM-1) ? '0 : wm + 1'b1;
        end else wr <= wr + 1'b1;
      end else ww <= ww + 1'b1;
    end
  end

  assign mu = mu_mem[raddr];
  always_comb
    for (int p = 0; p < D; p++) g[p] = g_mem[raddr][p*W +: W];
endmodule
