// tb_reg_gmm: loads random models in the packed order (per row: mu_i, then
// g_i1..g_ii) and checks every row read back: mu_i, g_ij on element
// j + D - i (1-based) and zeros on the elements left of it.
module tb_reg_gmm;
  import gmm_ref_pkg::*;
  localparam int NM = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, load;
  logic [9:0] data, mu;
  logic [5:0] rd_model;
  logic [2:0] rd_row;
  logic signed [9:0] g [D];
  reg_gmm #(.D(D), .NM(NM), .W(10)) dut (.*);

  model_t mods [NM];
  initial begin
    int q[$];
    rst = 1; load = 0; data = 0; rd_model = 0; rd_row = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int m = 0; m < NM; m++) begin
      mods[m] = rand_model($urandom_range(20, 1000));
      model_words(mods[m], q);
    end
    foreach (q[n]) begin load = 1; data = 10'(q[n]); @(negedge clk); end
    load = 0;
    for (int m = 0; m < NM; m++)
      for (int i = 0; i < D; i++) begin
        rd_model = 6'(m); rd_row = 3'(i); #1;
        checks++;
        if (mu != 10'(mods[m].mu[i])) begin failures++; $display("FAIL mu m%0d r%0d", m, i); end
        for (int p = 0; p < D; p++) begin
          int j;
          j = p - (D - 1 - i);     // 0-based column held by element p
          checks++;
          if (g[p] != ((j >= 0) ? 10'(mods[m].g[i][j]) : 10'd0)) begin
            failures++; $display("FAIL g m%0d row%0d pe%0d = %0d", m, i, p, g[p]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
