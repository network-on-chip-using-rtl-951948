// tb_gmm_classifier: loads the LPF registers, the models (Reg-GMM), the
// constants (Reg-K) and patterns (Reg-X) over the 10-bit bus, runs
// classifications with enable and checks every winner against the
// reference model and the run time of 25 * num_m + 12 cycles from enable
// to out_valid. Covers all three LPF modes, 1, 2, 5 and 10 models per
// class, reset followed by a full reload, and patterns that reuse loaded
// parameters.
module tb_gmm_classifier;
  import gmm_pkg::N_CLASS, gmm_pkg::M_MAX;
  import gmm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic reset, load_x, load_gmm, load_k, load_lpf, enable, busy, out_valid;
  logic [9:0] data;
  logic [3:0] num_m;
  logic [4:0] class_out;
  gmm_classifier dut (.*);

  int cyc = 0;
  int regions [4];
  int wins [5];
  always @(posedge clk) cyc++;

  task automatic put(ref logic strobe, input int w);
    strobe = 1; data = 10'(w);
    @(negedge clk);
    strobe = 0;
  endtask

  task automatic run_set(int mode, int nm, int npat);
    model_t mods[$];
    lpf_t p;
    int q[$];
    longint unsigned sc [NC];
    p = rand_lpf(mode);
    reset = 1; @(negedge clk); reset = 0;
    lpf_words(p, q);
    foreach (q[n]) put(load_lpf, q[n]);
    for (int c = 0; c < NC; c++)
      for (int m = 0; m < nm; m++) mods.push_back(rand_model(200 + 150 * c));
    q = {};
    foreach (mods[i]) model_words(mods[i], q);
    foreach (q[n]) put(load_gmm, q[n]);
    foreach (mods[i]) put(load_k, mods[i].k);
    for (int pat = 0; pat < npat; pat++) begin
      int x [D];
      int t0, cc;
      logic [4:0] exp_c;
      cc = $urandom_range(0, NC - 1);
      for (int i = 0; i < D; i++) begin
        x[i] = 200 + 150 * cc + int'($urandom_range(0, 40)) - 20;
        put(load_x, x[i]);
      end
      exp_c = classify(x, mods, nm, p, sc, regions);
      num_m = 4'(nm); enable = 1; t0 = cyc;
      @(negedge clk);
      enable = 0;
      while (!out_valid) @(negedge clk);
      checks++;
      if (class_out != exp_c || cyc - t0 != 25 * nm + 12) begin
        failures++;
        $display("FAIL mode %0d nm %0d: class %b exp %b, %0d cycles", mode, nm, class_out, exp_c, cyc - t0);
      end
      foreach (wins[c]) if (exp_c[c]) wins[c]++;
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after result"); end
    end
  endtask

  initial begin
    reset = 1; load_x = 0; load_gmm = 0; load_k = 0; load_lpf = 0; enable = 0;
    data = 0; num_m = 1;
    repeat (2) @(negedge clk);
    reset = 0;
    run_set(1, 1, 6);
    run_set(2, 2, 6);
    run_set(3, 5, 6);
    run_set(3, M_MAX, 6);
    run_set(2, 10, 4);
    $display("wins per class %0d %0d %0d %0d %0d; f regions %0d %0d %0d %0d",
             wins[0], wins[1], wins[2], wins[3], wins[4], regions[0], regions[1], regions[2], regions[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
