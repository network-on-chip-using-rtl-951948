// tb_gas_workload: the classifier at the size of a gas-identification task,
// ten Gaussian models (two per class) and five classes, classifying 100 test
// patterns in a row. The models, LPF breakpoints (shape f3) and patterns are
// random but drawn so that the classes are separable; every winner is
// compared with the reference model. The testbench also measures the time
// for all 100 patterns, from the first Reg-X word to the last result,
// including the 5 bus cycles that load each pattern, and checks it against
// 100 * (5 + 25 * 2 + 12) = 6700 cycles: 5 load cycles per pattern, then
// 25 * num_m + 12 from enable to the result.
// The sensor dimension of such a task is not given, so the full D = 5 is
// used. Runs gmm_classifier at its default parameters.
module tb_gas_workload;
  import gmm_ref_pkg::*;
  localparam int NM = 2, NPAT = 100;
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
  always @(posedge clk) cyc++;

  task automatic put(ref logic strobe, input int w);
    strobe = 1; data = 10'(w);
    @(negedge clk);
    strobe = 0;
  endtask

  initial begin
    model_t mods[$];
    lpf_t p;
    int q[$];
    longint unsigned sc [NC];
    int t_start, correct;
    reset = 1; load_x = 0; load_gmm = 0; load_k = 0; load_lpf = 0; enable = 0;
    data = 0; num_m = 4'(NM);
    repeat (2) @(negedge clk);
    reset = 0;
    p = rand_lpf(3);
    lpf_words(p, q);
    foreach (q[n]) put(load_lpf, q[n]);
    for (int c = 0; c < NC; c++)
      for (int m = 0; m < NM; m++) mods.push_back(rand_model(200 + 150 * c));
    q = {};
    foreach (mods[i]) model_words(mods[i], q);
    foreach (q[n]) put(load_gmm, q[n]);
    foreach (mods[i]) put(load_k, mods[i].k);
    t_start = cyc;
    correct = 0;
    for (int pat = 0; pat < NPAT; pat++) begin
      int x [D];
      int cc;
      logic [4:0] exp_c;
      cc = $urandom_range(0, NC - 1);
      rand_pattern(cc, x);
      for (int i = 0; i < D; i++) put(load_x, x[i]);
      exp_c = classify(x, mods, NM, p, sc, regions);
      enable = 1;
      @(negedge clk);
      enable = 0;
      while (!out_valid) @(negedge clk);
      checks++;
      if (class_out != exp_c) begin
        failures++;
        $display("FAIL pattern %0d: class %b exp %b", pat, class_out, exp_c);
      end
      if (class_out == 5'(1 << cc)) correct++;
    end
    checks++;
    if (cyc - t_start > NPAT * (5 + 25 * NM + 12)) begin
      failures++;
      $display("FAIL %0d patterns took %0d cycles", NPAT, cyc - t_start);
    end
    $display("%0d patterns in %0d cycles; %0d assigned to the class they were drawn from",
             NPAT, cyc - t_start, correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
