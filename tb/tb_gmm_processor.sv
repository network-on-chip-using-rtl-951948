// tb_gmm_processor: drives the processor the way the control unit and the
// register files do (rows D..1 of every model of every class, each row
// aligned to the processing elements, with its x_i, mu_i and K) for random
// model sets, patterns and all three LPF modes, patterns back to back.
// Checks every z, every class score and every winner against the reference
// model, and that the winner appears 12 cycles after the last row.
module tb_gmm_processor;
  import gmm_pkg::*;
  import gmm_ref_pkg::D, gmm_ref_pkg::model_t, gmm_ref_pkg::lpf_t;
  import gmm_ref_pkg::rand_model, gmm_ref_pkg::rand_lpf, gmm_ref_pkg::lpf_words;
  import gmm_ref_pkg::z_ref, gmm_ref_pkg::classify;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, cfg_rst, lpf_load, z_valid, score_valid, out_valid;
  logic [9:0] data, x_i, mu_i, k_in;
  logic signed [9:0] g_row [D];
  tag_t tag_in;
  logic [Z_W-1:0] z;
  logic [SCORE_W-1:0] score;
  logic [N_CLASS-1:0] class_out;
  gmm_processor dut (.*);

  longint unsigned z_q[$], s_q[$];
  logic [N_CLASS-1:0] c_q[$];
  int lat_q[$];
  int cyc = 0;
  int regions [4];
  always @(posedge clk) cyc++;

  always @(negedge clk) if (!rst) begin
    if (z_valid) begin
      checks++;
      if (z_q.size() == 0 || z != 40'(z_q[0])) begin failures++; $display("FAIL z=%0d exp=%0d", z, z_q[0]); end
      if (z_q.size()) void'(z_q.pop_front());
    end
    if (score_valid) begin
      checks++;
      if (s_q.size() == 0 || score != SCORE_W'(s_q[0])) begin failures++; $display("FAIL score=%0d exp=%0d", score, s_q[0]); end
      if (s_q.size()) void'(s_q.pop_front());
    end
    if (out_valid) begin
      checks++;
      if (c_q.size() == 0 || class_out != c_q[0] || cyc - lat_q[0] != 12) begin
        failures++; $display("FAIL class=%b exp=%b lat=%0d", class_out, c_q[0], cyc - lat_q[0]);
      end
      if (c_q.size()) begin void'(c_q.pop_front()); void'(lat_q.pop_front()); end
    end
  end

  initial begin
    model_t mods[$];
    lpf_t p;
    int x [D];
    int nm;
    longint unsigned sc [N_CLASS];
    rst = 1; cfg_rst = 0; lpf_load = 0; data = 0; tag_in = '0; x_i = 0; mu_i = 0; k_in = 0;
    for (int q = 0; q < D; q++) g_row[q] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int set = 0; set < 6; set++) begin
      int w[$];
      nm = (set == 5) ? M_MAX : set % 3 + 1;
      p = rand_lpf(set % 3 + 1);
      w = {};
      lpf_words(p, w);
      cfg_rst = 1; @(negedge clk); cfg_rst = 0;
      foreach (w[n]) begin lpf_load = 1; data = 10'(w[n]); @(negedge clk); end
      lpf_load = 0;
      mods = {};
      for (int c = 0; c < N_CLASS; c++)
        for (int m = 0; m < nm; m++) mods.push_back(rand_model(200 + 150 * c));
      for (int pat = 0; pat < 8; pat++) begin
        int cc;
        cc = $urandom_range(0, N_CLASS - 1);
        for (int i = 0; i < D; i++) x[i] = 200 + 150 * cc + int'($urandom_range(0, 40)) - 20;
        c_q.push_back(classify(x, mods, nm, p, sc, regions));
        foreach (sc[c]) s_q.push_back(sc[c]);
        for (int c = 0; c < N_CLASS; c++)
          for (int m = 0; m < nm; m++) begin
            z_q.push_back(z_ref(x, mods[c*nm+m]));
            for (int i = D - 1; i >= 0; i--) begin
              tag_in.valid = 1;
              tag_in.row_first = (i == D - 1); tag_in.row_last = (i == 0);
              tag_in.model_first = (m == 0); tag_in.model_last = (m == nm - 1);
              tag_in.class_first = (c == 0);
              x_i = 10'(x[i]); mu_i = 10'(mods[c*nm+m].mu[i]); k_in = 10'(mods[c*nm+m].k);
              for (int q = 0; q < D; q++) g_row[q] = '0;
              for (int j = 0; j <= i; j++) g_row[j + D - 1 - i] = 10'(mods[c*nm+m].g[i][j]);
              if (c == N_CLASS - 1 && m == nm - 1 && i == 0) lat_q.push_back(cyc);
              @(negedge clk);
            end
          end
        tag_in = '0;
        if (pat % 2 == 1) repeat (3) @(negedge clk);
      end
      repeat (15) @(negedge clk);
    end
    checks++;
    if (c_q.size() || s_q.size() || z_q.size()) begin failures++; $display("FAIL results missing"); end
    $display("f regions: one %0d, slope1 %0d, slope2 %0d, zero %0d", regions[0], regions[1], regions[2], regions[3]);
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
