// tb_image_workload: segments a 256 x 256 colour image into five classes,
// one pixel at a time, with the classifier at its default parameters.
// Each pixel is a pattern of dimension 3 (red, green, blue, 8 bits each);
// the unused components 4 and 5 of the D = 5 datapath are loaded as zero and
// the models' rows 4 and 5 of G are zero. The image is generated here: four
// quadrants and a central disc, each filled with its own colour plus
// uniform noise of +-24 per channel. Each class has two Gaussian models
// near its colour, and the LPF uses shape f3. Every pixel's winner is
// compared with the reference model; the run time for the image is checked
// against 65536 * (5 + 25 * 2 + 12) cycles (5 Reg-X words per pixel, then
// 25 * num_m + 12 from enable to result), and the share of pixels assigned
// to the region they were drawn from is printed.
module tb_image_workload;
  import gmm_ref_pkg::*;
  localparam int NM = 2, W = 256;
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

  // Class colours (R, G, B).
  int colour [NC][3] = '{'{200, 40, 40}, '{40, 200, 40}, '{40, 40, 200},
                         '{200, 200, 40}, '{128, 128, 128}};

  task automatic put(ref logic strobe, input int w);
    strobe = 1; data = 10'(w);
    @(negedge clk);
    strobe = 0;
  endtask

  function automatic int region_of(int r, int c);
    int dr = r - W / 2, dc = c - W / 2;
    if (dr * dr + dc * dc < 48 * 48) return 4;
    return (r < W / 2 ? 0 : 2) + (c < W / 2 ? 0 : 1);
  endfunction

  initial begin
    model_t mods[$];
    lpf_t p;
    int q[$];
    longint unsigned sc [NC];
    int t_start, correct, per_class [NC];
    reset = 1; load_x = 0; load_gmm = 0; load_k = 0; load_lpf = 0; enable = 0;
    data = 0; num_m = 4'(NM);
    repeat (2) @(negedge clk);
    reset = 0;
    p.mode = 3; p.a = 64'd1 << 14; p.b = p.a + (64'd1 << 17);
    p.c = p.b + (64'd1 << 19); p.sh = 10;
    lpf_words(p, q);
    foreach (q[n]) put(load_lpf, q[n]);
    for (int c = 0; c < NC; c++)
      for (int m = 0; m < NM; m++) begin
        model_t md;
        for (int i = 0; i < D; i++)
          for (int j = 0; j < D; j++) md.g[i][j] = 0;
        for (int i = 0; i < D; i++) md.mu[i] = 0;
        for (int i = 0; i < 3; i++) begin
          md.mu[i] = colour[c][i] + int'($urandom_range(0, 16)) - 8;
          md.g[i][i] = int'($urandom_range(2, 3));
          for (int j = 0; j < i; j++) md.g[i][j] = int'($urandom_range(0, 2)) - 1;
        end
        md.k = int'($urandom_range(512, 1023));
        mods.push_back(md);
      end
    q = {};
    foreach (mods[i]) model_words(mods[i], q);
    foreach (q[n]) put(load_gmm, q[n]);
    foreach (mods[i]) put(load_k, mods[i].k);
    t_start = cyc;
    correct = 0;
    foreach (per_class[c]) per_class[c] = 0;
    for (int r = 0; r < W; r++)
      for (int c = 0; c < W; c++) begin
        int x [D];
        int reg_c;
        logic [4:0] exp_c;
        reg_c = region_of(r, c);
        for (int i = 0; i < D; i++) begin
          x[i] = 0;
          if (i < 3) begin
            x[i] = colour[reg_c][i] + int'($urandom_range(0, 48)) - 24;
            if (x[i] < 0) x[i] = 0;
            if (x[i] > 255) x[i] = 255;
          end
          put(load_x, x[i]);
        end
        exp_c = classify(x, mods, NM, p, sc, regions);
        enable = 1;
        @(negedge clk);
        enable = 0;
        while (!out_valid) @(negedge clk);
        checks++;
        if (class_out != exp_c) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d): class %b exp %b", r, c, class_out, exp_c);
        end
        if (class_out == 5'(1 << reg_c)) correct++;
        foreach (per_class[k]) if (class_out[k]) per_class[k]++;
      end
    checks++;
    if (cyc - t_start != W * W * (5 + 25 * NM + 12)) begin
      failures++;
      $display("FAIL image took %0d cycles", cyc - t_start);
    end
    $display("%0d pixels in %0d cycles; %0d in their own region; pixels per class %0d %0d %0d %0d %0d",
             W * W, cyc - t_start, correct, per_class[0], per_class[1], per_class[2],
             per_class[3], per_class[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
