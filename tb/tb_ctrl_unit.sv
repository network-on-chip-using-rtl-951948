// tb_ctrl_unit: for several models-per-class counts (including 0 and more
// than M_MAX, which are clamped to 1 and M_MAX) records every cycle's model,
// row and tag while busy and compares them with the expected walk: classes,
// then models, then rows D-1 down to 0. Also checks the length of a run,
// N_CLASS * num_m * D cycles, and that start is ignored while busy.
module tb_ctrl_unit;
  import gmm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, start, busy;
  logic [3:0] num_m;
  logic [5:0] model;
  logic [2:0] row;
  tag_t tag;
  ctrl_unit dut (.*);

  initial begin
    int nms [6] = '{1, 2, 10, 3, 0, 15};
    rst = 1; start = 0; num_m = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (nms[t]) begin
      int nm, n;
      nm = (nms[t] == 0) ? 1 : (nms[t] > M_MAX ? M_MAX : nms[t]);
      num_m = 4'(nms[t]); start = 1;
      @(negedge clk);
      num_m = 4'(1);   // a second start while busy must be ignored
      n = 0;
      for (int c = 0; c < N_CLASS; c++)
        for (int m = 0; m < nm; m++)
          for (int r = D - 1; r >= 0; r--) begin
            checks++;
            if (!busy || model != 6'(c * nm + m) || row != 3'(r) || !tag.valid ||
                tag.row_first != (r == D - 1) || tag.row_last != (r == 0) ||
                tag.model_first != (m == 0) || tag.model_last != (m == nm - 1) ||
                tag.class_first != (c == 0)) begin
              failures++;
              $display("FAIL nm=%0d c%0d m%0d r%0d: busy=%b model=%0d row=%0d tag=%b",
                       nm, c, m, r, busy, model, row, tag);
            end
            n++;
            @(negedge clk);
            start = 0;
          end
      checks++;
      if (busy || tag.valid) begin failures++; $display("FAIL still busy after %0d cycles", n); end
      repeat (3) @(negedge clk);
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
