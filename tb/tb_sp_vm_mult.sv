// tb_sp_vm_mult: streams random vectors s and lower-triangular matrices G
// through the systolic multiplier, rows fed from D down to 1 with each row
// aligned to the processing elements, and checks every output y_j against
// sum_{i>=j} s_i g_ij and the 1-cycle latency. Vectors go back to back and
// also with idle cycles between rows.
module tb_sp_vm_mult;
  localparam int D = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, in_valid, out_valid;
  logic signed [10:0] s;
  logic signed [9:0]  g [D];
  logic signed [23:0] y;

  sp_vm_mult #(.D(D), .S_W(11), .G_W(10)) dut (.*);

  longint exp_q[$];
  int     lat_q[$];
  int     cyc = 0;
  always @(posedge clk) cyc++;

  // check outputs as they appear
  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || y != 24'(exp_q[0]) || cyc - lat_q[0] != 1) begin
      failures++;
      $display("FAIL y=%0d exp=%0d lat=%0d", y, exp_q.size() ? exp_q[0] : -1,
               cyc - (lat_q.size() ? lat_q[0] : 0));
    end
    if (exp_q.size()) begin void'(exp_q.pop_front()); void'(lat_q.pop_front()); end
  end

  task automatic run_vector(bit gaps);
    int sv [D];
    int gm [D][D];
    longint yr;
    for (int i = 0; i < D; i++) begin
      sv[i] = int'($urandom_range(0, 2046)) - 1023;
      for (int j = 0; j < D; j++) gm[i][j] = (j <= i) ? int'($urandom_range(0, 1023)) - 512 : 0;
    end
    for (int i = D-1; i >= 0; i--) begin
      @(negedge clk);
      in_valid = 1;
      s = 11'(sv[i]);
      for (int p = 0; p < D; p++) g[p] = '0;
      for (int j = 0; j <= i; j++) g[j + D - 1 - i] = 10'(gm[i][j]);
      yr = 0;
      for (int k = i; k < D; k++) yr += longint'(sv[k]) * gm[k][i];
      exp_q.push_back(yr);
      lat_q.push_back(cyc);
      if (gaps && ($urandom_range(0, 1) == 1)) begin
        @(negedge clk);
        in_valid = 0;
        s = 11'($urandom);
      end
    end
  endtask

  initial begin
    rst = 1; in_valid = 0; s = '0;
    for (int p = 0; p < D; p++) g[p] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) run_vector(n >= 30);
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
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
