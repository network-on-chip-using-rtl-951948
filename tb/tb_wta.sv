// tb_wta: sends sets of five class scores, back to back and with gaps,
// including ties and all-zero sets, and checks the one-hot winner (largest
// score, earliest class on a tie, none when all are zero) and that it comes
// 2 cycles after the last score.
module tb_wta;
  localparam int N = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, in_first, out_valid;
  logic [53:0] score;
  logic [N-1:0] class_out;
  wta #(.N(N), .S_W(54)) dut (.*);

  logic [N-1:0] exp_q[$];
  int lat_q[$];
  int cyc = 0, changes = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || class_out != exp_q[0] || cyc - lat_q[0] != 2) begin
      failures++; $display("FAIL out=%b exp=%b", class_out, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) begin void'(exp_q.pop_front()); void'(lat_q.pop_front()); end
  end

  initial begin
    longint unsigned s [N], best;
    logic [N-1:0] win;
    rst = 1; in_valid = 0; in_first = 0; score = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      for (int c = 0; c < N; c++)
        case (n % 5)
          0: s[c] = 0;
          1: s[c] = $urandom_range(0, 3);                // many ties
          default: s[c] = {$urandom, $urandom} & ((64'd1 << 54) - 1);
        endcase
      best = 0; win = '0;
      for (int c = 0; c < N; c++) if (s[c] > best) begin
        if (win != '0) changes++;
        best = s[c]; win = N'(1) << c;
      end
      for (int c = 0; c < N; c++) begin
        in_valid = 1; in_first = (c == 0); score = 54'(s[c]);
        if (c == N - 1) begin exp_q.push_back(win); lat_q.push_back(cyc); end
        @(negedge clk);
        in_valid = 0; score = 54'($urandom);
        if (n % 3 == 2) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || changes == 0) begin failures++; $display("FAIL missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
