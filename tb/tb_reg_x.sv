// tb_reg_x: loads patterns word by word, reads every component back, and
// checks that reset restarts the write position.
module tb_reg_x;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, load;
  logic [9:0] data, x;
  logic [2:0] rd_idx;
  reg_x #(.D(5), .W(10)) dut (.*);

  initial begin
    int v [5];
    rst = 1; load = 0; data = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      if (n % 2 == 1) begin rst = 1; @(negedge clk); rst = 0; end
      for (int i = 0; i < 5; i++) begin
        v[i] = $urandom_range(0, 1023);
        load = 1; data = 10'(v[i]);
        @(negedge clk);
      end
      load = 0;
      for (int i = 0; i < 5; i++) begin
        rd_idx = 3'(i); #1;
        checks++;
        if (x != 10'(v[i])) begin failures++; $display("FAIL x[%0d]=%0d exp %0d", i, x, v[i]); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
