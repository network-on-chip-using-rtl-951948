// tb_square_unit: random and extreme signed inputs; checks y^2 and the
// 1-cycle latency.
module tb_square_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, out_valid;
  logic signed [23:0] y;
  logic [46:0] sq;
  square_unit #(.Y_W(24)) dut (.*);

  initial begin
    longint v;
    rst = 1; in_valid = 0; y = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      v = (n == 0) ? -(longint'(1) << 23) : (n == 1) ? (longint'(1) << 23) - 1 :
          longint'($urandom_range(0, 16777215)) - (longint'(1) << 23);
      in_valid = 1; y = 24'(v);
      @(negedge clk);
      in_valid = 0; y = 24'($urandom);
      checks++;
      if (!out_valid || sq != 47'(v * v)) begin
        failures++; $display("FAIL y=%0d sq=%0d", v, sq);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid held"); end
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
