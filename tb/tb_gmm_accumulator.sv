// tb_gmm_accumulator: runs of random length (1..10) of random values, with
// idle cycles inside runs; checks each run's sum (saturated to OUT_W bits)
// one cycle after its last value, and that no sum appears otherwise.
module tb_gmm_accumulator;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, first, last, out_valid;
  logic [46:0] din;
  logic [39:0] sum;
  gmm_accumulator #(.IN_W(47), .OUT_W(40)) dut (.*);

  initial begin
    longint unsigned ref_sum, v;
    int len, nsat;
    nsat = 0;
    rst = 1; in_valid = 0; first = 0; last = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 200; r++) begin
      len = $urandom_range(1, 10);
      ref_sum = 0;
      for (int i = 0; i < len; i++) begin
        v = (r % 4 == 0) ? {$urandom, $urandom} & ((64'd1 << 47) - 1)
                         : longint'($urandom_range(0, 1 << 30));
        ref_sum += v;
        in_valid = 1; first = (i == 0); last = (i == len - 1); din = 47'(v);
        @(negedge clk);
        if (i != len - 1) begin
          checks++;
          if (out_valid) begin failures++; $display("FAIL early valid"); end
        end
        if (i != len - 1 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; din = 47'($urandom);
          @(negedge clk);
        end
      end
      in_valid = 0;
      if (ref_sum > (64'd1 << 40) - 1) begin ref_sum = (64'd1 << 40) - 1; nsat++; end
      checks++;
      if (!out_valid || sum != 40'(ref_sum)) begin
        failures++; $display("FAIL run %0d sum=%0d exp=%0d", r, sum, ref_sum);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never tested"); end
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
