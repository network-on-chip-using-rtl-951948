// tb_k_multiplier: random f and K including the extremes; checks K*f and
// the 1-cycle latency.
module tb_k_multiplier;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, out_valid;
  logic [39:0] f;
  logic [9:0]  k;
  logic [49:0] p;
  k_multiplier #(.F_W(40), .K_W(10)) dut (.*);

  initial begin
    longint unsigned fv, kv;
    rst = 1; in_valid = 0; f = 0; k = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      fv = (n == 0) ? (64'd1 << 40) - 1 : {$urandom, $urandom} & ((64'd1 << 40) - 1);
      kv = (n == 0) ? 1023 : $urandom_range(0, 1023);
      in_valid = 1; f = 40'(fv); k = 10'(kv);
      @(negedge clk);
      in_valid = 0; f = 40'($urandom); k = 10'($urandom);
      checks++;
      if (!out_valid || p != 50'(fv * kv)) begin
        failures++; $display("FAIL f=%0d k=%0d p=%0d", fv, kv, p);
      end
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
