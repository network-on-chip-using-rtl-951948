// tb_reg_k: fills all NM entries, reads them back in random order, then
// checks that reset restarts writing at model 0.
module tb_reg_k;
  localparam int NM = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, load;
  logic [9:0] data, k;
  logic [5:0] rd_model;
  reg_k #(.NM(NM), .W(10)) dut (.*);

  int v [NM];
  task automatic readback();
    for (int n = 0; n < 2 * NM; n++) begin
      int m;
      m = (n < NM) ? n : $urandom_range(0, NM - 1);
      rd_model = 6'(m); #1;
      checks++;
      if (k != 10'(v[m])) begin failures++; $display("FAIL k[%0d]=%0d exp %0d", m, k, v[m]); end
    end
  endtask

  initial begin
    rst = 1; load = 0; data = 0; rd_model = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int m = 0; m < NM; m++) begin
      v[m] = $urandom_range(0, 1023); load = 1; data = 10'(v[m]); @(negedge clk);
    end
    load = 0;
    readback();
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int m = 0; m < 3; m++) begin
      v[m] = $urandom_range(0, 1023); load = 1; data = 10'(v[m]); @(negedge clk);
    end
    load = 0;
    readback();
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
