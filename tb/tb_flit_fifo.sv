// tb_flit_fifo: random pushes and pops against a queue model; checks the
// order of the data, in_ready (not full) and out_valid (not empty), and
// that simultaneous push and pop work when full and when empty.
module tb_flit_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, in_ready, out_valid, out_ready;
  logic [26:0] in_data, out_data;
  flit_fifo #(.W(27), .DEPTH(4)) dut (.*);

  logic [26:0] model[$];
  int nfull = 0;
  initial begin
    rst = 1; in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      in_valid  = ($urandom_range(0, 99) < (n < 1500 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (n < 1500 ? 30 : 70));
      in_data   = 27'($urandom);
      #1;
      checks++;
      if (in_ready != (model.size() < 4) || out_valid != (model.size() > 0) ||
          (model.size() > 0 && out_data != model[0])) begin
        failures++; $display("FAIL n=%0d size=%0d ready=%b valid=%b", n, model.size(), in_ready, out_valid);
      end
      if (model.size() == 4) nfull++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
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
