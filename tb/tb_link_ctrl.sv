// tb_link_ctrl: sends a numbered stream through the link controller under
// random valid and ready patterns and checks that every word arrives once
// and in order; with the receiver always ready it checks the full rate
// (one word per cycle) and the 1-cycle latency; it checks that a stall of
// the receiver parks a word in the skid register.
module tb_link_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, in_valid, in_ready, out_valid, out_ready;
  logic [26:0] in_data, out_data;
  link_ctrl #(.W(27)) dut (.*);

  int sent = 0, recv = 0, skids = 0;
  int phase = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != 27'(recv)) begin failures++; $display("FAIL got %0d exp %0d", out_data, recv); end
      recv++;
    end
    if (dut.skid_valid) skids++;
  end

  initial begin
    rst = 1; in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // full rate: 100 words in 101 cycles
    out_ready = 1;
    for (int n = 0; n < 100; n++) begin
      in_valid = 1; in_data = 27'(sent);
      @(posedge clk); if (in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (sent != 100 || recv != 100) begin failures++; $display("FAIL rate sent=%0d recv=%0d", sent, recv); end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      in_valid = ($urandom_range(0, 3) != 0); in_data = 27'(sent);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk); if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (sent != recv || skids == 0) begin failures++; $display("FAIL sent=%0d recv=%0d skids=%0d", sent, recv, skids); end
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
