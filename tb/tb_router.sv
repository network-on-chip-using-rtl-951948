// tb_router: router at (1, 1). Random flits enter on all five inputs, with
// random destinations, while every output is drained with random ready.
// Checks that each flit leaves on the output its XY route requires (worked
// out here), exactly once, in order per input/output pair; that a lone
// flit takes 4 cycles; and that output contention and back-pressure on an
// input both happened.
module tb_router;
  import noc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, arb_conflict;
  logic [NPORT-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit [NPORT];
  flit_t out_flit [NPORT];
  router #(.X(1), .Y(1)) dut (.*);

  function automatic int want(coord_t d);
    if (int'(d.x) > 1) return 2;
    if (int'(d.x) < 1) return 4;
    if (int'(d.y) > 1) return 1;
    if (int'(d.y) < 1) return 3;
    return 0;
  endfunction

  flit_t exp_q [NPORT][NPORT][$];   // [in][out]
  int sent = 0, recv = 0, conflicts = 0, stalls = 0;
  int seq = 0;

  always @(posedge clk) if (!rst) begin
    for (int o = 0; o < NPORT; o++) if (out_valid[o] && out_ready[o]) begin
      int i;
      i = out_flit[o].data[15:13];   // input number carried in the data
      checks++;
      recv++;
      if (i >= NPORT || exp_q[i][o].size() == 0 || exp_q[i][o][0] != out_flit[o]) begin
        failures++; $display("FAIL output %0d flit %h", o, out_flit[o]);
      end else void'(exp_q[i][o].pop_front());
    end
    if (arb_conflict) conflicts++;
    if (in_valid != 0 && (in_valid & ~in_ready) != 0) stalls++;
  end

  initial begin
    int t0;
    rst = 1; in_valid = 0; out_ready = '1;
    for (int i = 0; i < NPORT; i++) in_flit[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    // a lone flit, local to east
    in_flit[0] = '{dst: '{x: 2'd3, y: 2'd1}, src: '{x: 2'd1, y: 2'd1}, kind: 3'd1, data: 16'h0000};
    exp_q[0][2].push_back(in_flit[0]);
    in_valid[0] = 1; t0 = $time;
    @(negedge clk); in_valid[0] = 0;
    while (!out_valid[2]) @(negedge clk);
    checks++;
    if (($time - t0) / 10 != 4) begin failures++; $display("FAIL lone flit latency %0d", ($time - t0) / 10); end
    @(negedge clk);
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      out_ready = NPORT'($urandom) | NPORT'($urandom);
      for (int i = 0; i < NPORT; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = (n < 2800) && ($urandom_range(0, 1) == 1);
          in_flit[i].dst = coord_t'($urandom);
          in_flit[i].src = coord_t'($urandom);
          in_flit[i].kind = 3'($urandom);
          in_flit[i].data = {3'(i), 13'(seq++)};
        end
      end
      @(posedge clk);
      for (int i = 0; i < NPORT; i++) if (in_valid[i] && in_ready[i]) begin
        exp_q[i][want(in_flit[i].dst)].push_back(in_flit[i]);
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0; out_ready = '1;
    repeat (30) @(negedge clk);
    checks++;
    if (sent + 1 != recv || conflicts == 0 || stalls == 0) begin
      failures++; $display("FAIL sent=%0d recv=%0d conflicts=%0d stalls=%0d", sent, recv, conflicts, stalls);
    end
    $display("router: %0d flits, %0d contention cycles, %0d stalled-input cycles", recv, conflicts, stalls);
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
