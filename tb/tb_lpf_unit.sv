// tb_lpf_unit: programs the unit for f1, f2 and f3 in turn through its
// 21-word register load, streams z values (random, and at and around every
// breakpoint) one per cycle, and checks each output against the mode
// formula and the 4-cycle latency. Every region of every mode must occur.
module tb_lpf_unit;
  import gmm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, cfg_rst, cfg_load, in_valid, out_valid;
  logic [9:0]  cfg_data;
  logic [39:0] z, f;
  lpf_unit dut (.*);

  longint unsigned exp_q[$];
  int lat_q[$];
  int cyc = 0;
  int seen [4][4];   // [mode][region]
  always @(posedge clk) cyc++;

  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || f != 40'(exp_q[0]) || cyc - lat_q[0] != 4) begin
      failures++;
      $display("FAIL f=%0h exp=%0h lat=%0d", f, exp_q.size() ? exp_q[0] : 0,
               cyc - (lat_q.size() ? lat_q[0] : 0));
    end
    if (exp_q.size()) begin void'(exp_q.pop_front()); void'(lat_q.pop_front()); end
  end

  task automatic program_lpf(lpf_t p);
    int q[$];
    lpf_words(p, q);
    @(negedge clk); cfg_rst = 1; @(negedge clk); cfg_rst = 0;
    foreach (q[n]) begin cfg_load = 1; cfg_data = 10'(q[n]); @(negedge clk); end
    cfg_load = 0;
  endtask

  task automatic send(lpf_t p, longint unsigned zv);
    int rg;
    in_valid = 1; z = 40'(zv);
    exp_q.push_back(f_ref(p, zv, rg));
    lat_q.push_back(cyc);
    seen[p.mode][rg]++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    lpf_t p;
    rst = 1; cfg_rst = 0; cfg_load = 0; cfg_data = 0; in_valid = 0; z = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 6; it++) begin
      p = rand_lpf(it % 3 + 1);
      program_lpf(p);
      for (int n = 0; n < 200; n++) begin
        longint unsigned zv;
        case (n % 8)
          0: zv = p.a; 1: zv = p.a - 1; 2: zv = p.b; 3: zv = p.b - 1;
          4: zv = p.c; 5: zv = p.c - 1;
          6: zv = (64'd1 << 40) - 1;
          default: zv = $urandom_range(0, int'(p.c + (p.c >> 2)));
        endcase
        send(p, zv);
        if (n % 5 == 0) @(negedge clk);
      end
      repeat (6) @(negedge clk);
    end
    // regions each mode can produce: f1 {0,3}, f2 {0,1,3}, f3 {0,1,2,3}
    checks++;
    if (!(seen[1][0] && seen[1][3] && seen[2][0] && seen[2][1] && seen[2][3] &&
          seen[3][0] && seen[3][1] && seen[3][2] && seen[3][3])) begin
      failures++; $display("FAIL region not reached");
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("lpf regions f1:%0d/%0d f2:%0d/%0d/%0d f3:%0d/%0d/%0d/%0d", seen[1][0], seen[1][3],
             seen[2][0], seen[2][1], seen[2][3], seen[3][0], seen[3][1], seen[3][2], seen[3][3]);
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
