// tb_gmm_node: the classifier node at (0, 0) driven directly with flits as
// the router would deliver them. A client at (3, 3) loads parameters and
// patterns and starts classifications; a client at (1, 2) also starts one.
// Checks that each RESULT flit goes back to the client that sent START,
// carries the node's own coordinates as source and the winner worked out
// by the reference model, and that commands arriving during a
// classification are held back (not lost) until it ends.
module tb_gmm_node;
  import noc_pkg::*;
  import gmm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready, busy;
  flit_t net_tx, net_rx;
  gmm_node #(.X(0), .Y(0)) dut (.*);

  flit_t exp_q[$];
  int held = 0, results = 0;
  always @(posedge clk) if (!rst) begin
    if (net_tx_valid && net_tx_ready) begin
      checks++; results++;
      if (exp_q.size() == 0 || net_tx != exp_q[0]) begin
        failures++; $display("FAIL result %h exp %h", net_tx, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    if (net_rx_valid && !net_rx_ready) held++;
  end

  task automatic send(int cmd, coord_t from);
    net_rx_valid = 1;
    net_rx = '{dst: '{x: 2'd0, y: 2'd0}, src: from, kind: 3'(cmd >> 16), data: 16'(cmd)};
    @(posedge clk);
    while (!net_rx_ready) @(posedge clk);
    @(negedge clk);
    net_rx_valid = 0;
  endtask

  initial begin
    model_t mods[$];
    lpf_t p;
    int q[$], x [D], nm, regions [4];
    longint unsigned sc [NC];
    coord_t host, host2;
    host = '{x: 2'd3, y: 2'd3}; host2 = '{x: 2'd1, y: 2'd2};
    rst = 1; net_rx_valid = 0; net_rx = '0; net_tx_ready = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int set = 0; set < 3; set++) begin
      nm = set + 1;
      p = rand_lpf(set + 1);
      mods = {};
      for (int c = 0; c < NC; c++) for (int m = 0; m < nm; m++) mods.push_back(rand_model(200 + 150 * c));
      q = {};
      setup_cmds(mods, p, q);
      foreach (q[n]) send(q[n], host);
      for (int pat = 0; pat < 5; pat++) begin
        coord_t who;
        logic [4:0] win;
        who = (pat == 4) ? host2 : host;
        rand_pattern($urandom_range(0, NC - 1), x);
        win = classify(x, mods, nm, p, sc, regions);
        exp_q.push_back('{dst: who, src: '{x: 2'd0, y: 2'd0}, kind: K_RESULT, data: 16'(win)});
        q = {};
        pattern_cmds(x, nm, q);
        foreach (q[n]) send(q[n], who);
        net_tx_ready = (pat % 2 == 0);   // sometimes the network is slow to take the result
      end
      repeat (200) @(negedge clk);
      net_tx_ready = 1;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || held == 0 || results != 15) begin
      failures++; $display("FAIL missing %0d, held %0d", exp_q.size(), held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
