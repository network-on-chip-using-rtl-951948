// tb_noc_gmm_top: end-to-end test of the whole design at its default size.
// The core at node 15 (3, 3) loads the classifier at node 0 across the 4 x 4
// network (LPF registers, every Gaussian model, the K constants), then sends
// patterns and START commands and receives the RESULT messages; the core at
// node 6 (2, 1) classifies patterns too. Meanwhile the other cores send one
// another random messages. Three parameter sets are used: LPF mode f1 with
// 1 model per class, f2 with 3 and f3 with 10 (the full capacity). Checks:
// every result equals the reference model's winner and reaches the core
// that asked; every background message arrives once, unchanged, in order.
// Counts, from inside the design, how often each mechanism occurred and
// fails if one never did: network contention, NIC back-pressure, commands
// held while the classifier is busy, each LPF case (set to one, reset to
// zero, first slope shifted by R6, plain slope), a WTA winner replaced by a
// later class, and a class score summed over several models.
module tb_noc_gmm_top;
  import noc_pkg::*;
  import gmm_ref_pkg::*;
  localparam int NN = MESH_X * MESH_Y;
  localparam int HOST = 15, HOST2 = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, gmm_busy;
  logic [NN-1:0] ip_tx_valid, ip_tx_ready, ip_rx_valid, ip_rx_ready, arb_conflict;
  ip_msg_t ip_tx [NN];
  ip_msg_t ip_rx [NN];
  noc_gmm_top dut (.*);

  // mechanism counters
  int n_conflict = 0, n_backpressure = 0, n_held = 0, n_set = 0, n_reset = 0;
  int n_shifted = 0, n_slope = 0, n_replace = 0, n_multi = 0;
  always @(posedge clk) if (!rst) begin
    if (arb_conflict != 0) n_conflict++;
    if ((ip_tx_valid & ~ip_tx_ready) != 0) n_backpressure++;
    if (dut.g_node[0].g_gmm.u_gmm.rx_valid && !dut.g_node[0].g_gmm.u_gmm.rx_ready) n_held++;
    if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_lpf.v9) begin
      if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_lpf.c1_9) n_set++;
      else if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_lpf.c2_9) n_reset++;
      else if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_lpf.sh != 0) n_shifted++;
      else n_slope++;
    end
    if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_wta.v_b &&
        !dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_wta.first_b &&
        dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_wta.cmp &&
        dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.u_wta.d_q != 0) n_replace++;
    if (dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.p_valid &&
        !dut.g_node[0].g_gmm.u_gmm.u_cls.u_proc.tag_d[8].model_first) n_multi++;
  end

  // receivers: results at the two clients, background elsewhere
  ip_msg_t res_q [NN][$];
  ip_msg_t bg_q [NN][NN][$];
  int bg_sent = 0, bg_recv = 0, n_results = 0;
  always @(posedge clk) if (!rst) begin
    for (int d = 1; d < NN; d++) if (ip_rx_valid[d] && ip_rx_ready[d]) begin
      checks++;
      if (d == HOST || d == HOST2) begin
        n_results++;
        if (res_q[d].size() == 0 || ip_rx[d] != res_q[d][0]) begin
          failures++; $display("FAIL node %0d result %h exp %h", d, ip_rx[d], res_q[d].size() ? res_q[d][0] : '0);
        end
        if (res_q[d].size()) void'(res_q[d].pop_front());
      end else begin
        int s;
        s = int'(ip_rx[d].peer.y) * MESH_X + int'(ip_rx[d].peer.x);
        bg_recv++;
        if (bg_q[s][d].size() == 0 || ip_rx[d].kind != bg_q[s][d][0].kind ||
            ip_rx[d].data != bg_q[s][d][0].data) begin
          failures++; $display("FAIL background %0d->%0d", s, d);
        end else void'(bg_q[s][d].pop_front());
      end
    end
  end

  // background traffic among nodes 1..14 other than HOST2
  bit bg_on = 0;
  function automatic bit is_bg(int n);
    return n != 0 && n != HOST && n != HOST2;
  endfunction
  always @(negedge clk) begin
    for (int s = 0; s < NN; s++) if (is_bg(s)) begin
      if (!ip_tx_valid[s] || ip_tx_ready[s]) begin
        int d;
        do d = $urandom_range(1, NN - 1); while (!is_bg(d));
        ip_tx_valid[s] = bg_on && ($urandom_range(0, 3) == 0);
        ip_tx[s] = '{peer: '{x: CW'(d % MESH_X), y: CW'(d / MESH_X)}, kind: 3'($urandom), data: 16'($urandom)};
      end
      ip_rx_ready[s] = ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge clk) if (!rst)
    for (int s = 0; s < NN; s++) if (is_bg(s) && ip_tx_valid[s] && ip_tx_ready[s]) begin
      bg_q[s][int'(ip_tx[s].peer.y) * MESH_X + int'(ip_tx[s].peer.x)].push_back(
        '{peer: '{x: CW'(s % MESH_X), y: CW'(s / MESH_X)}, kind: ip_tx[s].kind, data: ip_tx[s].data});
      bg_sent++;
    end

  // a client sends one command to the classifier node
  task automatic send(int node, int cmd);
    ip_tx_valid[node] = 1;
    ip_tx[node] = '{peer: '{x: 2'd0, y: 2'd0}, kind: 3'(cmd >> 16), data: 16'(cmd)};
    @(posedge clk);
    while (!ip_tx_ready[node]) @(posedge clk);
    @(negedge clk);
    ip_tx_valid[node] = 0;
  endtask

  initial begin
    model_t mods[$];
    lpf_t p;
    int q[$], x [D], regions [4];
    longint unsigned sc [NC];
    int modes [3] = '{1, 2, 3};
    int nms [3]   = '{1, 3, 10};
    rst = 1;
    ip_tx_valid = '0; ip_rx_ready = '0;
    for (int n = 0; n < NN; n++) ip_tx[n] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    ip_rx_ready[HOST] = 1; ip_rx_ready[HOST2] = 1;
    bg_on = 1;
    for (int set = 0; set < 3; set++) begin
      int nm;
      nm = nms[set];
      p = rand_lpf(modes[set]);
      mods = {};
      for (int c = 0; c < NC; c++) for (int m = 0; m < nm; m++) mods.push_back(rand_model(200 + 150 * c));
      q = {};
      setup_cmds(mods, p, q);
      foreach (q[n]) send(HOST, q[n]);
      for (int pat = 0; pat < 6; pat++) begin
        int who;
        logic [4:0] win;
        who = (pat % 3 == 2) ? HOST2 : HOST;
        rand_pattern($urandom_range(0, NC - 1), x);
        win = classify(x, mods, nm, p, sc, regions);
        res_q[who].push_back('{peer: '{x: 2'd0, y: 2'd0}, kind: K_RESULT, data: 16'(win)});
        q = {};
        pattern_cmds(x, nm, q);
        foreach (q[n]) send(who, q[n]);
        // before another client takes over, wait for this result so the two
        // clients' commands never mix; the same client sends its next
        // pattern at once, and the node must hold it until the run ends
        if (pat % 3 != 0) while (res_q[who].size() != 0) @(negedge clk);
      end
    end
    bg_on = 0;
    repeat (300) @(negedge clk);
    checks++;
    if (n_results != 18 || bg_sent != bg_recv || bg_sent == 0) begin
      failures++; $display("FAIL results %0d, background sent %0d received %0d", n_results, bg_sent, bg_recv);
    end
    $display("mechanisms: contention %0d, back-pressure %0d, held %0d, lpf set %0d reset %0d shifted %0d slope %0d, wta replace %0d, multi-model %0d",
             n_conflict, n_backpressure, n_held, n_set, n_reset, n_shifted, n_slope, n_replace, n_multi);
    checks++;
    if (n_conflict == 0 || n_backpressure == 0 || n_held == 0 || n_set == 0 || n_reset == 0 ||
        n_shifted == 0 || n_slope == 0 || n_replace == 0 || n_multi == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
