// tb_mesh_noc: 4 x 4 mesh. First sends single flits through idle networks
// and checks the latency of 4 * (hops + 1) cycles; then every node injects
// random flits to random nodes while every node drains with random ready.
// Each flit must come out at its destination node, once, with its source
// intact, and in order for each source/destination pair. Contention must
// occur somewhere.
module tb_mesh_noc;
  import noc_pkg::*;
  localparam int NN = MESH_X * MESH_Y;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst;
  logic [NN-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready, arb_conflict;
  flit_t loc_in_flit [NN];
  flit_t loc_out_flit [NN];
  mesh_noc dut (.*);

  flit_t exp_q [NN][NN][$];   // [src][dst]
  int sent = 0, recv = 0, conflicts = 0, seq = 0;

  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < NN; d++) if (loc_out_valid[d] && loc_out_ready[d]) begin
      int s;
      s = int'(loc_out_flit[d].src.y) * MESH_X + int'(loc_out_flit[d].src.x);
      checks++; recv++;
      if (int'(loc_out_flit[d].dst.y) * MESH_X + int'(loc_out_flit[d].dst.x) != d ||
          exp_q[s][d].size() == 0 || exp_q[s][d][0] != loc_out_flit[d]) begin
        failures++; $display("FAIL node %0d got %h", d, loc_out_flit[d]);
      end else void'(exp_q[s][d].pop_front());
    end
    if (arb_conflict != 0) conflicts++;
  end

  function automatic flit_t mk(int s, int d);
    flit_t f;
    f.src = '{x: CW'(s % MESH_X), y: CW'(s / MESH_X)};
    f.dst = '{x: CW'(d % MESH_X), y: CW'(d / MESH_X)};
    f.kind = 3'($urandom);
    f.data = 16'(seq++);
    return f;
  endfunction

  initial begin
    int pairs [4][2] = '{'{0, 15}, '{15, 0}, '{5, 6}, '{3, 12}};
    rst = 1; loc_in_valid = 0; loc_out_ready = '1;
    for (int n = 0; n < NN; n++) loc_in_flit[n] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (pairs[p]) begin
      int s, d, hops, t0;
      s = pairs[p][0]; d = pairs[p][1];
      hops = (s % 4 > d % 4 ? s % 4 - d % 4 : d % 4 - s % 4) + (s / 4 > d / 4 ? s / 4 - d / 4 : d / 4 - s / 4);
      loc_in_flit[s] = mk(s, d); exp_q[s][d].push_back(loc_in_flit[s]);
      loc_in_valid[s] = 1; t0 = $time; sent++;
      @(negedge clk); loc_in_valid[s] = 0;
      while (!loc_out_valid[d]) @(negedge clk);
      checks++;
      if (($time - t0) / 10 != 4 * (hops + 1)) begin
        failures++; $display("FAIL %0d->%0d took %0d cycles", s, d, ($time - t0) / 10);
      end
      repeat (2) @(negedge clk);
    end
    for (int n = 0; n < 1500; n++) begin
      loc_out_ready = NN'($urandom) | NN'($urandom) | NN'($urandom);
      for (int s = 0; s < NN; s++)
        if (!loc_in_valid[s] || loc_in_ready[s]) begin
          loc_in_valid[s] = (n < 1300) && ($urandom_range(0, 2) == 0);
          loc_in_flit[s] = mk(s, $urandom_range(0, NN - 1));
        end
      @(posedge clk);
      for (int s = 0; s < NN; s++) if (loc_in_valid[s] && loc_in_ready[s]) begin
        exp_q[s][int'(loc_in_flit[s].dst.y) * MESH_X + int'(loc_in_flit[s].dst.x)].push_back(loc_in_flit[s]);
        sent++;
      end
      @(negedge clk);
    end
    loc_in_valid = 0; loc_out_ready = '1;
    repeat (200) @(negedge clk);
    checks++;
    if (sent != recv || conflicts == 0) begin failures++; $display("FAIL sent=%0d recv=%0d conflicts=%0d", sent, recv, conflicts); end
    $display("mesh: %0d flits delivered, %0d cycles with contention", recv, conflicts);
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
