// tb_route_arb: router at (1, 2) with random head flits and output room.
// Checks that every grant goes to an input whose XY route (worked out here
// from the coordinates) is that output, at most one grant per output, a
// grant for every output that has room and a requester, pop equal to the
// granted inputs, and round-robin fairness: with all five inputs wanting
// the same output, each is served once in every five cycles.
module tb_route_arb;
  import noc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, conflicts = 0;
  logic rst;
  logic [NPORT-1:0] head_valid, out_room, pop;
  coord_t head_dst [NPORT];
  logic [NPORT-1:0] gnt [NPORT];
  logic contention;
  route_arb #(.X(1), .Y(2)) dut (.*);

  function automatic int want(coord_t d);
    if (int'(d.x) > 1) return 2;        // east
    if (int'(d.x) < 1) return 4;        // west
    if (int'(d.y) > 2) return 1;        // north
    if (int'(d.y) < 2) return 3;        // south
    return 0;
  endfunction

  initial begin
    int served [NPORT];
    rst = 1; head_valid = 0; out_room = 0;
    for (int i = 0; i < NPORT; i++) head_dst[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [NPORT-1:0] any;
      head_valid = NPORT'($urandom); out_room = NPORT'($urandom | $urandom);
      for (int i = 0; i < NPORT; i++) head_dst[i] = coord_t'($urandom);
      #1;
      any = '0;
      for (int o = 0; o < NPORT; o++) begin
        logic reqd;
        reqd = 0;
        for (int i = 0; i < NPORT; i++) if (head_valid[i] && want(head_dst[i]) == o) reqd = 1;
        checks++;
        if ($countones(gnt[o]) > 1 || (gnt[o] != 0 && !out_room[o]) ||
            (out_room[o] && reqd && gnt[o] == 0)) begin
          failures++; $display("FAIL output %0d gnt=%b", o, gnt[o]);
        end
        for (int i = 0; i < NPORT; i++) if (gnt[o][i]) begin
          checks++;
          if (!head_valid[i] || want(head_dst[i]) != o) begin failures++; $display("FAIL wrong grant"); end
        end
        any |= gnt[o];
      end
      checks++;
      if (pop != any) begin failures++; $display("FAIL pop"); end
      if (contention) conflicts++;
      @(negedge clk);
    end
    // fairness: all inputs to the east output
    head_valid = '1; out_room = '1;
    for (int i = 0; i < NPORT; i++) head_dst[i] = '{x: 2'd3, y: 2'd0};
    served = '{default: 0};
    for (int n = 0; n < 50; n++) begin
      #1;
      for (int i = 0; i < NPORT; i++) if (gnt[2][i]) served[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < NPORT; i++) begin
      checks++;
      if (served[i] != 10) begin failures++; $display("FAIL input %0d served %0d of 50", i, served[i]); end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no contention seen"); end
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
