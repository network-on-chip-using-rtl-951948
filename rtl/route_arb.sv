// route_arb: routing and arbitration unit of a router.
//
// For the head flit of every input queue it computes the output port with
// dimension-ordered XY routing (first along x, then along y, which cannot
// deadlock in a mesh). For every output port a round-robin arbiter then
// grants one of the inputs that request it, provided the output queue has
// room. The grant for output o is the one-hot vector gnt[o] over the inputs;
// pop[i] tells input i that its head flit moves this cycle. The round-robin
// pointer of an output moves past the input it granted, so every input that
// keeps requesting is served within NPORT grants. Purely combinational
// except the pointers. The design gives the unit's task (grant an input and
// an output port, route packets); XY routing and round robin are chosen.
// contention counts cycles where some output had more than one requester.
module route_arb
  import noc_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [NPORT-1:0]   head_valid,
  input  coord_t             head_dst [NPORT],
  input  logic [NPORT-1:0]   out_room,
  output logic [NPORT-1:0]   gnt [NPORT],
  output logic [NPORT-1:0]   pop,
  output logic               contention
);
  localparam coord_t HERE = '{x: CW'(X), y: CW'(Y)};

  logic [NPORT-1:0] req [NPORT];          // req[o][i]
  logic [NPORT-1:0] prio [NPORT];         // one-hot round-robin pointer

  always_comb begin
    for (int o = 0; o < NPORT; o++) req[o] = '0;
    for (int i = 0; i < NPORT; i++)
      if (head_valid[i]) req[int'(route_xy(HERE, head_dst[i]))][i] = 1'b1;
  end

  always_comb begin
    pop = '0;
    contention = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      gnt[o] = '0;
      if ($countones(req[o]) > 1) contention = 1'b1;
      if (out_room[o]) begin
        // first requester at or after the pointer, wrapping around
        for (int k = 0; k < NPORT; k++) begin
          for (int i = 0; i < NPORT; i++) begin
            if (gnt[o] == '0 && prio[o][i] && req[o][(i+k) % NPORT])
              gnt[o][(i+k) % NPORT] = 1'b1;
          end
        end
      end
      pop = pop | gnt[o];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < NPORT; o++) prio[o] <= NPORT'(1);
    end else begin
      for (int o = 0; o < NPORT; o++)
        if (gnt[o] != '0) prio[o] <= {gnt[o][NPORT-2:0], gnt[o][NPORT-1]};
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_chk
    a_onehot_grant: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt[o]));
  end
endmodule
