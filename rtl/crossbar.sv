// crossbar: N x N switch of the router.
//
// Output o carries the flit of the input selected by the one-hot vector
// sel[o]; out_valid[o] is high when sel[o] selects anything. Several
// outputs may take flits from different inputs in the same cycle; the
// arbiter guarantees that no input is selected by two outputs. Purely
// combinational. The design names the switch; its form here is the usual
// multiplexer per output.
module crossbar #(
  parameter int N = 5,
  parameter int W = 27
) (
  input  logic [W-1:0] in_data [N],
  input  logic [N-1:0] sel [N],
  output logic [N-1:0] out_valid,
  output logic [W-1:0] out_data [N]
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_valid[o] = |sel[o];
      out_data[o]  = '0;
      for (int i = 0; i < N; i++)
        if (sel[o][i]) out_data[o] = in_data[i];
    end
  end
endmodule
