// reg_k: model constant register file (Reg-K).
//
// Holds one constant K per Gaussian model (its mixing weight times its
// normalisation factor, quantised to W bits). Models are numbered in load
// order: all models of class 1, then class 2, and so on. Each cycle with
// load high writes data to the next model; rst restarts at model 0. The read
// port is combinational. The design gives the register; the order is chosen.
module reg_k #(
  parameter int NM = 50,
  parameter int W  = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  load,
  input  logic [W-1:0]          data,
  input  logic [$clog2(NM)-1:0] rd_model,
  output logic [W-1:0]          k
);
  logic [W-1:0]          mem [NM];
  logic [$clog2(NM)-1:0] wptr;

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else if (load) begin
      mem[wptr] <= data;
      wptr      <= (int'(wptr) == NM-1) ? '0 : wptr + 1'b1;
    end
  end

  assign k = mem[rd_model];
endmodule
