// ctrl_unit: sequencer of the GMM processor.
//
// On start it walks through every Gaussian model of every class, and through
// the D rows of each model from row D down to row 1 (the order the systolic
// multiplier needs), one row per cycle. For each cycle it drives the read
// addresses of Reg-X, Reg-GMM and Reg-K and a tag that tells the pipeline
// where models and classes begin and end. num_m (1..M_MAX) is the number of
// models per class; models are stored class after class, so the model
// index simply counts up. A pattern takes N_CLASS * num_m * D cycles; start
// is ignored while busy. The design names a control unit with Enable and
// Reset; everything else about it is this implementation's choice.
module ctrl_unit
  import gmm_pkg::*;
#(
  parameter int NC = N_CLASS,
  parameter int MM = M_MAX,
  parameter int DD = D
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [$clog2(MM+1)-1:0]     num_m,
  output logic                        busy,
  output logic [$clog2(NC*MM)-1:0]    model,
  output logic [$clog2(DD)-1:0]       row,
  output tag_t                        tag
);
  logic [$clog2(NC)-1:0]   cls;
  logic [$clog2(MM+1)-1:0] m, nm_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; model <= '0; row <= '0; cls <= '0; m <= '0; nm_q <= 1;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        nm_q  <= (num_m == 0) ? 1 : (int'(num_m) > MM ? ($clog2(MM+1))'(MM) : num_m);
        model <= '0; row <= ($clog2(DD))'(DD-1); cls <= '0; m <= '0;
      end
    end else begin
      if (row != 0) row <= row - 1'b1;
      else begin
        row   <= ($clog2(DD))'(DD-1);
        model <= model + 1'b1;
        if (m != nm_q - 1) m <= m + 1'b1;
        else begin
          m <= '0;
          if (int'(cls) == NC-1) busy <= 1'b0;
          else cls <= cls + 1'b1;
        end
      end
    end
  end

  always_comb begin
    tag.valid       = busy;
    tag.row_first   = busy && (int'(row) == DD-1);
    tag.row_last    = busy && (row == 0);
    tag.model_first = busy && (m == 0);
    tag.model_last  = busy && (m == nm_q - 1);
    tag.class_first = busy && (cls == 0);
  end
endmodule
