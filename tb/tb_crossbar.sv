// tb_crossbar: random one-hot (or empty) selects per output with distinct
// inputs; checks each output's valid and data.
module tb_crossbar;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic [26:0] in_data [N];
  logic [N-1:0] sel [N];
  logic [N-1:0] out_valid;
  logic [26:0] out_data [N];
  crossbar #(.N(N), .W(27)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int perm [N];
      for (int i = 0; i < N; i++) begin in_data[i] = 27'($urandom); perm[i] = i; end
      perm.shuffle();
      for (int o = 0; o < N; o++) sel[o] = ($urandom_range(0, 3) == 0) ? '0 : N'(1) << perm[o];
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != (sel[o] != 0) || (sel[o] != 0 && out_data[o] != in_data[perm[o]])) begin
          failures++; $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
