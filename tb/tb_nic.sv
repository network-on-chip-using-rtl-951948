// tb_nic: NIC of node (2, 1). Random messages from the IP core must leave
// as flits with the same destination, kind and data and this node's
// coordinates as source; random flits from the router must reach the IP
// core as messages whose peer is the flit's source. Both directions run at
// once with random back-pressure; order and count are checked.
module tb_nic;
  import noc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, ip_tx_valid, ip_tx_ready, ip_rx_valid, ip_rx_ready;
  logic net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready;
  ip_msg_t ip_tx, ip_rx;
  flit_t net_tx, net_rx;
  nic #(.X(2), .Y(1)) dut (.*);

  flit_t tx_exp[$];
  ip_msg_t rx_exp[$];
  int ntx = 0, nrx = 0;

  always @(posedge clk) if (!rst) begin
    if (net_tx_valid && net_tx_ready) begin
      checks++; ntx++;
      if (tx_exp.size() == 0 || net_tx != tx_exp[0]) begin failures++; $display("FAIL tx %h", net_tx); end
      if (tx_exp.size()) void'(tx_exp.pop_front());
    end
    if (ip_rx_valid && ip_rx_ready) begin
      checks++; nrx++;
      if (rx_exp.size() == 0 || ip_rx != rx_exp[0]) begin failures++; $display("FAIL rx %h", ip_rx); end
      if (rx_exp.size()) void'(rx_exp.pop_front());
    end
  end

  initial begin
    rst = 1; ip_tx_valid = 0; net_rx_valid = 0; ip_rx_ready = 0; net_tx_ready = 0;
    ip_tx = '0; net_rx = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      if (!ip_tx_valid || ip_tx_ready) begin
        ip_tx_valid = (n < 1900) && $urandom_range(0, 1);
        ip_tx = ip_msg_t'({$urandom, $urandom});
      end
      if (!net_rx_valid || net_rx_ready) begin
        net_rx_valid = (n < 1900) && $urandom_range(0, 1);
        net_rx = flit_t'({$urandom, $urandom});
      end
      ip_rx_ready = $urandom_range(0, 2) != 0;
      net_tx_ready = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (ip_tx_valid && ip_tx_ready)
        tx_exp.push_back('{dst: ip_tx.peer, src: '{x: 2'd2, y: 2'd1}, kind: ip_tx.kind, data: ip_tx.data});
      if (net_rx_valid && net_rx_ready)
        rx_exp.push_back('{peer: net_rx.src, kind: net_rx.kind, data: net_rx.data});
      @(negedge clk);
    end
    ip_tx_valid = 0; net_rx_valid = 0; ip_rx_ready = 1; net_tx_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (tx_exp.size() || rx_exp.size() || ntx < 100 || nrx < 100) begin
      failures++; $display("FAIL leftovers %0d %0d", tx_exp.size(), rx_exp.size());
    end
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
