// tb_noc_mesh: the 3 x 2 mesh under random all-to-all traffic with random back-pressure at the
// receivers. Each flit must arrive at its destination node, in order per source/destination pair,
// and none may be lost. A lone flit first crosses the mesh corner to corner to check the latency
// of one cycle per hop on the XY path (three hops from (0,0) to (2,1)).
// XY routing follows the document; buffering, flit format and the hop latency are this design's
// choices.
module tb_noc_mesh;
  import hartmp_pkg::*;
  localparam int MX = 3, MY = 2, NN = MX * MY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t node_tx_flit [NN], node_rx_flit [NN];
  logic  node_tx_valid [NN], node_tx_ready [NN], node_rx_valid [NN], node_rx_ready [NN];

  noc_mesh #(.MX(MX), .MY(MY)) dut (.*);

  int checks = 0, failures = 0, sent = 0, got = 0;
  flit_t q [NN][NN][$];
  bit taken [NN];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      taken[n] = node_tx_valid[n] && node_tx_ready[n];
      if (taken[n]) begin
        q[n][int'(node_tx_flit[n].dst_y) * MX + int'(node_tx_flit[n].dst_x)].push_back(node_tx_flit[n]);
        sent++;
      end
    end
    for (int n = 0; n < NN; n++)
      if (node_rx_valid[n] && node_rx_ready[n]) begin
        int s;
        s = int'(node_rx_flit[n].src_y) * MX + int'(node_rx_flit[n].src_x);
        checks++;
        got++;
        if (q[s][n].size() == 0 || q[s][n][0] != node_rx_flit[n]) begin
          failures++;
          $display("FAIL flit %0d -> %0d misrouted or out of order", s, n);
        end else void'(q[s][n].pop_front());
      end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int n = 0; n < NN; n++) begin
      node_tx_valid[n] = 0; node_tx_flit[n] = '0; node_rx_ready[n] = 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // lone flit, corner to corner
    node_tx_flit[0] = '0;
    node_tx_flit[0].dst_x = 2; node_tx_flit[0].dst_y = 1;
    node_tx_valid[0] = 1;
    @(negedge clk);
    node_tx_valid[0] = 0;
    t0 = cyc;
    while (!node_rx_valid[5]) @(negedge clk);
    checks++;
    if (cyc - t0 != 3) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    repeat (3) @(negedge clk);
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (!node_tx_valid[n] || taken[n]) begin
          int d;
          d = $urandom_range(0, NN - 1);
          node_tx_valid[n] = ($urandom_range(0, 99) < 40);
          node_tx_flit[n] = '0;
          node_tx_flit[n].dst_x = 3'(d % MX);
          node_tx_flit[n].dst_y = 3'(d / MX);
          node_tx_flit[n].src_x = 3'(n % MX);
          node_tx_flit[n].src_y = 3'(n / MX);
          node_tx_flit[n].addr  = 32'(k);
          node_tx_flit[n].data  = $urandom;
        end
        node_rx_ready[n] = ($urandom_range(0, 99) < 80);
      end
    end
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (taken[n]) node_tx_valid[n] = 0;
        node_rx_ready[n] = 1;
      end
    end
    checks++;
    if (got != sent || got < 2000) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    $display("flits=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
