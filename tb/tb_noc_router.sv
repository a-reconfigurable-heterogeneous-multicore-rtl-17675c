// tb_noc_router: a router at (1,1) receives random flits on all five inputs while its outputs are
// randomly back-pressured. Every flit must leave through the XY-routing port for its destination,
// flits from one input to one output must keep their order, and none may be lost.
// XY routing follows the document; buffering, arbitration and flit format are this design's
// choices.
module tb_noc_router;
  import hartmp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t in_flit [NPORTS], out_flit [NPORTS];
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];

  noc_router #(.X(1), .Y(1)) dut (.*);

  int checks = 0, failures = 0, sent = 0, got = 0;
  flit_t q [NPORTS][NPORTS][$];   // expected, by input and output

  function automatic int xy_port(flit_t f);
    if (f.dst_x > 1) return P_EAST;
    if (f.dst_x < 1) return P_WEST;
    if (f.dst_y > 1) return P_NORTH;
    if (f.dst_y < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq = 0;
  function automatic flit_t rand_flit(int src);
    flit_t f;
    f = '0;
    f.dst_x = 3'($urandom_range(0, 2));
    f.dst_y = 3'($urandom_range(0, 2));
    f.src_x = 3'(src);
    f.addr  = 32'(seq);
    f.data  = $urandom;
    seq++;
    return f;
  endfunction

  bit taken [NPORTS];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++) taken[i] = in_valid[i] && in_ready[i];
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_ready[i]) begin
        q[i][xy_port(in_flit[i])].push_back(in_flit[i]);
        sent++;
      end
    for (int o = 0; o < NPORTS; o++)
      if (out_valid[o] && out_ready[o]) begin
        int i;
        i = int'(out_flit[o].src_x);
        checks++;
        got++;
        if (q[i][o].size() == 0 || q[i][o][0] != out_flit[o]) begin
          failures++;
          $display("FAIL flit from input %0d on output %0d out of order or misrouted", i, o);
        end else void'(q[i][o].pop_front());
      end
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin in_valid[i] = 0; in_flit[i] = '0; out_ready[i] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_valid[i] || taken[i]) begin   // previous flit taken at the last edge
          in_valid[i] = ($urandom_range(0, 99) < 60);
          in_flit[i]  = rand_flit(i);
        end
        out_ready[i] = ($urandom_range(0, 99) < 70);
      end
    end
    for (int cyc = 0; cyc < 50; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        if (taken[i]) in_valid[i] = 0;
        out_ready[i] = 1;
      end
    end
    checks++;
    if (got != sent || got < 1000) begin
      failures++;
      $display("FAIL sent %0d delivered %0d", sent, got);
    end
    $display("flits=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
