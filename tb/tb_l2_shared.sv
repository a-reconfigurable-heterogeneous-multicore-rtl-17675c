// tb_l2_shared: a 4 KB, 8-way instance (16 sets) of the shared L2 under random single-word reads
// and writes over 16 KB, so that lines are evicted and dirty lines written back. Every read is
// compared with a word-level reference memory; the hit latency (response two cycles after the
// request is taken) and the presence of hits, misses and write-backs are checked.
// Associativity follows the document (the size is reduced here to force evictions); line size and
// write policy are this design's choices.
module tb_l2_shared;
  import hartmp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t rx_flit, tx_flit;
  logic  rx_valid, rx_ready, tx_valid, tx_ready;
  logic  mem_req, mem_we, mem_ack;
  logic [26:0]  mem_addr;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0]  st_hits, st_misses, st_writebacks;

  l2_shared #(.SIZE_KB(4), .WAYS(8), .LINE_WORDS(8)) dut (.*);
  main_memory_model u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
                           .ack(mem_ack), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [logic [31:0]];

  function automatic logic [31:0] initial_word(logic [31:0] a);
    return {a[31:5], a[4:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // one transaction; returns the response data and the cycles from acceptance to response
  task automatic xact(bit wr, logic [31:0] addr, logic [31:0] data, output logic [31:0] rd,
                      output int lat);
    @(negedge clk);
    rx_flit = '0;
    rx_flit.kind = wr ? PK_WR_REQ : PK_RD_REQ;
    rx_flit.addr = addr; rx_flit.data = data;
    rx_flit.src_x = 3'd2; rx_flit.src_y = 3'd0;
    rx_valid = 1;
    while (!rx_ready) @(negedge clk);
    @(negedge clk);
    rx_valid = 0;
    lat = 1;
    while (!tx_valid) begin @(negedge clk); lat++; end
    rd = tx_flit.data;
    check("reply kind", 32'(tx_flit.kind), wr ? 32'(PK_WR_ACK) : 32'(PK_RD_RSP));
    check("reply dest", 32'(tx_flit.dst_x), 2);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int lat;
    rx_valid = 0; rx_flit = '0; tx_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xact(0, 32'h8000_0040, 0, rd, lat);          // miss
    check("miss data", rd, initial_word(32'h8000_0040));
    xact(0, 32'h8000_0044, 0, rd, lat);          // hit, same line
    check("hit data", rd, initial_word(32'h8000_0044));
    check("hit latency", 32'(lat), 2);
    for (int k = 0; k < 3000; k++) begin
      logic [31:0] a;
      bit wr;
      a = 32'h8000_0000 | (32'($urandom_range(0, 4095)) << 2);
      wr = $urandom_range(0, 1);
      if (wr) begin
        logic [31:0] d;
        d = $urandom;
        xact(1, a, d, rd, lat);
        ref_mem[a] = d;
      end else begin
        xact(0, a, 0, rd, lat);
        check("read", rd, ref_mem.exists(a) ? ref_mem[a] : initial_word(a));
      end
    end
    checks++;
    if (st_hits == 0 || st_misses == 0 || st_writebacks == 0) begin
      failures++;
      $display("FAIL hits %0d misses %0d writebacks %0d", st_hits, st_misses, st_writebacks);
    end
    $display("hits=%0d misses=%0d writebacks=%0d", st_hits, st_misses, st_writebacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
