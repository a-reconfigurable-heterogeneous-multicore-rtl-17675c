// tb_addr_cache: fills the address cache past its capacity and checks lookups against a model:
// hits with the right index, misses for unknown addresses, invalidation on alloc, FIFO reuse.
// That the cache indexes configurations by block start address follows the document; the FIFO order
// checked here is this design's choice.
module tb_addr_cache;
  localparam int NENT = 8;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  logic [31:0] lookup_pc, commit_pc;
  logic        hit, alloc, commit;
  logic [2:0]  hit_idx, alloc_idx, commit_idx;

  int checks = 0, failures = 0;
  logic [31:0] model_pc [NENT];
  bit          model_v  [NENT];

  addr_cache #(.NENT(NENT)) dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic lookup_all();
    for (int i = 0; i < NENT; i++) if (model_v[i]) begin
      lookup_pc = model_pc[i]; #1;
      check("hit", 32'(hit), 1);
      check("idx", 32'(hit_idx), i);
    end
    lookup_pc = 32'hFFFF_FFF0; #1;
    check("miss", 32'(hit), 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = 0; commit = 0; lookup_pc = 0; commit_pc = 0; commit_idx = 0;
    for (int i = 0; i < NENT; i++) model_v[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup_all();
    for (int n = 0; n < 3 * NENT; n++) begin
      int slot;
      @(negedge clk);
      slot = alloc_idx;
      check("fifo order", 32'(slot), n % NENT);
      alloc = 1;
      @(negedge clk);
      alloc = 0;
      model_v[slot] = 0;
      lookup_all();
      commit = 1; commit_idx = 3'(slot); commit_pc = 32'h1000 + 32'(n) * 64;
      @(negedge clk);
      commit = 0;
      model_v[slot] = 1; model_pc[slot] = 32'h1000 + 32'(n) * 64;
      lookup_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
