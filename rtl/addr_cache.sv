// addr_cache: the address cache of a DAP.
//
// Every translated basic block has one entry, holding the address of its first instruction. The
// entry number is also the slot of the block's configuration in the reconfiguration memory, so a
// hit both tells the fetch stage that the code ahead is already translated and gives the index
// of its configuration. The document gives the cache's role; its organisation here is this design's
// own: fully associative, NENT entries (one per configuration slot), lowest matching entry wins,
// first-in first-out replacement.
//
// Lookup is combinational (lookup_pc -> hit, hit_idx) so the fetch stage sees it in the same cycle.
// The translator claims the victim slot alloc_idx with `alloc` (the entry is invalidated at once)
// and makes it visible with `commit` once the configuration is complete; only a commit advances
// the FIFO pointer, so a block that is dropped leaves its slot free for the next one.
module addr_cache #(
  parameter int unsigned NENT  = 32,
  localparam int unsigned IDX_W = (NENT > 1) ? $clog2(NENT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      lookup_pc,
  output logic             hit,
  output logic [IDX_W-1:0] hit_idx,
  input  logic             alloc,
  output logic [IDX_W-1:0] alloc_idx,
  input  logic             commit,
  input  logic [IDX_W-1:0] commit_idx,
  input  logic [31:0]      commit_pc
);

  logic [NENT-1:0] valid;
  logic [29:0]     tag [NENT];
  logic [IDX_W-1:0] fifo_ptr;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = NENT - 1; i >= 0; i--) begin
      if (valid[i] && tag[i] == lookup_pc[31:2]) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  assign alloc_idx = fifo_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      fifo_ptr <= '0;
      for (int i = 0; i < NENT; i++) tag[i] <= '0;
    end else begin
      if (alloc) valid[fifo_ptr] <= 1'b0;
      if (commit) begin
        valid[commit_idx] <= 1'b1;
        tag[commit_idx]   <= commit_pc[31:2];
        fifo_ptr <= (int'(commit_idx) == NENT - 1) ? '0 : commit_idx + 1'b1;
      end
    end
  end

endmodule
