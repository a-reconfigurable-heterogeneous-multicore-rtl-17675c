// array_level: one level of the reconfigurable matrix.
//
// A level is purely combinational. It holds ROWS rows of ALU_COLS (three) ALUs, MULTS multipliers
// and LDST load/store units. The ALUs of one row are chained column after column, so a level can
// run three data-dependent ALU instructions; this follows the document. How the chaining is wired is
// this design's choice: the register context flows through the columns, so column c reads the context
// after the writes of columns 0..c-1 of every row. Multipliers and memory units read the context
// at the start of the level and write it after column 2. Operand selection is by architectural
// register number, the way the context buses of the array are indexed.
//
// Memory units drive one port each of the core's data memory: word address, write enable and write
// data out, read data in (asynchronous read, the write lands at the clock edge that ends the level).
// The translator never places two writers of one register in the same column, nor a store in the
// same level as another memory access, so the order inside a level never matters.
module array_level
  import hartmp_pkg::*;
#(
  parameter int unsigned ROWS  = 3,
  parameter int unsigned MULTS = 1,
  parameter int unsigned LDST  = 2,
  parameter int unsigned DADDR_W = 12
) (
  input  logic [31:0]         ctx_in  [32],
  input  fu_cfg_t             alu_cfg [ROWS][ALU_COLS],
  input  fu_cfg_t             mul_cfg [MULTS],
  input  fu_cfg_t             ls_cfg  [LDST],
  output logic [DADDR_W-1:0]  mem_addr  [LDST],
  output logic                mem_we    [LDST],
  output logic [31:0]         mem_wdata [LDST],
  input  logic [31:0]         mem_rdata [LDST],
  output logic [31:0]         ctx_out [32],
  output logic [31:0]         wmask
);

  function automatic logic [31:0] operand_b(input fu_cfg_t c, input logic [31:0] ctx [32]);
    if (c.op == FU_SETHI) return {c.imm, 10'b0};
    if (c.use_imm)        return {{10{c.imm[21]}}, c.imm};
    return ctx[c.rs2];
  endfunction

  logic [31:0] col_ctx [ALU_COLS+1][32];
  logic [31:0] mask_c  [ALU_COLS+1];

  always_comb begin
    col_ctx[0] = ctx_in;
    col_ctx[0][0] = '0;
    mask_c[0] = '0;
    for (int c = 0; c < ALU_COLS; c++) begin
      col_ctx[c+1] = col_ctx[c];
      mask_c[c+1]  = mask_c[c];
      for (int r = 0; r < ROWS; r++) begin
        if (alu_cfg[r][c].valid && alu_cfg[r][c].rd != 5'd0) begin
          col_ctx[c+1][alu_cfg[r][c].rd] =
            fu_compute(alu_cfg[r][c].op, col_ctx[c][alu_cfg[r][c].rs1],
                       operand_b(alu_cfg[r][c], col_ctx[c]));
          mask_c[c+1][alu_cfg[r][c].rd] = 1'b1;
        end
      end
    end
  end

  // memory requests depend only on the level's input context
  always_comb begin
    for (int u = 0; u < LDST; u++) begin
      logic [31:0] ea;
      ea = col_ctx[0][ls_cfg[u].rs1] + operand_b(ls_cfg[u], col_ctx[0]);
      mem_addr[u]  = ea[DADDR_W+1:2];
      mem_we[u]    = ls_cfg[u].valid && ls_cfg[u].op == FU_ST;
      mem_wdata[u] = col_ctx[0][ls_cfg[u].rd];
    end
  end

  always_comb begin
    ctx_out = col_ctx[ALU_COLS];
    wmask   = mask_c[ALU_COLS];
    for (int m = 0; m < MULTS; m++) begin
      if (mul_cfg[m].valid && mul_cfg[m].rd != 5'd0) begin
        ctx_out[mul_cfg[m].rd] = fu_compute(mul_cfg[m].op, col_ctx[0][mul_cfg[m].rs1],
                                            operand_b(mul_cfg[m], col_ctx[0]));
        wmask[mul_cfg[m].rd] = 1'b1;
      end
    end
    for (int u = 0; u < LDST; u++) begin
      if (ls_cfg[u].valid && ls_cfg[u].op == FU_LD && ls_cfg[u].rd != 5'd0) begin
        ctx_out[ls_cfg[u].rd] = mem_rdata[u];
        wmask[ls_cfg[u].rd] = 1'b1;
      end
    end
    ctx_out[0] = '0;
  end

endmodule
