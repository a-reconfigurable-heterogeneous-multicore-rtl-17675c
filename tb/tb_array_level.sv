// tb_array_level: checks one array level with a mixed configuration over random register contexts.
// Column chaining (three dependent ALUs), a write-after-read inside a column, a multiplier and a
// load and a store unit are placed; every written register, the write mask and the memory request
// are compared with values computed directly from the context.
// Three chained ALUs per row follow the document; operand selection by register number is this
// design's choice.
module tb_array_level;
  import hartmp_pkg::*;

  localparam int ROWS = 3, MULTS = 1, LDST = 2, DADDR_W = 12;

  logic [31:0]        ctx_in  [32];
  fu_cfg_t            alu_cfg [ROWS][ALU_COLS];
  fu_cfg_t            mul_cfg [MULTS];
  fu_cfg_t            ls_cfg  [LDST];
  logic [DADDR_W-1:0] mem_addr  [LDST];
  logic               mem_we    [LDST];
  logic [31:0]        mem_wdata [LDST];
  logic [31:0]        mem_rdata [LDST];
  logic [31:0]        ctx_out [32];
  logic [31:0]        wmask;
  logic [31:0]        tbmem [2**DADDR_W];

  int checks = 0, failures = 0;

  array_level #(.ROWS(ROWS), .MULTS(MULTS), .LDST(LDST), .DADDR_W(DADDR_W)) dut (.*);

  always_comb for (int u = 0; u < LDST; u++) mem_rdata[u] = tbmem[mem_addr[u]];

  function automatic fu_cfg_t mk(fu_op_e op, int rd, int rs1, int rs2, bit imm, int immv);
    fu_cfg_t c;
    c = '0;
    c.valid = 1'b1; c.op = op; c.rd = 5'(rd); c.rs1 = 5'(rs1); c.rs2 = 5'(rs2);
    c.use_imm = imm; c.imm = 22'(immv);
    return c;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**DADDR_W; i++) tbmem[i] = $urandom;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < ALU_COLS; c++) alu_cfg[r][c] = '0;
    alu_cfg[0][0] = mk(FU_ADD, 1, 2, 3, 0, 0);          // r1 = r2 + r3
    alu_cfg[1][0] = mk(FU_AND, 2, 7, 8, 0, 0);          // r2 = r7 & r8 (old r2 read above)
    alu_cfg[0][1] = mk(FU_XOR, 4, 1, 5, 0, 0);          // r4 = r1 ^ r5
    alu_cfg[1][2] = mk(FU_SUB, 6, 4, 0, 1, -7);         // r6 = r4 - (-7)
    alu_cfg[0][2] = mk(FU_SETHI, 13, 0, 0, 1, 'h12345); // r13 = 0x12345 << 10
    alu_cfg[2][1] = mk(FU_SRA, 14, 2, 0, 1, 3);         // r14 = new r2 >>> 3
    mul_cfg[0]    = mk(FU_SMUL, 9, 2, 3, 0, 0);         // r9 = old r2 * r3
    ls_cfg[0]     = mk(FU_LD, 10, 11, 0, 1, 8);         // r10 = mem[r11 + 8]
    ls_cfg[1]     = mk(FU_ST, 12, 11, 0, 1, 16);        // mem[r11 + 16] = r12

    for (int it = 0; it < 50; it++) begin
      logic [31:0] e1, e2, e4, e6, e9, e14, base;
      logic [63:0] prod;
      for (int r = 0; r < 32; r++) ctx_in[r] = $urandom;
      ctx_in[11] = 32'($urandom_range(0, 1000)) * 4;
      #1;
      base = ctx_in[11];
      e1 = ctx_in[2] + ctx_in[3];
      e2 = ctx_in[7] & ctx_in[8];
      e4 = e1 ^ ctx_in[5];
      e6 = e4 + 7;
      prod = 64'($signed(ctx_in[2])) * 64'($signed(ctx_in[3]));
      e9 = prod[31:0];
      e14 = 32'($signed(e2) >>> 3);
      check("r1", ctx_out[1], e1);
      check("r2", ctx_out[2], e2);
      check("r4", ctx_out[4], e4);
      check("r6", ctx_out[6], e6);
      check("r9", ctx_out[9], e9);
      check("r13", ctx_out[13], 32'h12345 << 10);
      check("r14", ctx_out[14], e14);
      check("r10", ctx_out[10], tbmem[(base + 8) >> 2]);
      check("r5 untouched", ctx_out[5], ctx_in[5]);
      check("r0", ctx_out[0], 32'd0);
      check("wmask", wmask, 32'h0000_6656);
      check("st addr", 32'(mem_addr[1]), (base + 16) >> 2);
      check("st we", 32'(mem_we[1]), 1);
      check("ld we", 32'(mem_we[0]), 0);
      check("st data", mem_wdata[1], ctx_in[12]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
