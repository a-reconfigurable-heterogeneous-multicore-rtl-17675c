// tb_ddh: feeds the translator a stream of retired instructions, one per cycle, and checks every
// placement (slot, level, unit), every block header and address-cache commit, and the events for a
// full array, a full input context, a dropped short block and a block closed by an array run.
// Expected placements were worked out by hand from the placement rules.
// The close on jumps and incompatible instructions follows the document; the placement grid and the
// closes on a full array or input context are this design's choices.
module tb_ddh;
  import hartmp_pkg::*;
  import sparc_asm_pkg::*;

  localparam int LEVELS = 3, ROWS = 3, MULTS = 1, LDST = 2, NCONF = 4, IN_CTX = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ret_valid, array_exec, busy;
  logic [31:0] ret_pc, ret_instr;
  logic        ac_alloc, ac_commit, rm_clr_en, rm_wr_en, rm_hdr_en, ev_full, ev_ctx, ev_drop;
  logic [1:0]  ac_alloc_idx, ac_commit_idx, rm_clr_idx, rm_wr_idx, rm_hdr_idx, rm_wr_level;
  logic [31:0] ac_commit_pc, rm_hdr_end_pc;
  logic [3:0]  rm_wr_unit;
  fu_cfg_t     rm_wr_cfg;
  logic [1:0]  rm_hdr_nlev;
  logic        hit;
  logic [1:0]  hit_idx;

  ddh #(.LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST), .NCONF(NCONF),
        .IN_CTX(IN_CTX), .MIN_INSTR(3)) dut (.*);
  addr_cache #(.NENT(NCONF)) u_ac (
    .clk, .rst_n, .lookup_pc(32'h0), .hit, .hit_idx, .alloc(ac_alloc), .alloc_idx(ac_alloc_idx),
    .commit(ac_commit), .commit_idx(ac_commit_idx), .commit_pc(ac_commit_pc));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // observed outputs
  typedef struct { int slot, level, unit, rd; } wr_t;
  wr_t wrs[$];
  int  hdr_slot[$], hdr_nlev[$];
  logic [31:0] hdr_pc[$], com_pc[$];
  int  n_full = 0, n_ctx = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (rm_wr_en) wrs.push_back('{int'(rm_wr_idx), int'(rm_wr_level), int'(rm_wr_unit), int'(rm_wr_cfg.rd)});
    if (rm_hdr_en) begin
      hdr_slot.push_back(int'(rm_hdr_idx)); hdr_nlev.push_back(int'(rm_hdr_nlev));
      hdr_pc.push_back(rm_hdr_end_pc);
    end
    if (ac_commit) com_pc.push_back(ac_commit_pc);
    if (ev_full) n_full++;
    if (ev_ctx)  n_ctx++;
    if (ev_drop) n_drop++;
  end

  logic [31:0] pc = 32'h100;
  task automatic retire(logic [31:0] ins);
    @(negedge clk);
    ret_valid = 1; ret_instr = ins; ret_pc = pc;
    pc += 4;
  endtask
  task automatic idle(int n);
    repeat (n) begin @(negedge clk); ret_valid = 0; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ret_valid = 0; ret_instr = 0; ret_pc = 0; array_exec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // block A: dependences, column chaining, multiplier and memory ordering
    retire(bicc(C_NE, -4));                 // 0x100
    retire(rr(OP3_ADD, 1, 2, 3));           // 0x104  L0 u0
    retire(rr(OP3_ADD, 4, 1, 1));           // 0x108  L0 u1
    retire(ri(OP3_ADD, 5, 4, 1));           // 0x10c  L0 u2
    retire(ri(OP3_ADD, 6, 5, 1));           // 0x110  L1 u0
    retire(rr(OP3_ADD, 7, 2, 3));           // 0x114  L0 u3
    retire(rr(OP3_UMUL, 8, 7, 2));          // 0x118  L1 u9
    retire(ld(9, 2, 4));                    // 0x11c  L0 u10
    retire(st(9, 2, 8));                    // 0x120  L1 u10
    retire(ld(10, 2, 12));                  // 0x124  L2 u10
    retire(ri(OP3_ADD, 2, 0, 5));           // 0x128  writes r2 after its readers: L1 u1? see below
    retire(bicc(C_NE, -10));                // 0x12c  close
    // block B: eleven dependent adds, the tenth does not fit
    for (int k = 0; k < 11; k++) retire(ri(OP3_ADD, 1, 1, 1));   // 0x130 .. 0x158
    retire(bicc(C_A, 3));                   // 0x15c
    // block C: ten distinct input registers, the fifth add overflows an input context of 8
    retire(rr(OP3_ADD, 20, 1, 2));          // 0x160
    retire(rr(OP3_ADD, 21, 3, 4));
    retire(rr(OP3_ADD, 22, 5, 6));
    retire(rr(OP3_ADD, 23, 7, 8));
    retire(rr(OP3_ADD, 24, 9, 10));         // 0x170 overflow
    retire(bicc(C_A, 3));                   // 0x174
    // block D: too short
    retire(rr(OP3_ADD, 1, 2, 3));           // 0x178
    retire(bicc(C_A, 3));                   // 0x17c
    // block E: closed by an array run
    retire(rr(OP3_XOR, 1, 2, 3));           // 0x180
    retire(rr(OP3_XOR, 4, 2, 3));
    retire(rr(OP3_XOR, 5, 2, 3));           // 0x188
    idle(3);
    @(negedge clk) array_exec = 1;
    @(negedge clk) array_exec = 0;
    idle(5);

    // ---- block A
    // r2 written at 0x128: readers of r2 are at times 0 (L0 ALUs, mult at L1 reads 4, memory at
    // L0/L1/L2 read 0/4/8), so its write must publish after time 8: first ALU slot with
    // read time >= 8 is level 2 column 0 (unit 0 of level 2).
    begin
      int exp_l[11] = '{0, 0, 0, 1, 0, 1, 0, 1, 2, 2, 0};
      int exp_u[11] = '{0, 1, 2, 0, 3, 9, 10, 10, 10, 0, 0};
      int exp_rd[10] = '{1, 4, 5, 6, 7, 8, 9, 9, 10, 2};
      for (int k = 0; k < 10; k++) begin
        check($sformatf("A slot %0d", k), wrs[k].slot, 0);
        check($sformatf("A level %0d", k), wrs[k].level, exp_l[k]);
        check($sformatf("A unit %0d", k), wrs[k].unit, exp_u[k]);
        check($sformatf("A rd %0d", k), wrs[k].rd, exp_rd[k]);
      end
    end
    check("A hdr slot", hdr_slot[0], 0);
    check("A hdr nlev", hdr_nlev[0], 3);
    check("A end pc", hdr_pc[0], 32'h12c);
    check("A start pc", com_pc[0], 32'h104);
    // ---- block B: 9 placed in slot 1 (levels 0..2, columns 0..2), closed as full
    for (int k = 0; k < 9; k++) begin
      check("B slot", wrs[10 + k].slot, 1);
      check("B level", wrs[10 + k].level, k / 3);
      check("B unit", wrs[10 + k].unit, k % 3);
    end
    check("B end pc", hdr_pc[1], 32'h154);
    check("B start pc", com_pc[1], 32'h130);
    check("B nlev", hdr_nlev[1], 3);
    // ---- block C: 4 placed in slot 2, closed by the input context
    begin
      int exp_cu[4] = '{0, 3, 6, 1};    // three rows of column 0, then column 1
      for (int k = 0; k < 4; k++) begin
        check("C slot", wrs[19 + k].slot, 2);
        check("C unit", wrs[19 + k].unit, exp_cu[k]);
      end
    end
    check("C end pc", hdr_pc[2], 32'h170);
    check("C start pc", com_pc[2], 32'h160);
    check("C nlev", hdr_nlev[2], 1);
    // ---- block D (one unit written) is dropped, block E reuses slot 3 and ends at the array run
    check("D slot", wrs[23].slot, 3);
    check("E slot", wrs[24].slot, 3);
    check("E end pc", hdr_pc[3], 32'h18c);
    check("E start pc", com_pc[3], 32'h180);
    check("writes", wrs.size(), 27);
    check("headers", hdr_slot.size(), 4);
    check("full events", n_full, 1);
    check("ctx events", n_ctx, 1);
    check("drop events", n_drop, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
