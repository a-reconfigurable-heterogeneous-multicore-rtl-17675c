// tb_reconf_array: runs hand-built three-level and one-level configurations on the array with a
// data memory model, and checks the written registers, the write mask, the memory contents and
// the latency (a block of n levels raises done n + 1 cycles after start).
// Levels and context registers follow the document; one level per cycle is this design's timing.
module tb_reconf_array;
  import hartmp_pkg::*;

  localparam int LEVELS = 3, ROWS = 3, MULTS = 1, LDST = 2, DADDR_W = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               start;
  fu_cfg_t            alu_cfg [LEVELS][ROWS][ALU_COLS];
  fu_cfg_t            mul_cfg [LEVELS][MULTS];
  fu_cfg_t            ls_cfg  [LEVELS][LDST];
  logic [1:0]         nlev;
  logic [31:0]        rf_in [32];
  logic [DADDR_W-1:0] mem_addr [LDST];
  logic               mem_we [LDST];
  logic [31:0]        mem_wdata [LDST];
  logic [31:0]        mem_rdata [LDST];
  logic               busy, done;
  logic [31:0]        wb_mask;
  logic [31:0]        wb_data [32];
  logic [31:0]        tbmem [2**DADDR_W];

  int checks = 0, failures = 0;

  reconf_array #(.LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST), .DADDR_W(DADDR_W))
    dut (.*);

  always_comb for (int u = 0; u < LDST; u++) mem_rdata[u] = tbmem[mem_addr[u]];
  always_ff @(posedge clk) for (int u = 0; u < LDST; u++) if (mem_we[u]) tbmem[mem_addr[u]] <= mem_wdata[u];

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

  task automatic clear_cfg();
    for (int l = 0; l < LEVELS; l++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < ALU_COLS; c++) alu_cfg[l][r][c] = '0;
      for (int m = 0; m < MULTS; m++) mul_cfg[l][m] = '0;
      for (int u = 0; u < LDST; u++) ls_cfg[l][u] = '0;
    end
  endtask

  // start the block and return the number of cycles until done
  task automatic run(output int lat);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    start = 0;
    for (int i = 0; i < 2**DADDR_W; i++) tbmem[i] = '0;
    clear_cfg();
    nlev = 2'd3;
    alu_cfg[0][0][0] = mk(FU_ADD, 1, 2, 3, 0, 0);    // r1 = r2 + r3
    alu_cfg[0][0][1] = mk(FU_SLL, 4, 1, 0, 1, 2);    // r4 = r1 << 2
    ls_cfg[0][0]     = mk(FU_ST, 5, 6, 0, 1, 0);     // mem[r6] = r5
    ls_cfg[1][0]     = mk(FU_LD, 7, 6, 0, 1, 0);     // r7 = mem[r6]
    mul_cfg[2][0]    = mk(FU_UMUL, 8, 4, 7, 0, 0);   // r8 = r4 * r7
    alu_cfg[2][1][0] = mk(FU_ADD, 9, 7, 1, 0, 0);    // r9 = r7 + r1
    alu_cfg[2][2][2] = mk(FU_OR, 10, 9, 0, 1, 1);    // r10 = r9 | 1 (column 2 of level 2)
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      logic [31:0] e1, e4, e9;
      for (int r = 0; r < 32; r++) rf_in[r] = $urandom;
      rf_in[0] = 0;
      rf_in[6] = 32'($urandom_range(0, 255)) * 4;
      run(lat);
      e1 = rf_in[2] + rf_in[3];
      e4 = e1 << 2;
      e9 = rf_in[5] + e1;
      check("latency 3 levels", 32'(lat), 32'(3 + 1));
      check("r1", wb_data[1], e1);
      check("r4", wb_data[4], e4);
      check("r7", wb_data[7], rf_in[5]);
      check("r8", wb_data[8], e4 * rf_in[5]);
      check("r9", wb_data[9], e9);
      check("r10", wb_data[10], e9 | 1);
      check("mask", wb_mask, 32'h0000_0792);
      check("mem", tbmem[rf_in[6] >> 2], rf_in[5]);
      @(negedge clk);
      check("idle after done", 32'(busy), 0);
    end
    // one-level block
    clear_cfg();
    nlev = 2'd1;
    alu_cfg[0][1][0] = mk(FU_XOR, 20, 21, 22, 0, 0);
    for (int r = 0; r < 32; r++) rf_in[r] = $urandom;
    run(lat);
    check("latency 1 level", 32'(lat), 32'(1 + 1));
    check("r20", wb_data[20], rf_in[21] ^ rf_in[22]);
    check("mask1", wb_mask, 32'h0010_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
