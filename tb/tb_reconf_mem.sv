// tb_reconf_mem: writes unit words and headers into several slots, clears one slot, and checks
// the synchronous whole-configuration read (one cycle after the index is given) against a model.
// Slot counts follow the document; the layout of a unit's control word is this design's own.
module tb_reconf_mem;
  import hartmp_pkg::*;
  localparam int NCONF = 4, LEVELS = 3, ROWS = 3, MULTS = 1, LDST = 2;
  localparam int NFU = ROWS * ALU_COLS + MULTS + LDST;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       clr_en, wr_en, hdr_en;
  logic [1:0] clr_idx, wr_idx, hdr_idx, rd_idx;
  logic [1:0] wr_level;
  logic [3:0] wr_unit;
  fu_cfg_t    wr_cfg;
  logic [1:0] hdr_nlev, rd_nlev;
  logic [31:0] hdr_end_pc, rd_end_pc;
  fu_cfg_t    rd_alu [LEVELS][ROWS][ALU_COLS];
  fu_cfg_t    rd_mul [LEVELS][MULTS];
  fu_cfg_t    rd_ls  [LEVELS][LDST];

  fu_cfg_t     model [NCONF][LEVELS][NFU];
  logic [31:0] mpc [NCONF];
  logic [1:0]  mnl [NCONF];
  int checks = 0, failures = 0;

  reconf_mem #(.NCONF(NCONF), .LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST)) dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic fu_cfg_t unit_of(int l, int f);
    if (f < ROWS * ALU_COLS) return rd_alu[l][f / ALU_COLS][f % ALU_COLS];
    if (f < ROWS * ALU_COLS + MULTS) return rd_mul[l][f - ROWS * ALU_COLS];
    return rd_ls[l][f - ROWS * ALU_COLS - MULTS];
  endfunction

  task automatic read_check(int s);
    @(negedge clk) rd_idx = 2'(s);
    @(negedge clk);
    for (int l = 0; l < LEVELS; l++)
      for (int f = 0; f < NFU; f++) begin
        fu_cfg_t g, e;
        g = unit_of(l, f);
        e = model[s][l][f];
        if (!e.valid) check("invalid unit", 64'(g.valid), 0);
        else check("unit", 64'(g), 64'(e));
      end
    check("nlev", 64'(rd_nlev), 64'(mnl[s]));
    check("end pc", 64'(rd_end_pc), 64'(mpc[s]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_en = 0; wr_en = 0; hdr_en = 0; rd_idx = 0; clr_idx = 0; wr_idx = 0; hdr_idx = 0;
    wr_level = 0; wr_unit = 0; wr_cfg = '0; hdr_nlev = 0; hdr_end_pc = 0;
    for (int s = 0; s < NCONF; s++) for (int l = 0; l < LEVELS; l++) for (int f = 0; f < NFU; f++)
      model[s][l][f] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NCONF; s++) begin
      @(negedge clk);
      clr_en = 1; clr_idx = 2'(s);
      @(negedge clk);
      clr_en = 0;
      for (int k = 0; k < 10; k++) begin
        int l, f;
        fu_cfg_t c;
        l = $urandom_range(0, LEVELS - 1);
        f = $urandom_range(0, NFU - 1);
        c = fu_cfg_t'({$urandom, $urandom});
        c.valid = 1'b1;
        wr_en = 1; wr_idx = 2'(s); wr_level = 2'(l); wr_unit = 4'(f); wr_cfg = c;
        model[s][l][f] = c;
        @(negedge clk);
      end
      wr_en = 0;
      hdr_en = 1; hdr_idx = 2'(s); hdr_nlev = 2'($urandom_range(1, 3)); hdr_end_pc = $urandom;
      mnl[s] = hdr_nlev; mpc[s] = hdr_end_pc;
      @(negedge clk);
      hdr_en = 0;
    end
    for (int s = 0; s < NCONF; s++) read_check(s);
    // clearing slot 2 empties it and leaves the others alone
    @(negedge clk) clr_en = 1; clr_idx = 2;
    @(negedge clk) clr_en = 0;
    for (int l = 0; l < LEVELS; l++) for (int f = 0; f < NFU; f++) model[2][l][f].valid = 1'b0;
    for (int s = 0; s < NCONF; s++) read_check(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
