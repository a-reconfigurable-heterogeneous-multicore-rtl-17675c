// reconf_mem: the reconfiguration memory of a DAP.
//
// It holds NCONF configurations. A configuration is the control word of every functional unit of
// every level of the array, the number of levels the block uses and the address at which the
// processor resumes after the block (the first instruction not translated). The document sizes this
// memory by configurations per core (32 / 64 / 128); the word layout below is this design's own.
//
// Units of one level are numbered ALUs first (row*3 + column), then multipliers, then load/store
// units. The translator writes one unit per cycle (`wr_en`), and writes the header when it closes a
// block (`hdr_en`). `clr_en` empties a slot before a new block is built into it: valid bits live in
// a separate flag array so a whole slot can be cleared in one cycle. The read port is synchronous:
// `rd_idx` sampled on one edge gives the configuration on the outputs during the next cycle.
module reconf_mem
  import hartmp_pkg::*;
#(
  parameter int unsigned NCONF  = 32,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned ROWS   = 3,
  parameter int unsigned MULTS  = 1,
  parameter int unsigned LDST   = 2,
  localparam int unsigned NFU   = ROWS * ALU_COLS + MULTS + LDST,
  localparam int unsigned IDX_W = (NCONF > 1) ? $clog2(NCONF) : 1,
  localparam int unsigned LV_W  = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned FU_W  = (NFU > 1) ? $clog2(NFU) : 1,
  localparam int unsigned NLV_W = $clog2(LEVELS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // translator side
  input  logic             clr_en,
  input  logic [IDX_W-1:0] clr_idx,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [LV_W-1:0]  wr_level,
  input  logic [FU_W-1:0]  wr_unit,
  input  fu_cfg_t          wr_cfg,
  input  logic             hdr_en,
  input  logic [IDX_W-1:0] hdr_idx,
  input  logic [NLV_W-1:0] hdr_nlev,
  input  logic [31:0]      hdr_end_pc,
  // array side
  input  logic [IDX_W-1:0] rd_idx,
  output fu_cfg_t          rd_alu [LEVELS][ROWS][ALU_COLS],
  output fu_cfg_t          rd_mul [LEVELS][MULTS],
  output fu_cfg_t          rd_ls  [LEVELS][LDST],
  output logic [NLV_W-1:0] rd_nlev,
  output logic [31:0]      rd_end_pc
);

  fu_cfg_t          cfg_mem [NCONF][LEVELS][NFU];
  logic [NFU-1:0]   vld_mem [NCONF][LEVELS];
  logic [NLV_W-1:0] nlev_mem [NCONF];
  logic [31:0]      pc_mem   [NCONF];

  always_ff @(posedge clk) begin
    if (wr_en) cfg_mem[wr_idx][wr_level][wr_unit] <= wr_cfg;
    if (hdr_en) begin
      nlev_mem[hdr_idx] <= hdr_nlev;
      pc_mem[hdr_idx]   <= hdr_end_pc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCONF; i++)
        for (int l = 0; l < LEVELS; l++) vld_mem[i][l] <= '0;
    end else begin
      if (clr_en)
        for (int l = 0; l < LEVELS; l++) vld_mem[clr_idx][l] <= '0;
      if (wr_en) vld_mem[wr_idx][wr_level][wr_unit] <= wr_cfg.valid;
    end
  end

  // Synchronous read of a whole configuration.
  fu_cfg_t        rd_q   [LEVELS][NFU];
  logic [NFU-1:0] rd_vld [LEVELS];
  always_ff @(posedge clk) begin
    rd_q      <= cfg_mem[rd_idx];
    rd_vld    <= vld_mem[rd_idx];
    rd_nlev   <= nlev_mem[rd_idx];
    rd_end_pc <= pc_mem[rd_idx];
  end

  always_comb begin
    for (int l = 0; l < LEVELS; l++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < ALU_COLS; c++) begin
          rd_alu[l][r][c]       = rd_q[l][r*ALU_COLS + c];
          rd_alu[l][r][c].valid = rd_vld[l][r*ALU_COLS + c];
        end
      for (int m = 0; m < MULTS; m++) begin
        rd_mul[l][m]       = rd_q[l][ROWS*ALU_COLS + m];
        rd_mul[l][m].valid = rd_vld[l][ROWS*ALU_COLS + m];
      end
      for (int u = 0; u < LDST; u++) begin
        rd_ls[l][u]       = rd_q[l][ROWS*ALU_COLS + MULTS + u];
        rd_ls[l][u].valid = rd_vld[l][ROWS*ALU_COLS + MULTS + u];
      end
    end
  end

endmodule
