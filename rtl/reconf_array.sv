// reconf_array: the reconfigurable datapath of one DAP (input/output context registers plus a
// matrix of LEVELS levels).
//
// A configuration is one translated basic block. When `start` is pulsed, the array loads the
// configuration into its configuration registers and copies the register file into the input
// context register (cycle 0). It then activates one level per clock cycle, level 0 first,
// and stops after `nlev` levels: each cycle the active level's output context is captured in the
// context register and its stores are written to the data memory. In the last cycle (`done`)
// the output context is presented with a write mask of every register the block produced, and the
// register file takes those values. A block of n levels therefore takes n + 2 cycles.
// Levels, rows, multipliers and memory units per level follow the document's table (small core by
// default); one level per processor cycle follows its statement that three chained ALUs fit in the
// multiplier's critical path. The start/done handshake and the cycle counts are this design's own.
module reconf_array
  import hartmp_pkg::*;
#(
  parameter int unsigned LEVELS  = 3,
  parameter int unsigned ROWS    = 3,
  parameter int unsigned MULTS   = 1,
  parameter int unsigned LDST    = 2,
  parameter int unsigned DADDR_W = 12,
  localparam int unsigned LVL_W  = $clog2(LEVELS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  fu_cfg_t            alu_cfg [LEVELS][ROWS][ALU_COLS],
  input  fu_cfg_t            mul_cfg [LEVELS][MULTS],
  input  fu_cfg_t            ls_cfg  [LEVELS][LDST],
  input  logic [LVL_W-1:0]   nlev,
  input  logic [31:0]        rf_in   [32],
  output logic [DADDR_W-1:0] mem_addr  [LDST],
  output logic               mem_we    [LDST],
  output logic [31:0]        mem_wdata [LDST],
  input  logic [31:0]        mem_rdata [LDST],
  output logic               busy,
  output logic               done,
  output logic [31:0]        wb_mask,
  output logic [31:0]        wb_data [32]
);

  typedef enum logic [1:0] { A_IDLE, A_RUN, A_DONE } astate_e;
  astate_e state;

  fu_cfg_t          alu_q [LEVELS][ROWS][ALU_COLS];
  fu_cfg_t          mul_q [LEVELS][MULTS];
  fu_cfg_t          ls_q  [LEVELS][LDST];
  logic [LVL_W-1:0] nlev_q;
  logic [LVL_W-1:0] lvl;
  logic [31:0]      ctx [32];
  logic [31:0]      mask_q;

  logic [31:0]        lv_ctx   [LEVELS][32];
  logic [31:0]        lv_mask  [LEVELS];
  logic [DADDR_W-1:0] lv_addr  [LEVELS][LDST];
  logic               lv_we    [LEVELS][LDST];
  logic [31:0]        lv_wdata [LEVELS][LDST];

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    array_level #(.ROWS(ROWS), .MULTS(MULTS), .LDST(LDST), .DADDR_W(DADDR_W)) u_level (
      .ctx_in   (ctx),
      .alu_cfg  (alu_q[l]),
      .mul_cfg  (mul_q[l]),
      .ls_cfg   (ls_q[l]),
      .mem_addr (lv_addr[l]),
      .mem_we   (lv_we[l]),
      .mem_wdata(lv_wdata[l]),
      .mem_rdata(mem_rdata),
      .ctx_out  (lv_ctx[l]),
      .wmask    (lv_mask[l])
    );
  end

  // The active level drives the memory ports.
  always_comb begin
    for (int u = 0; u < LDST; u++) begin
      mem_addr[u]  = '0;
      mem_we[u]    = 1'b0;
      mem_wdata[u] = '0;
      for (int l = 0; l < LEVELS; l++) begin
        if (int'(lvl) == l) begin
          mem_addr[u]  = lv_addr[l][u];
          mem_we[u]    = lv_we[l][u] && (state == A_RUN);
          mem_wdata[u] = lv_wdata[l][u];
        end
      end
    end
  end

  logic [31:0] sel_ctx [32];
  logic [31:0] sel_mask;
  always_comb begin
    sel_ctx  = ctx;
    sel_mask = '0;
    for (int l = 0; l < LEVELS; l++) begin
      if (int'(lvl) == l) begin
        sel_ctx  = lv_ctx[l];
        sel_mask = lv_mask[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      lvl    <= '0;
      nlev_q <= '0;
      mask_q <= '0;
      for (int r = 0; r < 32; r++) ctx[r] <= '0;
      for (int l = 0; l < LEVELS; l++) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < ALU_COLS; c++) alu_q[l][r][c] <= '0;
        for (int m = 0; m < MULTS; m++) mul_q[l][m] <= '0;
        for (int u = 0; u < LDST; u++) ls_q[l][u] <= '0;
      end
    end else begin
      case (state)
        A_IDLE: if (start) begin
          alu_q  <= alu_cfg;
          mul_q  <= mul_cfg;
          ls_q   <= ls_cfg;
          nlev_q <= nlev;
          ctx    <= rf_in;
          mask_q <= '0;
          lvl    <= '0;
          state  <= (nlev == '0) ? A_DONE : A_RUN;
        end
        A_RUN: begin
          ctx    <= sel_ctx;
          mask_q <= mask_q | sel_mask;
          if (lvl == nlev_q - 1'b1) state <= A_DONE;
          else lvl <= lvl + 1'b1;
        end
        A_DONE: begin
          state <= A_IDLE;
          lvl   <= '0;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assign busy    = (state != A_IDLE);
  assign done    = (state == A_DONE);
  assign wb_mask = mask_q & 32'hFFFF_FFFE;
  assign wb_data = ctx;

endmodule
