// ddh: Dynamic Detection Hardware, the binary translator of a DAP.
//
// It watches the instructions the processor retires, in program order, and turns each straight-line
// run of code into an array configuration. It is a four-stage pipeline, as in the document:
//   ID  decodes the SPARC instruction into an array operation, its source and destination registers;
//   DV  checks its dependences against the configuration being built: the earliest time its
//       operands exist in the array, the earliest time it may overwrite its destination (after every
//       earlier reader and writer) and which of its operands must come from the input context;
//   RA  places it on the first free unit at or after those times and updates the tables;
//   UT  writes the unit's control word into the reconfiguration memory, and on closing a block
//       writes the block header and enters its start address in the address cache.
// DV reads the tables as RA is about to leave them (next-state forwarding), so back-to-back
// dependent instructions are placed correctly at one instruction per cycle.
//
// Placement grid (this design's own, built around the document's three chained ALUs per level):
// level L offers ALU columns 0..2 that read at time 4L+c and publish at 4L+c+1, and multipliers and
// load/store units that read at 4L and publish at 4L+4. Loads are never placed at or before a
// level holding a store, and a store is placed after every earlier memory access.
//
// A block is started by the first instruction retired after a control transfer or an incompatible
// instruction, as the document says. It is closed by a control transfer, an incompatible
// instruction, a full array, an input context that would exceed IN_CTX registers, or the array
// running another block. A closed block of at least MIN_INSTR instructions is kept; its resume
// address is the first instruction not translated. After a close caused by a full array or input
// context the translator waits for the next block start.
module ddh
  import hartmp_pkg::*;
#(
  parameter int unsigned LEVELS    = 3,
  parameter int unsigned ROWS      = 3,
  parameter int unsigned MULTS     = 1,
  parameter int unsigned LDST      = 2,
  parameter int unsigned NCONF     = 32,
  parameter int unsigned IN_CTX    = 8,
  parameter int unsigned MIN_INSTR = 3,
  localparam int unsigned NFU   = ROWS * ALU_COLS + MULTS + LDST,
  localparam int unsigned IDX_W = (NCONF > 1) ? $clog2(NCONF) : 1,
  localparam int unsigned LV_W  = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned FU_W  = (NFU > 1) ? $clog2(NFU) : 1,
  localparam int unsigned NLV_W = $clog2(LEVELS + 1),
  localparam int unsigned T_W   = $clog2(LEVELS * TSLOTS + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  // retired instructions of the processor
  input  logic             ret_valid,
  input  logic [31:0]      ret_pc,
  input  logic [31:0]      ret_instr,
  input  logic             array_exec,   // the array starts a block: close what is being built
  output logic             busy,         // an instruction is in flight in the translator
  // address cache
  output logic             ac_alloc,
  input  logic [IDX_W-1:0] ac_alloc_idx,
  output logic             ac_commit,
  output logic [IDX_W-1:0] ac_commit_idx,
  output logic [31:0]      ac_commit_pc,
  // reconfiguration memory
  output logic             rm_clr_en,
  output logic [IDX_W-1:0] rm_clr_idx,
  output logic             rm_wr_en,
  output logic [IDX_W-1:0] rm_wr_idx,
  output logic [LV_W-1:0]  rm_wr_level,
  output logic [FU_W-1:0]  rm_wr_unit,
  output fu_cfg_t          rm_wr_cfg,
  output logic             rm_hdr_en,
  output logic [IDX_W-1:0] rm_hdr_idx,
  output logic [NLV_W-1:0] rm_hdr_nlev,
  output logic [31:0]      rm_hdr_end_pc,
  // events, one-cycle pulses
  output logic             ev_full,      // block closed because no unit was free
  output logic             ev_ctx,       // block closed because the input context was full
  output logic             ev_drop       // block closed with too few instructions, dropped
);

  typedef enum logic [2:0] { K_ALU, K_MUL, K_LD, K_ST, K_SKIP, K_CTRL, K_INC } kind_e;

  typedef struct packed {
    logic        valid;
    logic        start;
    kind_e       kind;
    logic [31:0] pc;
    fu_cfg_t     cfg;
    logic [31:0] src_mask;   // registers read (r0 excluded)
    logic [31:0] dst_mask;   // register written (r0 excluded)
  } id_t;

  typedef struct packed {
    id_t             i;
    logic [T_W-1:0]  t_rd;     // earliest read time
    logic [T_W-1:0]  t_wr;     // earliest publish time
    logic [31:0]     ctx_mask; // sources that come from the input context
  } dv_t;

  // ------------------------------------------------------------------ ID stage
  logic after_ctrl;
  id_t  id_q;

  function automatic id_t decode(input logic [31:0] ins, input logic [31:0] pc);
    id_t d;
    logic [1:0] op;
    logic [5:0] op3;
    op  = ins[31:30];
    op3 = ins[24:19];
    d = '0;
    d.valid = 1'b1;
    d.pc    = pc;
    d.cfg.valid   = 1'b1;
    d.cfg.rd      = ins[29:25];
    d.cfg.rs1     = ins[18:14];
    d.cfg.rs2     = ins[4:0];
    d.cfg.use_imm = ins[13];
    d.cfg.imm     = {{9{ins[12]}}, ins[12:0]};
    d.kind = K_INC;
    case (op)
      2'b01: d.kind = K_CTRL;                                  // CALL
      2'b00: begin
        if (ins[24:22] == 3'b100) begin                        // SETHI
          d.kind        = K_ALU;
          d.cfg.op      = FU_SETHI;
          d.cfg.rs1     = 5'd0;
          d.cfg.use_imm = 1'b1;
          d.cfg.imm     = ins[21:0];
        end else if (ins[24:22] == 3'b010) d.kind = K_CTRL;   // Bicc
      end
      2'b10: begin
        case (op3)
          6'b000000, 6'b000100, 6'b000001, 6'b000010, 6'b000011, 6'b000101, 6'b000110,
          6'b000111, 6'b100101, 6'b100110, 6'b100111: begin
            d.kind   = K_ALU;
            d.cfg.op = alu_op3_to_fu(op3);
          end
          6'b001010, 6'b001011: begin
            d.kind   = K_MUL;
            d.cfg.op = alu_op3_to_fu(op3);
          end
          6'b111000, 6'b111010: d.kind = K_CTRL;               // JMPL, Ticc
          default: d.kind = K_INC;
        endcase
      end
      default: begin
        if (op3 == 6'b000000) begin d.kind = K_LD; d.cfg.op = FU_LD; end
        else if (op3 == 6'b000100) begin d.kind = K_ST; d.cfg.op = FU_ST; end
      end
    endcase
    if ((d.kind == K_ALU || d.kind == K_MUL || d.kind == K_LD) && d.cfg.rd == 5'd0)
      d.kind = (d.kind == K_LD) ? K_LD : K_SKIP;
    if (d.kind inside {K_ALU, K_MUL, K_LD, K_ST}) begin
      d.src_mask[d.cfg.rs1] = 1'b1;
      if (!d.cfg.use_imm) d.src_mask[d.cfg.rs2] = 1'b1;
      if (d.kind == K_ST) d.src_mask[d.cfg.rd] = 1'b1;
      else                d.dst_mask[d.cfg.rd] = 1'b1;
      d.src_mask[0] = 1'b0;
      d.dst_mask[0] = 1'b0;
    end
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q       <= '0;
      after_ctrl <= 1'b0;
    end else begin
      id_t dec;
      dec = decode(ret_instr, ret_pc);
      id_q <= '0;
      if (array_exec) after_ctrl <= 1'b0;
      if (ret_valid) begin
        if (dec.kind inside {K_CTRL, K_INC}) after_ctrl <= 1'b1;
        else if (after_ctrl) begin
          after_ctrl <= 1'b0;
          dec.start  = 1'b1;
        end
        id_q <= dec;
      end
    end
  end

  // ------------------------------------------------------------------ tables (state of RA)
  logic [T_W-1:0]   avail   [32];    // time from which the register's newest value exists
  logic [T_W-1:0]   lastrd  [32];    // latest time the register is read
  logic [31:0]      written;         // registers produced by the block
  logic [31:0]      ictx;            // registers taken from the input context
  logic [$clog2(ROWS+1)-1:0]  alu_used [LEVELS][ALU_COLS];
  logic [$clog2(MULTS+1)-1:0] mul_used [LEVELS];
  logic [$clog2(LDST+1)-1:0]  ls_used  [LEVELS];
  logic [NLV_W-1:0] mem_bound, st_bound, maxlev;
  logic [15:0]      ninstr;
  logic             open;
  logic [IDX_W-1:0] slot;
  logic [31:0]      start_pc, next_pc;

  // next-state copies, computed by RA
  logic [T_W-1:0]   n_avail  [32];
  logic [T_W-1:0]   n_lastrd [32];
  logic [31:0]      n_written, n_ictx;
  logic [$clog2(ROWS+1)-1:0]  n_alu_used [LEVELS][ALU_COLS];
  logic [$clog2(MULTS+1)-1:0] n_mul_used [LEVELS];
  logic [$clog2(LDST+1)-1:0]  n_ls_used  [LEVELS];
  logic [NLV_W-1:0] n_mem_bound, n_st_bound, n_maxlev;
  logic [15:0]      n_ninstr;
  logic             n_open;
  logic [IDX_W-1:0] n_slot;
  logic [31:0]      n_start_pc, n_next_pc;

  // ------------------------------------------------------------------ DV stage
  dv_t dv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv_q <= '0;
    end else begin
      dv_t d;
      d = '0;
      d.i = id_q;
      if (id_q.valid) begin
        for (int r = 1; r < 32; r++) begin
          logic [T_W-1:0] av, lr;
          logic           wr;
          av = id_q.start ? '0 : n_avail[r];
          lr = id_q.start ? '0 : n_lastrd[r];
          wr = id_q.start ? 1'b0 : n_written[r];
          if (id_q.src_mask[r]) begin
            if (av > d.t_rd) d.t_rd = av;
            if (!wr) d.ctx_mask[r] = 1'b1;
          end
          if (id_q.dst_mask[r]) begin
            if (av + 1'b1 > d.t_wr) d.t_wr = av + 1'b1;
            if (lr + 1'b1 > d.t_wr) d.t_wr = lr + 1'b1;
          end
        end
      end
      dv_q <= d;
    end
  end

  // ------------------------------------------------------------------ RA stage
  typedef struct packed {
    logic             wr;       // write one unit
    logic             clr;      // clear the slot (block start)
    logic             hdr;      // close: header + address cache commit
    logic [IDX_W-1:0] idx;
    logic [LV_W-1:0]  level;
    logic [FU_W-1:0]  unit;
    fu_cfg_t          cfg;
    logic [NLV_W-1:0] nlev;
    logic [31:0]      end_pc;
    logic [31:0]      start_pc;
  } ut_t;

  ut_t  ut_d, ut_q;
  logic ra_fail_full, ra_fail_ctx, ra_drop;

  function automatic int unsigned popcount32(input logic [31:0] v);
    int unsigned n;
    n = 0;
    for (int b = 0; b < 32; b++) n += int'(v[b]);
    return n;
  endfunction

  always_comb begin
    logic        found, do_close;
    int unsigned lv, col, unit;
    logic [T_W-1:0] tr, tw, str;
    id_t         i;
    i = dv_q.i;

    n_avail = avail;  n_lastrd = lastrd;  n_written = written;  n_ictx = ictx;
    n_alu_used = alu_used;  n_mul_used = mul_used;  n_ls_used = ls_used;
    n_mem_bound = mem_bound;  n_st_bound = st_bound;  n_maxlev = maxlev;
    n_ninstr = ninstr;  n_open = open;  n_slot = slot;
    n_start_pc = start_pc;  n_next_pc = next_pc;
    ut_d = '0;
    ra_fail_full = 1'b0;  ra_fail_ctx = 1'b0;  ra_drop = 1'b0;
    found = 1'b0;  do_close = 1'b0;
    lv = 0;  col = 0;  unit = 0;  tr = '0;  tw = '0;  str = '0;

    if (i.valid && i.start && i.kind inside {K_ALU, K_MUL, K_LD, K_ST, K_SKIP}) begin
      for (int r = 0; r < 32; r++) begin n_avail[r] = '0; n_lastrd[r] = '0; end
      n_written = '0;  n_ictx = '0;
      for (int l = 0; l < LEVELS; l++) begin
        for (int c = 0; c < ALU_COLS; c++) n_alu_used[l][c] = '0;
        n_mul_used[l] = '0;
        n_ls_used[l]  = '0;
      end
      n_mem_bound = '0;  n_st_bound = '0;  n_maxlev = '0;  n_ninstr = '0;
      n_open = 1'b1;
      // a block committed in UT this cycle has not yet moved the address cache's pointer
      if (ut_q.hdr) n_slot = (int'(ut_q.idx) == NCONF - 1) ? '0 : ut_q.idx + 1'b1;
      else          n_slot = ac_alloc_idx;
      n_start_pc = i.pc;
      n_next_pc  = i.pc;
      ut_d.clr = 1'b1;
      ut_d.idx = n_slot;
    end

    if (i.valid && n_open) begin
      case (i.kind)
        K_ALU: begin
          for (int s = LEVELS * ALU_COLS - 1; s >= 0; s--) begin
            str = T_W'((s / ALU_COLS) * TSLOTS + (s % ALU_COLS));
            if (str >= dv_q.t_rd && str + 1'b1 >= dv_q.t_wr &&
                int'(n_alu_used[s / ALU_COLS][s % ALU_COLS]) < ROWS) begin
              found = 1'b1;  lv = s / ALU_COLS;  col = s % ALU_COLS;
            end
          end
          if (found) begin
            tr   = T_W'(lv * TSLOTS + col);
            tw   = tr + 1'b1;
            unit = int'(n_alu_used[lv][col]) * ALU_COLS + col;
            n_alu_used[lv][col] = n_alu_used[lv][col] + 1'b1;
          end
        end
        K_MUL: begin
          for (int l = LEVELS - 1; l >= 0; l--) begin
            if (T_W'(l * TSLOTS) >= dv_q.t_rd && T_W'((l + 1) * TSLOTS) >= dv_q.t_wr &&
                int'(n_mul_used[l]) < MULTS) begin
              found = 1'b1;  lv = l;
            end
          end
          if (found) begin
            tr   = T_W'(lv * TSLOTS);
            tw   = T_W'((lv + 1) * TSLOTS);
            unit = ROWS * ALU_COLS + int'(n_mul_used[lv]);
            n_mul_used[lv] = n_mul_used[lv] + 1'b1;
          end
        end
        K_LD, K_ST: begin
          for (int l = LEVELS - 1; l >= 0; l--) begin
            if (T_W'(l * TSLOTS) >= dv_q.t_rd && T_W'((l + 1) * TSLOTS) >= dv_q.t_wr &&
                int'(n_ls_used[l]) < LDST &&
                l >= ((i.kind == K_ST) ? int'(n_mem_bound) : int'(n_st_bound))) begin
              found = 1'b1;  lv = l;
            end
          end
          if (found) begin
            tr   = T_W'(lv * TSLOTS);
            tw   = T_W'((lv + 1) * TSLOTS);
            unit = ROWS * ALU_COLS + MULTS + int'(n_ls_used[lv]);
            n_ls_used[lv] = n_ls_used[lv] + 1'b1;
            if (NLV_W'(lv + 1) > n_mem_bound) n_mem_bound = NLV_W'(lv + 1);
            if (i.kind == K_ST && NLV_W'(lv + 1) > n_st_bound) n_st_bound = NLV_W'(lv + 1);
          end
        end
        K_SKIP: begin
          n_ninstr  = n_ninstr + 1'b1;
          n_next_pc = i.pc + 32'd4;
        end
        default: do_close = 1'b1;   // control transfer or incompatible instruction
      endcase

      if (i.kind inside {K_ALU, K_MUL, K_LD, K_ST}) begin
        if (popcount32(n_ictx | dv_q.ctx_mask) > IN_CTX) begin
          do_close = 1'b1;
          ra_fail_ctx = 1'b1;
        end else if (!found) begin
          do_close = 1'b1;
          ra_fail_full = 1'b1;
        end else begin
          for (int r = 1; r < 32; r++) begin
            if (i.src_mask[r] && tr > n_lastrd[r]) n_lastrd[r] = tr;
            if (i.dst_mask[r]) n_avail[r] = tw;
          end
          n_written = n_written | i.dst_mask;
          n_ictx    = n_ictx | dv_q.ctx_mask;
          if (NLV_W'(lv + 1) > n_maxlev) n_maxlev = NLV_W'(lv + 1);
          n_ninstr  = n_ninstr + 1'b1;
          n_next_pc = i.pc + 32'd4;
          ut_d.wr    = 1'b1;
          ut_d.idx   = n_slot;
          ut_d.level = LV_W'(lv);
          ut_d.unit  = FU_W'(unit);
          ut_d.cfg   = i.cfg;
        end
      end
    end

    if (array_exec && open) do_close = 1'b1;

    if (do_close && n_open) begin
      n_open = 1'b0;
      if (int'(n_ninstr) >= MIN_INSTR) begin
        ut_d.hdr      = 1'b1;
        ut_d.idx      = n_slot;
        ut_d.nlev     = n_maxlev;
        ut_d.end_pc   = n_next_pc;
        ut_d.start_pc = n_start_pc;
      end else begin
        ra_drop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 32; r++) begin avail[r] <= '0; lastrd[r] <= '0; end
      written <= '0;  ictx <= '0;
      for (int l = 0; l < LEVELS; l++) begin
        for (int c = 0; c < ALU_COLS; c++) alu_used[l][c] <= '0;
        mul_used[l] <= '0;
        ls_used[l]  <= '0;
      end
      mem_bound <= '0;  st_bound <= '0;  maxlev <= '0;  ninstr <= '0;
      open <= 1'b0;  slot <= '0;  start_pc <= '0;  next_pc <= '0;
      ut_q <= '0;
      ev_full <= 1'b0;  ev_ctx <= 1'b0;  ev_drop <= 1'b0;
    end else begin
      avail <= n_avail;  lastrd <= n_lastrd;  written <= n_written;  ictx <= n_ictx;
      alu_used <= n_alu_used;  mul_used <= n_mul_used;  ls_used <= n_ls_used;
      mem_bound <= n_mem_bound;  st_bound <= n_st_bound;  maxlev <= n_maxlev;
      ninstr <= n_ninstr;  open <= n_open;  slot <= n_slot;
      start_pc <= n_start_pc;  next_pc <= n_next_pc;
      ut_q <= ut_d;
      ev_full <= ra_fail_full;  ev_ctx <= ra_fail_ctx;  ev_drop <= ra_drop;
    end
  end

  // ------------------------------------------------------------------ UT stage (outputs)
  assign ac_alloc      = ut_q.clr;
  assign ac_commit     = ut_q.hdr;
  assign ac_commit_idx = ut_q.idx;
  assign ac_commit_pc  = ut_q.start_pc;
  assign rm_clr_en     = ut_q.clr;
  assign rm_clr_idx    = ut_q.idx;
  assign rm_wr_en      = ut_q.wr;
  assign rm_wr_idx     = ut_q.idx;
  assign rm_wr_level   = ut_q.level;
  assign rm_wr_unit    = ut_q.unit;
  assign rm_wr_cfg     = ut_q.cfg;
  assign rm_hdr_en     = ut_q.hdr;
  assign rm_hdr_idx    = ut_q.idx;
  assign rm_hdr_nlev   = ut_q.nlev;
  assign rm_hdr_end_pc = ut_q.end_pc;

  assign busy = id_q.valid || dv_q.i.valid || (ut_q.wr || ut_q.clr || ut_q.hdr);

endmodule
