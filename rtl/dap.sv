// dap: Dynamic Adaptive Processor, one core of HARTMP.
//
// A DAP couples four parts, as in the document: the reconfigurable datapath (reconf_array), the
// SPARC V8 processor (gpp), the storage (address cache, reconfiguration memory, and the core's
// instruction and data memories) and the binary translator (ddh). The translator watches the
// instructions the processor retires and stores each basic block as an array configuration. When
// the fetch address hits in the address cache the processor drains, the block's configuration is
// read (one cycle), the array runs it (one cycle to load, one per level, one to write the registers
// back) and the processor resumes after the block. Cores differ only in the array parameters.
//
// Local memories (this design's choice where the document names only "the usual L1 caches"): an
// instruction RAM with a load port used before reset is released, and a data RAM with one port per
// array memory unit; the processor uses port 0 while the array is idle. Reads are asynchronous,
// writes happen at the clock edge, and with several stores in one cycle the higher port wins.
// Accesses with address bit 31 set leave the core as single-word requests to the shared L2 at
// (SM_X, SM_Y) through the network interface below (one outstanding request, response flits
// always accepted).
module dap
  import hartmp_pkg::*;
#(
  parameter int unsigned LEVELS    = 3,
  parameter int unsigned ROWS      = 3,
  parameter int unsigned MULTS     = 1,
  parameter int unsigned LDST      = 2,
  parameter int unsigned NCONF     = 32,
  parameter int unsigned IN_CTX    = 8,
  parameter int unsigned MIN_INSTR = 3,
  parameter int unsigned IADDR_W   = 10,
  parameter int unsigned DADDR_W   = 12,
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter logic [COORD_W-1:0] SM_X = '0,
  parameter logic [COORD_W-1:0] SM_Y = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               im_we,
  input  logic [IADDR_W-1:0] im_addr,
  input  logic [31:0]        im_wdata,
  // network
  output flit_t              tx_flit,
  output logic               tx_valid,
  input  logic               tx_ready,
  input  flit_t              rx_flit,
  input  logic               rx_valid,
  output logic               rx_ready,
  // observation
  input  logic [4:0]         dbg_reg,
  output logic [31:0]        dbg_data,
  output logic               halted,
  output logic [31:0]        st_retired,
  output logic [31:0]        st_array_runs,
  output logic [31:0]        st_configs,
  output logic [31:0]        st_close_full,
  output logic [31:0]        st_close_ctx
);

  localparam int unsigned NFU   = ROWS * ALU_COLS + MULTS + LDST;
  localparam int unsigned IDX_W = (NCONF > 1) ? $clog2(NCONF) : 1;
  localparam int unsigned LV_W  = (LEVELS > 1) ? $clog2(LEVELS) : 1;
  localparam int unsigned FU_W  = (NFU > 1) ? $clog2(NFU) : 1;
  localparam int unsigned NLV_W = $clog2(LEVELS + 1);

  // ------------------------------------------------------------------ memories
  logic [31:0] imem [2**IADDR_W];
  logic [31:0] dmem [2**DADDR_W];

  logic [IADDR_W-1:0] i_addr;
  logic [31:0]        i_data;
  always_ff @(posedge clk) if (im_we) imem[im_addr] <= im_wdata;
  assign i_data = imem[i_addr];

  logic [DADDR_W-1:0] g_daddr;
  logic               g_dwe;
  logic [31:0]        g_dwdata;
  logic [DADDR_W-1:0] a_addr  [LDST];
  logic               a_we    [LDST];
  logic [31:0]        a_wdata [LDST];
  logic [31:0]        a_rdata [LDST];
  logic               arr_busy;

  logic [DADDR_W-1:0] p_addr  [LDST];
  logic               p_we    [LDST];
  logic [31:0]        p_wdata [LDST];
  always_comb begin
    p_addr = a_addr;  p_we = a_we;  p_wdata = a_wdata;
    if (!arr_busy) begin
      p_addr[0] = g_daddr;  p_we[0] = g_dwe;  p_wdata[0] = g_dwdata;
      for (int u = 1; u < LDST; u++) p_we[u] = 1'b0;
    end
  end
  always_ff @(posedge clk)
    for (int u = 0; u < LDST; u++) if (p_we[u]) dmem[p_addr[u]] <= p_wdata[u];
  always_comb for (int u = 0; u < LDST; u++) a_rdata[u] = dmem[p_addr[u]];

  // ------------------------------------------------------------------ processor
  logic        sh_req, sh_we, sh_done;
  logic [31:0] sh_addr, sh_wdata, sh_rdata;
  logic [31:0] fetch_pc;
  logic        ac_hit, ddh_busy, arr_go, arr_done;
  logic [31:0] resume_pc, arr_wmask;
  logic [31:0] arr_wdata [32];
  logic [31:0] rf_view [32];
  logic        ret_valid;
  logic [31:0] ret_pc, ret_instr;

  gpp #(.IADDR_W(IADDR_W), .DADDR_W(DADDR_W)) u_gpp (
    .clk, .rst_n,
    .i_addr, .i_data,
    .d_addr(g_daddr), .d_we(g_dwe), .d_wdata(g_dwdata), .d_rdata(a_rdata[0]),
    .sh_req, .sh_we, .sh_addr, .sh_wdata, .sh_done, .sh_rdata,
    .fetch_pc, .ac_hit, .ddh_busy, .arr_go, .arr_done,
    .arr_resume_pc(resume_pc), .arr_wmask, .arr_wdata, .rf_out(rf_view),
    .ret_valid, .ret_pc, .ret_instr, .halted
  );

  // ------------------------------------------------------------------ address cache + config memory
  logic [IDX_W-1:0] hit_idx, alloc_idx, commit_idx, clr_idx, wr_idx, hdr_idx;
  logic             ac_alloc, ac_commit, clr_en, wr_en, hdr_en;
  logic [31:0]      commit_pc, hdr_end_pc, rd_end_pc;
  logic [LV_W-1:0]  wr_level;
  logic [FU_W-1:0]  wr_unit;
  fu_cfg_t          wr_cfg;
  logic [NLV_W-1:0] hdr_nlev, rd_nlev;
  fu_cfg_t          cfg_alu [LEVELS][ROWS][ALU_COLS];
  fu_cfg_t          cfg_mul [LEVELS][MULTS];
  fu_cfg_t          cfg_ls  [LEVELS][LDST];

  addr_cache #(.NENT(NCONF)) u_ac (
    .clk, .rst_n, .lookup_pc(fetch_pc), .hit(ac_hit), .hit_idx,
    .alloc(ac_alloc), .alloc_idx, .commit(ac_commit), .commit_idx, .commit_pc
  );

  reconf_mem #(.NCONF(NCONF), .LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST)) u_rm (
    .clk, .rst_n,
    .clr_en, .clr_idx, .wr_en, .wr_idx, .wr_level, .wr_unit, .wr_cfg,
    .hdr_en, .hdr_idx, .hdr_nlev, .hdr_end_pc,
    .rd_idx(hit_idx), .rd_alu(cfg_alu), .rd_mul(cfg_mul), .rd_ls(cfg_ls),
    .rd_nlev, .rd_end_pc
  );

  // ------------------------------------------------------------------ translator
  logic ev_full, ev_ctx, ev_drop;
  ddh #(.LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST), .NCONF(NCONF),
        .IN_CTX(IN_CTX), .MIN_INSTR(MIN_INSTR)) u_ddh (
    .clk, .rst_n, .ret_valid, .ret_pc, .ret_instr, .array_exec(arr_go), .busy(ddh_busy),
    .ac_alloc, .ac_alloc_idx(alloc_idx), .ac_commit, .ac_commit_idx(commit_idx),
    .ac_commit_pc(commit_pc),
    .rm_clr_en(clr_en), .rm_clr_idx(clr_idx), .rm_wr_en(wr_en), .rm_wr_idx(wr_idx),
    .rm_wr_level(wr_level), .rm_wr_unit(wr_unit), .rm_wr_cfg(wr_cfg),
    .rm_hdr_en(hdr_en), .rm_hdr_idx(hdr_idx), .rm_hdr_nlev(hdr_nlev),
    .rm_hdr_end_pc(hdr_end_pc),
    .ev_full, .ev_ctx, .ev_drop
  );

  // ------------------------------------------------------------------ array
  logic arr_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr_start <= 1'b0;
      resume_pc <= '0;
    end else begin
      arr_start <= arr_go;                      // configuration is read during this cycle
      if (arr_start) resume_pc <= rd_end_pc;
    end
  end

  reconf_array #(.LEVELS(LEVELS), .ROWS(ROWS), .MULTS(MULTS), .LDST(LDST),
                 .DADDR_W(DADDR_W)) u_array (
    .clk, .rst_n, .start(arr_start),
    .alu_cfg(cfg_alu), .mul_cfg(cfg_mul), .ls_cfg(cfg_ls), .nlev(rd_nlev),
    .rf_in(rf_view),
    .mem_addr(a_addr), .mem_we(a_we), .mem_wdata(a_wdata), .mem_rdata(a_rdata),
    .busy(arr_busy), .done(arr_done), .wb_mask(arr_wmask), .wb_data(arr_wdata)
  );

  // ------------------------------------------------------------------ network interface
  typedef enum logic [1:0] { N_IDLE, N_SEND, N_WAIT } ni_e;
  ni_e ni_state;

  always_comb begin
    tx_flit       = '0;
    tx_flit.dst_x = SM_X;
    tx_flit.dst_y = SM_Y;
    tx_flit.src_x = MY_X;
    tx_flit.src_y = MY_Y;
    tx_flit.kind  = sh_we ? PK_WR_REQ : PK_RD_REQ;
    tx_flit.addr  = sh_addr;
    tx_flit.data  = sh_wdata;
  end
  assign tx_valid = (ni_state == N_SEND);
  assign rx_ready = 1'b1;
  assign sh_done  = (ni_state == N_WAIT) && rx_valid &&
                    (rx_flit.kind == PK_RD_RSP || rx_flit.kind == PK_WR_ACK);
  assign sh_rdata = rx_flit.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ni_state <= N_IDLE;
    else begin
      case (ni_state)
        N_IDLE:  if (sh_req) ni_state <= N_SEND;
        N_SEND:  if (tx_ready) ni_state <= N_WAIT;
        N_WAIT:  if (sh_done) ni_state <= N_IDLE;
        default: ni_state <= N_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ observation
  assign dbg_data = rf_view[dbg_reg];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_retired <= '0;  st_array_runs <= '0;  st_configs <= '0;
      st_close_full <= '0;  st_close_ctx <= '0;
    end else begin
      if (ret_valid) st_retired <= st_retired + 1'b1;
      if (arr_go)    st_array_runs <= st_array_runs + 1'b1;
      if (ac_commit) st_configs <= st_configs + 1'b1;
      if (ev_full)   st_close_full <= st_close_full + 1'b1;
      if (ev_ctx)    st_close_ctx <= st_close_ctx + 1'b1;
    end
  end

endmodule
