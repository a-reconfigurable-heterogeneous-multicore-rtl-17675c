// hartmp_top: HARTMP, a heterogeneous multicore whose cores share one instruction set.
//
// Four DAPs and the shared L2 are nodes of a 3 x 2 mesh network with XY routing. The cores differ
// only in their reconfigurable arrays, following the document's 4-core He1 configuration: half the
// cores are large, a quarter medium, a quarter small (CORE_CLASS, 2 = large, 1 = medium,
// 0 = small; sizes in hartmp_pkg). Placement: cores 0..3 at nodes (0,0) (1,0) (2,0) (0,1), the L2
// at (1,1); node (2,1) has a router and no endpoint. The placement is this design's own.
//
// Interface: programs are written into each core's instruction RAM through im_* while rst_n is
// low; each core starts at address 0 when reset is released and stops at a Ta instruction
// (halted). dbg_reg selects a register that every core shows on dbg_data. The L2's line-wide
// off-chip memory port is brought out (mem_*). Per-core counters report retired instructions,
// array runs, configurations built and blocks closed by a full array or input context.
module hartmp_top
  import hartmp_pkg::*;
#(
  parameter int unsigned NCORES  = 4,
  parameter int unsigned CORE_CLASS [NCORES] = '{2, 2, 1, 0},
  parameter int unsigned IADDR_W = 10,
  parameter int unsigned DADDR_W = 12,
  parameter int unsigned L2_KB   = 512,
  parameter int unsigned L2_WAYS = 8,
  localparam int unsigned MX = 3,
  localparam int unsigned MY = 2,
  localparam int unsigned SM_NODE = 4,
  localparam int unsigned LINE_WORDS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCORES-1:0]        im_we,
  input  logic [IADDR_W-1:0]       im_addr,
  input  logic [31:0]              im_wdata,
  input  logic [4:0]               dbg_reg,
  output logic [31:0]              dbg_data      [NCORES],
  output logic [NCORES-1:0]        halted,
  output logic [31:0]              st_retired    [NCORES],
  output logic [31:0]              st_array_runs [NCORES],
  output logic [31:0]              st_configs    [NCORES],
  output logic [31:0]              st_close_full [NCORES],
  output logic [31:0]              st_close_ctx  [NCORES],
  output logic [31:0]              st_l2_hits,
  output logic [31:0]              st_l2_misses,
  output logic                     mem_req,
  output logic                     mem_we,
  output logic [26:0]              mem_addr,
  output logic [LINE_WORDS*32-1:0] mem_wdata,
  input  logic                     mem_ack,
  input  logic [LINE_WORDS*32-1:0] mem_rdata
);

  localparam int unsigned NN = MX * MY;

  flit_t tx_flit  [NN];
  logic  tx_valid [NN];
  logic  tx_ready [NN];
  flit_t rx_flit  [NN];
  logic  rx_valid [NN];
  logic  rx_ready [NN];

  noc_mesh #(.MX(MX), .MY(MY)) u_noc (
    .clk, .rst_n,
    .node_tx_flit(tx_flit), .node_tx_valid(tx_valid), .node_tx_ready(tx_ready),
    .node_rx_flit(rx_flit), .node_rx_valid(rx_valid), .node_rx_ready(rx_ready)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    localparam int unsigned CLS = CORE_CLASS[c];
    dap #(
      .LEVELS (he1_levels(CLS)),
      .ROWS   (he1_alu_rows(CLS)),
      .MULTS  (he1_mults(CLS)),
      .LDST   (he1_ldst(CLS)),
      .NCONF  (he1_confs(CLS)),
      .IN_CTX (he1_inctx(CLS)),
      .IADDR_W(IADDR_W),
      .DADDR_W(DADDR_W),
      .MY_X   (COORD_W'(c % MX)),
      .MY_Y   (COORD_W'(c / MX)),
      .SM_X   (COORD_W'(SM_NODE % MX)),
      .SM_Y   (COORD_W'(SM_NODE / MX))
    ) u_dap (
      .clk, .rst_n,
      .im_we(im_we[c]), .im_addr, .im_wdata,
      .tx_flit(tx_flit[c]), .tx_valid(tx_valid[c]), .tx_ready(tx_ready[c]),
      .rx_flit(rx_flit[c]), .rx_valid(rx_valid[c]), .rx_ready(rx_ready[c]),
      .dbg_reg, .dbg_data(dbg_data[c]), .halted(halted[c]),
      .st_retired(st_retired[c]), .st_array_runs(st_array_runs[c]),
      .st_configs(st_configs[c]), .st_close_full(st_close_full[c]),
      .st_close_ctx(st_close_ctx[c])
    );
  end

  logic [31:0] l2_wbs;
  l2_shared #(
    .SIZE_KB(L2_KB), .WAYS(L2_WAYS), .LINE_WORDS(LINE_WORDS),
    .MY_X(COORD_W'(SM_NODE % MX)), .MY_Y(COORD_W'(SM_NODE / MX))
  ) u_l2 (
    .clk, .rst_n,
    .rx_flit(rx_flit[SM_NODE]), .rx_valid(rx_valid[SM_NODE]), .rx_ready(rx_ready[SM_NODE]),
    .tx_flit(tx_flit[SM_NODE]), .tx_valid(tx_valid[SM_NODE]), .tx_ready(tx_ready[SM_NODE]),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .st_hits(st_l2_hits), .st_misses(st_l2_misses), .st_writebacks(l2_wbs)
  );

  // nodes without an endpoint
  for (genvar n = NCORES; n < NN; n++) begin : g_idle
    if (n != SM_NODE) begin : g_tie
      assign tx_flit[n]  = '0;
      assign tx_valid[n] = 1'b0;
      assign rx_ready[n] = 1'b1;
    end
  end

endmodule
