// l2_shared: the unified shared second-level memory (SM) of HARTMP, a set-associative cache.
//
// Size and associativity follow the document (512 KB, 8 ways); the line size (32 bytes), the
// write-back/write-allocate policy, the round-robin victim choice per set and the interfaces are
// this design's own. The cache is a node of the network: it takes single-word read and write
// requests (one at a time) and answers each with a response flit to the sender (PK_RD_RSP with
// the word, or PK_WR_ACK). Behind it sits off-chip memory, reached through a line-wide port:
// mem_req with mem_we/mem_addr (line address)/mem_wdata is held until mem_ack; a read returns
// the line on mem_rdata in the mem_ack cycle.
//
// Timing: a request is accepted in IDLE, the tags of its set are compared in LOOKUP (one cycle),
// a hit answers from RESP the next cycle. A miss writes the dirty victim back (WB), fetches the
// line (FILL) and goes through LOOKUP again.
module l2_shared
  import hartmp_pkg::*;
#(
  parameter int unsigned SIZE_KB    = 512,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_WORDS = 8,
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = 1,
  localparam int unsigned SETS   = SIZE_KB * 1024 / (WAYS * LINE_WORDS * 4),
  localparam int unsigned OFF_W  = $clog2(LINE_WORDS * 4),
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned TAG_W  = 32 - OFF_W - SET_W,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1,
  localparam int unsigned LINE_W = LINE_WORDS * 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // network endpoint
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  // off-chip memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [31-OFF_W:0] mem_addr,
  output logic [LINE_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [LINE_W-1:0] mem_rdata,
  // statistics
  output logic [31:0]       st_hits,
  output logic [31:0]       st_misses,
  output logic [31:0]       st_writebacks
);

  typedef enum logic [2:0] { S_IDLE, S_LOOKUP, S_WB, S_FILL, S_RESP } state_e;
  state_e state;

  logic [LINE_W-1:0] data  [SETS][WAYS];
  logic [TAG_W-1:0]  tags  [SETS][WAYS];
  logic [WAYS-1:0]   valid [SETS];
  logic [WAYS-1:0]   dirty [SETS];
  logic [WAY_W-1:0]  victim [SETS];

  flit_t            req;
  logic [SET_W-1:0] set_i;
  logic [TAG_W-1:0] tag_i;
  logic [WRD_W-1:0] word_i;
  assign set_i  = req.addr[OFF_W +: SET_W];
  assign tag_i  = req.addr[31 -: TAG_W];
  assign word_i = req.addr[2 +: WRD_W];

  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set_i][w] && tags[set_i][w] == tag_i) begin
        hit = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  logic [WAY_W-1:0] vway;
  assign vway = victim[set_i];

  logic [31:0] rsp_data;
  logic        refilled;   // the current lookup follows a fill, it is not counted as a hit

  assign rx_ready = (state == S_IDLE);
  assign tx_valid = (state == S_RESP);
  always_comb begin
    tx_flit       = '0;
    tx_flit.dst_x = req.src_x;
    tx_flit.dst_y = req.src_y;
    tx_flit.src_x = MY_X;
    tx_flit.src_y = MY_Y;
    tx_flit.kind  = (req.kind == PK_WR_REQ) ? PK_WR_ACK : PK_RD_RSP;
    tx_flit.addr  = req.addr;
    tx_flit.data  = rsp_data;
  end

  assign mem_req   = (state == S_WB) || (state == S_FILL);
  assign mem_we    = (state == S_WB);
  assign mem_addr  = (state == S_WB) ? {tags[set_i][vway], set_i} : req.addr[31:OFF_W];
  assign mem_wdata = data[set_i][vway];

  always_ff @(posedge clk) begin
    if (state == S_LOOKUP && hit && req.kind == PK_WR_REQ)
      data[set_i][hit_way][word_i*32 +: 32] <= req.data;
    if (state == S_FILL && mem_ack) begin
      data[set_i][vway] <= mem_rdata;
      tags[set_i][vway] <= tag_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req      <= '0;
      rsp_data <= '0;
      refilled <= 1'b0;
      st_hits  <= '0;  st_misses <= '0;  st_writebacks <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;  dirty[s] <= '0;  victim[s] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (rx_valid) begin
          req      <= rx_flit;
          refilled <= 1'b0;
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            if (!refilled) st_hits <= st_hits + 1'b1;
            rsp_data <= data[set_i][hit_way][word_i*32 +: 32];
            if (req.kind == PK_WR_REQ) dirty[set_i][hit_way] <= 1'b1;
            state <= S_RESP;
          end else begin
            st_misses <= st_misses + 1'b1;
            state <= (valid[set_i][vway] && dirty[set_i][vway]) ? S_WB : S_FILL;
          end
        end
        S_WB: if (mem_ack) begin
          st_writebacks <= st_writebacks + 1'b1;
          dirty[set_i][vway] <= 1'b0;
          state <= S_FILL;
        end
        S_FILL: if (mem_ack) begin
          valid[set_i][vway]  <= 1'b1;
          dirty[set_i][vway]  <= 1'b0;
          victim[set_i]       <= (int'(vway) == WAYS - 1) ? '0 : vway + 1'b1;
          refilled            <= 1'b1;
          state <= S_LOOKUP;
        end
        S_RESP: if (tx_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
