// hartmp_pkg: types and constants shared by the HARTMP multicore.
//
// HARTMP is a multicore built from Dynamic Adaptive Processors (DAPs). Every DAP runs the same
// instruction set (an integer subset of SPARC V8) on a five-stage pipeline, and every DAP owns a
// coarse-grained reconfigurable array whose size differs from core to core. This package holds:
//   * the array's functional-unit operations and the per-unit configuration word (fu_cfg_t),
//   * the timing grid the binary translator uses to place instructions in the array,
//   * the NoC flit format used between the DAPs and the shared L2,
//   * the per-core array sizes of the He1 configuration (small / medium / large).
// The array sizes follow the document's He1 table; the encodings and widths are this design's own.
package hartmp_pkg;

  // ---------------------------------------------------------------- array operations
  typedef enum logic [3:0] {
    FU_ADD  = 4'd0,
    FU_SUB  = 4'd1,
    FU_AND  = 4'd2,
    FU_OR   = 4'd3,
    FU_XOR  = 4'd4,
    FU_ANDN = 4'd5,
    FU_ORN  = 4'd6,
    FU_XNOR = 4'd7,
    FU_SLL  = 4'd8,
    FU_SRL  = 4'd9,
    FU_SRA  = 4'd10,
    FU_SETHI= 4'd11,
    FU_UMUL = 4'd12,
    FU_SMUL = 4'd13,
    FU_LD   = 4'd14,
    FU_ST   = 4'd15
  } fu_op_e;

  // Configuration of one functional unit of the array. For a store, rd names the data register.
  // imm holds a sign-extended simm13 or, for SETHI, the 22-bit immediate.
  typedef struct packed {
    logic        valid;
    fu_op_e      op;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_imm;
    logic [21:0] imm;
    logic [4:0]  rd;
  } fu_cfg_t;

  localparam int unsigned FU_CFG_W = $bits(fu_cfg_t);

  // Three data-dependent ALUs fit in one level (one processor cycle).
  localparam int unsigned ALU_COLS = 3;

  // Placement time grid of the translator: level L has slots L*4+0..L*4+2 for ALU columns,
  // multipliers and memory units read at L*4 and their results are visible from (L+1)*4.
  localparam int unsigned TSLOTS = 4;

  // ---------------------------------------------------------------- instruction decode helpers
  function automatic fu_op_e alu_op3_to_fu(input logic [5:0] op3);
    case (op3)
      6'b000000: return FU_ADD;
      6'b000100: return FU_SUB;
      6'b000001: return FU_AND;
      6'b000010: return FU_OR;
      6'b000011: return FU_XOR;
      6'b000101: return FU_ANDN;
      6'b000110: return FU_ORN;
      6'b000111: return FU_XNOR;
      6'b100101: return FU_SLL;
      6'b100110: return FU_SRL;
      6'b100111: return FU_SRA;
      6'b001010: return FU_UMUL;
      6'b001011: return FU_SMUL;
      default:   return FU_ADD;
    endcase
  endfunction

  // One ALU / multiplier / shifter evaluation, shared by the GPP and the array.
  function automatic logic [31:0] fu_compute(input fu_op_e op, input logic [31:0] a,
                                             input logic [31:0] b);
    logic [63:0] sp;
    sp = 64'($signed(a)) * 64'($signed(b));
    case (op)
      FU_ADD:   return a + b;
      FU_SUB:   return a - b;
      FU_AND:   return a & b;
      FU_OR:    return a | b;
      FU_XOR:   return a ^ b;
      FU_ANDN:  return a & ~b;
      FU_ORN:   return a | ~b;
      FU_XNOR:  return ~(a ^ b);
      FU_SLL:   return a << b[4:0];
      FU_SRL:   return a >> b[4:0];
      FU_SRA:   return 32'($signed(a) >>> b[4:0]);
      FU_SETHI: return b;
      FU_UMUL:  return a * b;
      FU_SMUL:  return sp[31:0];
      default:  return a + b;     // LD/ST: effective address
    endcase
  endfunction

  // ---------------------------------------------------------------- NoC
  typedef enum logic [1:0] {
    PK_RD_REQ = 2'd0,
    PK_WR_REQ = 2'd1,
    PK_RD_RSP = 2'd2,
    PK_WR_ACK = 2'd3
  } pkt_kind_e;

  localparam int unsigned COORD_W = 3;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    pkt_kind_e          kind;
    logic [31:0]        addr;
    logic [31:0]        data;
  } flit_t;

  // Router port numbering.
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;   // y+1
  localparam int unsigned P_SOUTH = 2;   // y-1
  localparam int unsigned P_EAST  = 3;   // x+1
  localparam int unsigned P_WEST  = 4;   // x-1
  localparam int unsigned NPORTS  = 5;

  // ---------------------------------------------------------------- He1 core sizes
  // Sizes per core class: 0 small, 1 medium, 2 large (He1 table of the document).
  function automatic int unsigned he1_levels(input int unsigned cls);
    return (cls == 0) ? 3 : (cls == 1) ? 5 : 8;
  endfunction
  function automatic int unsigned he1_alu_rows(input int unsigned cls);   // ALUs/level / 3
    return (cls == 0) ? 3 : 4;
  endfunction
  function automatic int unsigned he1_mults(input int unsigned cls);      // per level
    return (cls == 0) ? 1 : 2;
  endfunction
  function automatic int unsigned he1_ldst(input int unsigned cls);       // per level
    return 2;
  endfunction
  function automatic int unsigned he1_confs(input int unsigned cls);
    return (cls == 0) ? 32 : (cls == 1) ? 64 : 128;
  endfunction
  function automatic int unsigned he1_inctx(input int unsigned cls);
    return (cls == 0) ? 8 : (cls == 1) ? 14 : 20;
  endfunction

endpackage
