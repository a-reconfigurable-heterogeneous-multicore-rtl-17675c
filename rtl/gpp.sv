// gpp: the general-purpose processor of a DAP, a five-stage in-order pipeline
// (fetch, decode, execute, memory, write-back) for an integer subset of SPARC V8.
//
// Instructions: SETHI, Bicc, CALL, JMPL, ADD/SUB/AND/OR/XOR/ANDN/ORN/XNOR (with and without cc),
// SLL/SRL/SRA, UMUL/SMUL (low 32 bits of the product), LD and ST (words) and Ta, which stops the
// core. Anything else executes as a no-op. Register windows, the Y register, traps and delay
// slots are not modelled: a taken branch is resolved in execute and the two younger instructions
// are squashed, so code must be written without delay-slot instructions. The document gives only
// the architecture, the clock and the five stages; everything above is this design's choice.
//
// Hazards: results are forwarded from the memory and write-back stages to execute, the register
// file is written before it is read, and a load followed by a user stalls decode one cycle.
// Addresses with bit 31 set go to the shared L2 over the network (sh_* handshake: sh_req is held
// with its address until sh_done, and the whole pipeline waits); the rest go to the local data RAM
// (asynchronous read, write at the clock edge). Instruction memory is read asynchronously.
//
// Coupling to the reconfigurable array (document: the PC is compared with the address cache during
// fetch, and on a hit the pipeline stalls while the array runs the block): fetch_pc goes to the
// address cache. On a hit fetching stops; once the pipeline is empty and the translator idle,
// arr_go is pulsed and the core waits. When the array reports arr_done it writes the registers in
// arr_wmask and fetch resumes at arr_resume_pc.
module gpp
  import hartmp_pkg::*;
#(
  parameter int unsigned IADDR_W = 10,
  parameter int unsigned DADDR_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction memory
  output logic [IADDR_W-1:0] i_addr,
  input  logic [31:0]        i_data,
  // local data memory
  output logic [DADDR_W-1:0] d_addr,
  output logic               d_we,
  output logic [31:0]        d_wdata,
  input  logic [31:0]        d_rdata,
  // shared memory over the network
  output logic               sh_req,
  output logic               sh_we,
  output logic [31:0]        sh_addr,
  output logic [31:0]        sh_wdata,
  input  logic               sh_done,
  input  logic [31:0]        sh_rdata,
  // address cache / array coupling
  output logic [31:0]        fetch_pc,
  input  logic               ac_hit,
  input  logic               ddh_busy,
  output logic               arr_go,
  input  logic               arr_done,
  input  logic [31:0]        arr_resume_pc,
  input  logic [31:0]        arr_wmask,
  input  logic [31:0]        arr_wdata [32],
  output logic [31:0]        rf_out [32],
  // retirement (to the translator)
  output logic               ret_valid,
  output logic [31:0]        ret_pc,
  output logic [31:0]        ret_instr,
  output logic               halted
);

  // ------------------------------------------------------------------ decoded instruction
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    fu_op_e      op;
    logic [4:0]  rs1, rs2, rd;
    logic        use_imm;
    logic [31:0] imm;
    logic        wr_rd;
    logic        set_cc;
    logic        is_ld, is_st, is_bicc, is_call, is_jmpl, is_halt, is_sethi;
  } dec_t;

  function automatic dec_t decode(input logic [31:0] ins, input logic [31:0] pc);
    dec_t d;
    logic [5:0] op3;
    op3 = ins[24:19];
    d = '0;
    d.valid   = 1'b1;
    d.pc      = pc;
    d.instr   = ins;
    d.rs1     = ins[18:14];
    d.rs2     = ins[4:0];
    d.rd      = ins[29:25];
    d.use_imm = ins[13];
    d.imm     = {{19{ins[12]}}, ins[12:0]};
    d.op      = FU_ADD;
    case (ins[31:30])
      2'b01: begin d.is_call = 1'b1; d.rd = 5'd15; d.wr_rd = 1'b1; end
      2'b00: begin
        if (ins[24:22] == 3'b100) begin
          d.is_sethi = 1'b1; d.wr_rd = 1'b1; d.op = FU_SETHI;
          d.use_imm = 1'b1;  d.imm = {ins[21:0], 10'b0};  d.rs1 = 5'd0;
        end else if (ins[24:22] == 3'b010) d.is_bicc = 1'b1;
      end
      2'b10: begin
        case (op3)
          6'b000000, 6'b000100, 6'b000001, 6'b000010, 6'b000011, 6'b000101, 6'b000110,
          6'b000111, 6'b100101, 6'b100110, 6'b100111, 6'b001010, 6'b001011: begin
            d.wr_rd = 1'b1; d.op = alu_op3_to_fu(op3);
          end
          6'b010000, 6'b010100, 6'b010001, 6'b010010, 6'b010011, 6'b010101, 6'b010110,
          6'b010111: begin
            d.wr_rd = 1'b1; d.set_cc = 1'b1; d.op = alu_op3_to_fu({2'b00, op3[3:0]});
          end
          6'b111000: begin d.is_jmpl = 1'b1; d.wr_rd = 1'b1; end
          6'b111010: d.is_halt = 1'b1;
          default: ;
        endcase
      end
      default: begin
        if (op3 == 6'b000000) begin d.is_ld = 1'b1; d.wr_rd = 1'b1; end
        else if (op3 == 6'b000100) d.is_st = 1'b1;
      end
    endcase
    if (d.rd == 5'd0) d.wr_rd = 1'b0;
    return d;
  endfunction

  function automatic logic cond_true(input logic [3:0] c, input logic [3:0] nzvc);
    logic n, z, v, cy, r;
    {n, z, v, cy} = nzvc;
    case (c[2:0])
      3'b000: r = 1'b0;
      3'b001: r = z;
      3'b010: r = z | (n ^ v);
      3'b011: r = n ^ v;
      3'b100: r = cy | z;
      3'b101: r = cy;
      3'b110: r = n;
      default: r = v;
    endcase
    return c[3] ? ~r : r;
  endfunction

  // ------------------------------------------------------------------ state
  typedef enum logic [1:0] { M_RUN, M_ARRAY } mode_e;
  mode_e        mode;
  logic [31:0]  pc;
  logic [31:0]  rf [32];
  logic [3:0]   icc;
  dec_t         id_q;       // IF/ID: valid, pc, instr (rest decoded in ID)
  dec_t         ex_q;       // ID/EX
  logic [31:0]  ex_a, ex_b, ex_sd;
  typedef struct packed {
    logic        valid;
    logic [31:0] pc, instr;
    logic        wr_rd, is_ld, is_st;
    logic [4:0]  rd;
    logic [31:0] res, sd;
  } mw_t;
  mw_t mem_q, wb_q;

  // ------------------------------------------------------------------ decode / register read
  dec_t        id_dec;
  logic [31:0] id_a, id_b, id_sd;
  always_comb begin
    id_dec = decode(id_q.instr, id_q.pc);
    id_dec.valid = id_q.valid;
    id_a  = (id_dec.rs1 == 5'd0) ? '0 :
            (wb_q.valid && wb_q.wr_rd && wb_q.rd == id_dec.rs1) ? wb_q.res : rf[id_dec.rs1];
    id_b  = (id_dec.rs2 == 5'd0) ? '0 :
            (wb_q.valid && wb_q.wr_rd && wb_q.rd == id_dec.rs2) ? wb_q.res : rf[id_dec.rs2];
    id_sd = (id_dec.rd == 5'd0) ? '0 :
            (wb_q.valid && wb_q.wr_rd && wb_q.rd == id_dec.rd) ? wb_q.res : rf[id_dec.rd];
  end

  // load-use hazard
  logic load_use;
  always_comb begin
    load_use = 1'b0;
    if (id_q.valid && ex_q.valid && ex_q.is_ld && ex_q.wr_rd) begin
      if (ex_q.rd == id_dec.rs1) load_use = 1'b1;
      if (!id_dec.use_imm && ex_q.rd == id_dec.rs2) load_use = 1'b1;
      if (id_dec.is_st && ex_q.rd == id_dec.rd) load_use = 1'b1;
    end
  end

  // ------------------------------------------------------------------ execute
  function automatic logic [31:0] fwd(input logic [4:0] r, input logic [31:0] v, input mw_t m,
                                      input mw_t w);
    if (r == 5'd0) return '0;
    if (m.valid && m.wr_rd && !m.is_ld && m.rd == r) return m.res;
    if (w.valid && w.wr_rd && w.rd == r) return w.res;
    return v;
  endfunction

  logic [31:0] ex_opa, ex_opb, ex_store, ex_res, ex_target;
  logic        ex_redirect;
  logic [3:0]  ex_icc;
  logic [32:0] sum;
  always_comb begin
    sum      = '0;
    ex_opa   = fwd(ex_q.rs1, ex_a, mem_q, wb_q);
    ex_opb   = ex_q.use_imm ? ex_q.imm : fwd(ex_q.rs2, ex_b, mem_q, wb_q);
    ex_store = fwd(ex_q.rd, ex_sd, mem_q, wb_q);
    ex_res   = fu_compute(ex_q.op, ex_opa, ex_opb);
    ex_icc   = icc;
    if (ex_q.set_cc) begin
      sum = (ex_q.op == FU_SUB) ? {1'b0, ex_opa} - {1'b0, ex_opb} : {1'b0, ex_opa} + {1'b0, ex_opb};
      ex_icc[3] = ex_res[31];
      ex_icc[2] = (ex_res == '0);
      if (ex_q.op == FU_ADD) begin
        ex_icc[1] = (ex_opa[31] == ex_opb[31]) && (ex_res[31] != ex_opa[31]);
        ex_icc[0] = sum[32];
      end else if (ex_q.op == FU_SUB) begin
        ex_icc[1] = (ex_opa[31] != ex_opb[31]) && (ex_res[31] != ex_opa[31]);
        ex_icc[0] = sum[32];
      end else begin
        ex_icc[1] = 1'b0;
        ex_icc[0] = 1'b0;
      end
    end
    ex_redirect = 1'b0;
    ex_target   = ex_q.pc + 32'd4;
    if (ex_q.valid) begin
      if (ex_q.is_bicc && cond_true(ex_q.instr[28:25], icc)) begin
        ex_redirect = 1'b1;
        ex_target   = ex_q.pc + {{8{ex_q.instr[21]}}, ex_q.instr[21:0], 2'b00};
      end
      if (ex_q.is_call) begin
        ex_redirect = 1'b1;
        ex_target   = ex_q.pc + {ex_q.instr[29:0], 2'b00};
        ex_res      = ex_q.pc;
      end
      if (ex_q.is_jmpl) begin
        ex_redirect = 1'b1;
        ex_target   = ex_opa + ex_opb;
        ex_res      = ex_q.pc;
      end
      if (ex_q.is_halt) begin
        ex_redirect = 1'b1;
        ex_target   = ex_q.pc;
      end
    end
  end

  // ------------------------------------------------------------------ memory
  logic        mem_shared, mem_stall;
  logic [31:0] mem_rdata;
  assign mem_shared = mem_q.valid && (mem_q.is_ld || mem_q.is_st) && mem_q.res[31];
  assign sh_req     = mem_shared;
  assign sh_we      = mem_q.is_st;
  assign sh_addr    = mem_q.res;
  assign sh_wdata   = mem_q.sd;
  assign mem_stall  = mem_shared && !sh_done;
  assign d_addr     = mem_q.res[DADDR_W+1:2];
  assign d_we       = mem_q.valid && mem_q.is_st && !mem_q.res[31];
  assign d_wdata    = mem_q.sd;
  assign mem_rdata  = mem_q.res[31] ? sh_rdata : d_rdata;

  // ------------------------------------------------------------------ fetch and array hand-off
  logic pipe_empty, fetch_ok;
  assign pipe_empty = !id_q.valid && !ex_q.valid && !mem_q.valid && !wb_q.valid;
  assign fetch_pc   = pc;
  assign i_addr     = pc[IADDR_W+1:2];
  assign fetch_ok   = (mode == M_RUN) && !halted && !ac_hit;
  assign arr_go     = (mode == M_RUN) && !halted && ac_hit && pipe_empty && !ddh_busy;

  assign ret_valid = wb_q.valid;
  assign ret_pc    = wb_q.pc;
  assign ret_instr = wb_q.instr;
  assign rf_out    = rf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode   <= M_RUN;
      pc     <= '0;
      icc    <= '0;
      halted <= 1'b0;
      id_q   <= '0;
      ex_q   <= '0;
      ex_a   <= '0;  ex_b <= '0;  ex_sd <= '0;
      mem_q  <= '0;
      wb_q   <= '0;
      for (int r = 0; r < 32; r++) rf[r] <= '0;
    end else begin
      // write-back
      if (wb_q.valid && wb_q.wr_rd) rf[wb_q.rd] <= wb_q.res;
      if (arr_done)
        for (int r = 1; r < 32; r++) if (arr_wmask[r]) rf[r] <= arr_wdata[r];

      if (mem_stall) begin
        wb_q <= '0;
        // keep forwarded operands: the producer leaves write-back while execute waits
        ex_a  <= ex_opa;
        ex_b  <= fwd(ex_q.rs2, ex_b, mem_q, wb_q);
        ex_sd <= ex_store;
      end else begin
        // MEM -> WB
        wb_q <= mem_q;
        if (mem_q.is_ld) wb_q.res <= mem_rdata;
        // EX -> MEM
        mem_q.valid <= ex_q.valid;
        mem_q.pc    <= ex_q.pc;
        mem_q.instr <= ex_q.instr;
        mem_q.wr_rd <= ex_q.wr_rd;
        mem_q.is_ld <= ex_q.is_ld;
        mem_q.is_st <= ex_q.is_st;
        mem_q.rd    <= ex_q.rd;
        mem_q.res   <= ex_res;
        mem_q.sd    <= ex_store;
        if (ex_q.valid && ex_q.set_cc) icc <= ex_icc;
        if (ex_q.valid && ex_q.is_halt) halted <= 1'b1;
        // ID -> EX
        if (ex_redirect || load_use || !id_q.valid) ex_q <= '0;
        else begin
          ex_q  <= id_dec;
          ex_a  <= id_a;
          ex_b  <= id_b;
          ex_sd <= id_sd;
        end
        // IF -> ID
        if (ex_redirect) begin
          id_q <= '0;
          pc   <= ex_target;
        end else if (!load_use) begin
          if (fetch_ok) begin
            id_q       <= '0;
            id_q.valid <= 1'b1;
            id_q.pc    <= pc;
            id_q.instr <= i_data;
            pc         <= pc + 32'd4;
          end else begin
            id_q <= '0;
          end
        end
      end

      // array hand-off
      if (arr_go) mode <= M_ARRAY;
      if (mode == M_ARRAY && arr_done) begin
        mode <= M_RUN;
        pc   <= arr_resume_pc;
      end
    end
  end

endmodule
