// sparc_asm_pkg: instruction encoders for the SPARC V8 subset run by the testbenches.
// Each function returns one 32-bit instruction word in the standard SPARC V8 formats.
// The encodings are those of SPARC V8, the instruction set the cores run; which instructions are
// offered is this design's subset.
package sparc_asm_pkg;

  localparam logic [5:0] OP3_ADD  = 6'b000000, OP3_AND = 6'b000001, OP3_OR  = 6'b000010,
                         OP3_XOR  = 6'b000011, OP3_SUB = 6'b000100, OP3_UMUL = 6'b001010,
                         OP3_SMUL = 6'b001011, OP3_SUBCC = 6'b010100, OP3_ADDCC = 6'b010000,
                         OP3_SLL  = 6'b100101, OP3_SRL = 6'b100110, OP3_SRA = 6'b100111,
                         OP3_JMPL = 6'b111000, OP3_TICC = 6'b111010;
  localparam logic [3:0] C_A = 4'b1000, C_NE = 4'b1001, C_E = 4'b0001, C_L = 4'b0011,
                         C_G = 4'b1010, C_GE = 4'b1011, C_LE = 4'b0010;

  function automatic logic [31:0] rr(input logic [5:0] op3, input int rd, input int rs1,
                                     input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'b0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ri(input logic [5:0] op3, input int rd, input int rs1,
                                     input int imm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] ld(input int rd, input int rs1, input int imm);
    return {2'b11, 5'(rd), 6'b000000, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] st(input int rd, input int rs1, input int imm);
    return {2'b11, 5'(rd), 6'b000100, 5'(rs1), 1'b1, 13'(imm)};
  endfunction
  function automatic logic [31:0] sethi(input int rd, input logic [21:0] imm22);
    return {2'b00, 5'(rd), 3'b100, imm22};
  endfunction
  // branch displacement in instructions, relative to the branch itself
  function automatic logic [31:0] bicc(input logic [3:0] cond, input int disp);
    return {2'b00, 1'b0, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(input int disp);
    return {2'b01, 30'(disp)};
  endfunction
  function automatic logic [31:0] jmpl(input int rd, input int rs1, input int imm);
    return ri(OP3_JMPL, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] halt();
    return {2'b10, 1'b0, 4'b1000, OP3_TICC, 5'd0, 1'b1, 13'd0};
  endfunction
  function automatic logic [31:0] nop();
    return sethi(0, 22'd0);
  endfunction

endpackage
