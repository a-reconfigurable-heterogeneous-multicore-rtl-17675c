// tb_gpp: runs a short SPARC program on the processor alone (no array) and checks the final
// registers. The program covers forwarding, a load-use stall, a counted loop with subcc/bne,
// local and shared (slow, handshaked) loads and stores, multiply, SETHI, CALL and JMPL, and Ta.
// The five-stage pipeline follows the document; the instruction subset and squashing branches are
// this design's choices.
module tb_gpp;
  import hartmp_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [9:0]  i_addr;
  logic [31:0] i_data;
  logic [11:0] d_addr;
  logic        d_we;
  logic [31:0] d_wdata, d_rdata;
  logic        sh_req, sh_we, sh_done;
  logic [31:0] sh_addr, sh_wdata, sh_rdata;
  logic [31:0] fetch_pc;
  logic        ac_hit, ddh_busy, arr_go, arr_done;
  logic [31:0] arr_resume_pc, arr_wmask;
  logic [31:0] arr_wdata [32];
  logic [31:0] rf_out [32];
  logic        ret_valid, halted;
  logic [31:0] ret_pc, ret_instr;

  gpp dut (.*);

  logic [31:0] imem [1024];
  logic [31:0] dmem [4096];
  logic [31:0] smem [logic [31:0]];
  assign i_data  = imem[i_addr];
  assign d_rdata = dmem[d_addr];
  always_ff @(posedge clk) if (d_we) dmem[d_addr] <= d_wdata;

  // shared memory responder: answers 3 cycles after a request appears
  int sh_wait = 0;
  always_ff @(posedge clk) begin
    if (sh_req && !sh_done) sh_wait <= sh_wait + 1;
    else sh_wait <= 0;
    if (sh_done && sh_we) smem[sh_addr] = sh_wdata;
  end
  assign sh_done  = sh_req && sh_wait == 3;
  assign sh_rdata = smem.exists(sh_addr) ? smem[sh_addr] : 32'hDEAD_BEEF;

  int checks = 0, failures = 0, retired = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin if (!halted) cycles++; if (ret_valid) retired++; end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ac_hit = 0; ddh_busy = 0; arr_done = 0; arr_resume_pc = 0; arr_wmask = 0;
    for (int r = 0; r < 32; r++) arr_wdata[r] = 0;
    for (int i = 0; i < 1024; i++) imem[i] = nop();
    for (int i = 0; i < 4096; i++) dmem[i] = 0;
    imem[0]  = sethi(1, 22'h1);
    imem[1]  = ri(OP3_OR, 1, 1, 'h23);
    imem[2]  = ri(OP3_ADD, 2, 0, 10);
    imem[3]  = ri(OP3_ADD, 3, 0, 0);
    imem[4]  = rr(OP3_ADD, 3, 3, 2);          // loop
    imem[5]  = ri(OP3_SUBCC, 2, 2, 1);
    imem[6]  = bicc(C_NE, -2);
    imem[7]  = st(3, 0, 64);
    imem[8]  = ld(4, 0, 64);
    imem[9]  = rr(OP3_ADD, 5, 4, 4);          // load-use
    imem[10] = rr(OP3_UMUL, 6, 5, 1);
    imem[11] = sethi(7, 22'h200000);
    imem[12] = st(5, 7, 8);
    imem[13] = ld(8, 7, 8);
    imem[14] = call(3);
    imem[15] = ri(OP3_ADD, 10, 0, 77);
    imem[16] = halt();
    imem[17] = ri(OP3_ADD, 9, 0, 99);
    imem[18] = jmpl(0, 15, 4);
    imem[19] = ri(OP3_ADD, 11, 0, -5);        // never reached
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (halted);
    repeat (5) @(negedge clk);
    check("r1", rf_out[1], 32'h423);
    check("r2", rf_out[2], 0);
    check("r3", rf_out[3], 55);
    check("r4", rf_out[4], 55);
    check("r5", rf_out[5], 110);
    check("r6", rf_out[6], 110 * 32'h423);
    check("r7", rf_out[7], 32'h8000_0000);
    check("r8", rf_out[8], 110);
    check("r9", rf_out[9], 99);
    check("r10", rf_out[10], 77);
    check("r11", rf_out[11], 0);
    check("r15", rf_out[15], 56);
    check("local mem", dmem[16], 55);
    check("shared mem", smem[32'h8000_0008], 110);
    // instructions on the executed path: 0-3, ten loop passes of 4-6, 7-14, 17-18, 15-16
    check("retired", retired, 4 + 30 + 8 + 2 + 2);
    $display("cycles=%0d retired=%0d", cycles, retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
