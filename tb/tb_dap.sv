// tb_dap: one small DAP running a loop. The first pass after the loop branch is translated, every
// later pass starts on the array, which runs the translated part of the body (closed early
// because the array is full) while the processor runs the rest. Registers, the local data memory
// and a word stored to and loaded back from the shared memory (a responder model on the network
// port) are compared with a reference computed here; the counters must show 18 array runs, two
// configurations (the loop body and the code after the loop) and one full-array close.
// The stall and array run on an address-cache hit follow the document; the exact counts follow from
// this design's placement rules.
module tb_dap;
  import hartmp_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        im_we;
  logic [9:0]  im_addr;
  logic [31:0] im_wdata;
  flit_t       tx_flit, rx_flit;
  logic        tx_valid, tx_ready, rx_valid, rx_ready;
  logic [4:0]  dbg_reg;
  logic [31:0] dbg_data;
  logic        halted;
  logic [31:0] st_retired, st_array_runs, st_configs, st_close_full, st_close_ctx;

  dap dut (.*);

  // shared-memory responder at the other end of the network port
  logic [31:0] smem [logic [31:0]];
  flit_t pend;
  int    delay = -1;
  assign tx_ready = (delay < 0);
  always_ff @(posedge clk) begin
    if (tx_valid && tx_ready) begin pend <= tx_flit; delay <= 4; end
    else if (delay > 0) delay <= delay - 1;
    else if (delay == 0 && rx_ready) delay <= -1;
  end
  always_comb begin
    rx_valid = (delay == 0);
    rx_flit  = '0;
    rx_flit.dst_x = pend.src_x;  rx_flit.dst_y = pend.src_y;
    rx_flit.kind  = (pend.kind == PK_WR_REQ) ? PK_WR_ACK : PK_RD_RSP;
    rx_flit.data  = smem.exists(pend.addr) ? smem[pend.addr] : 32'hDEAD_BEEF;
  end
  always @(posedge clk) if (delay == 0 && pend.kind == PK_WR_REQ) smem[pend.addr] = pend.data;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic reg_is(int r, logic [31:0] exp);
    dbg_reg = 5'(r); #1;
    check($sformatf("r%0d", r), dbg_data, exp);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [21];
  initial begin
    logic [31:0] acc, r9, r10;
    logic [31:0] memv [20];
    int cycles;
    prog[0]  = ri(OP3_ADD, 1, 0, 0);
    prog[1]  = ri(OP3_ADD, 2, 0, 20);
    prog[2]  = ri(OP3_ADD, 3, 0, 0);
    prog[3]  = ri(OP3_ADD, 4, 0, 256);
    prog[4]  = ri(OP3_ADD, 5, 1, 3);        // loop
    prog[5]  = ri(OP3_SLL, 6, 1, 2);
    prog[6]  = rr(OP3_XOR, 7, 5, 6);
    prog[7]  = rr(OP3_UMUL, 8, 5, 1);
    prog[8]  = rr(OP3_ADD, 3, 3, 7);
    prog[9]  = rr(OP3_ADD, 3, 3, 8);
    prog[10] = st(3, 4, 0);
    prog[11] = ld(9, 4, 0);
    prog[12] = rr(OP3_ADD, 10, 9, 1);
    prog[13] = ri(OP3_ADD, 4, 4, 4);
    prog[14] = ri(OP3_ADD, 1, 1, 1);
    prog[15] = rr(OP3_SUBCC, 0, 1, 2);
    prog[16] = bicc(C_NE, -12);
    prog[17] = sethi(11, 22'h200000);
    prog[18] = st(3, 11, 0);
    prog[19] = ld(12, 11, 0);
    prog[20] = halt();
    // reference
    acc = 0;
    for (int i = 0; i < 20; i++) begin
      logic [31:0] a5, a6, a7, a8;
      a5 = i + 3; a6 = i << 2; a7 = a5 ^ a6; a8 = a5 * i;
      acc = acc + a7 + a8;
      memv[i] = acc;
      r9 = acc; r10 = acc + i;
    end
    im_we = 0; im_addr = 0; im_wdata = 0; dbg_reg = 0;
    @(negedge clk);
    for (int i = 0; i < 21; i++) begin
      im_we = 1; im_addr = 10'(i); im_wdata = prog[i];
      @(negedge clk);
    end
    im_we = 0;
    rst_n = 1;
    cycles = 0;
    while (!halted) begin @(negedge clk); cycles++; end
    repeat (5) @(negedge clk);
    reg_is(1, 20);
    reg_is(3, acc);
    reg_is(4, 256 + 80);
    reg_is(9, r9);
    reg_is(10, r10);
    reg_is(12, acc);
    for (int i = 0; i < 20; i++) check($sformatf("mem[%0d]", i), dut.dmem[64 + i], memv[i]);
    check("shared word", smem[32'h8000_0000], acc);
    check("array runs", st_array_runs, 18);
    check("configs", st_configs, 2);       // loop body, and the tail after the last branch
    check("full closes", st_close_full, 1);
    $display("cycles=%0d retired=%0d", cycles, st_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
