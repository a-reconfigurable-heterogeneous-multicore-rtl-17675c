// tb_hartmp_top: the whole four-core He1 system at its default sizes (two large, one medium and
// one small DAP, 3 x 2 mesh, 512 KB L2) with a behavioural off-chip memory.
//
// Every core runs the same program, with a per-core trip count and result address:
//   * a loop whose body the translator turns into a configuration and that then runs on the array
//     (the processor stalls while the array runs), closed early on cores whose array is too short;
//   * a 25-instruction dependent chain, which overflows every array (full-array close);
//   * eleven adds reading 22 distinct registers, which overflow every input context;
//   * a store to the shared L2 by all cores at the same time, so the network and the L2 are
//     contended;
//   * a store of the loop result to the shared L2 over the network and a load back from it.
// Final registers are compared with a reference computed here, and each mechanism must be seen:
// array runs, configurations built, full-array and input-context closes, L2 misses and hits,
// two cores waiting on the network at once, load-use stalls and taken-branch squashes.
module tb_hartmp_top;
  import hartmp_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0] im_we;
  logic [9:0]    im_addr;
  logic [31:0]   im_wdata;
  logic [4:0]    dbg_reg;
  logic [31:0]   dbg_data [NC];
  logic [NC-1:0] halted;
  logic [31:0]   st_retired [NC], st_array_runs [NC], st_configs [NC], st_close_full [NC],
                 st_close_ctx [NC];
  logic [31:0]   st_l2_hits, st_l2_misses;
  logic          mem_req, mem_we, mem_ack;
  logic [26:0]   mem_addr;
  logic [255:0]  mem_wdata, mem_rdata;

  hartmp_top dut (.*);
  main_memory_model u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
                           .ack(mem_ack), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // mechanism counters observed inside the design
  int n_load_use = 0, n_squash = 0, n_noc_both = 0, n_arr_busy = 0;
  always @(posedge clk) if (rst_n) begin
    int waiting;
    waiting = int'(dut.g_core[0].u_dap.sh_req) + int'(dut.g_core[1].u_dap.sh_req) +
              int'(dut.g_core[2].u_dap.sh_req) + int'(dut.g_core[3].u_dap.sh_req);
    if (waiting >= 2) n_noc_both++;
    if (dut.g_core[0].u_dap.u_gpp.load_use || dut.g_core[3].u_dap.u_gpp.load_use) n_load_use++;
    if (dut.g_core[0].u_dap.u_gpp.ex_redirect || dut.g_core[3].u_dap.u_gpp.ex_redirect) n_squash++;
    if (dut.g_core[0].u_dap.arr_busy || dut.g_core[3].u_dap.arr_busy) n_arr_busy++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program of core c
  function automatic void build(int c, ref logic [31:0] p [$]);
    int n;
    n = 8 + 4 * c;
    p.delete();
    for (int j = 0; j < 12; j++) p.push_back(ri(OP3_ADD, 11 + j, 0, 100 + j));
    p.push_back(sethi(24, 22'h200000));       // every core writes the L2 at once
    p.push_back(st(11, 24, 64 * c + 4));
    p.push_back(ri(OP3_ADD, 1, 0, 0));
    p.push_back(ri(OP3_ADD, 2, 0, n));
    p.push_back(ri(OP3_ADD, 3, 0, 0));
    p.push_back(ri(OP3_ADD, 4, 0, 256));
    p.push_back(ri(OP3_ADD, 5, 1, 3));         // loop
    p.push_back(ri(OP3_SLL, 6, 1, 2));
    p.push_back(rr(OP3_XOR, 7, 5, 6));
    p.push_back(rr(OP3_UMUL, 8, 5, 1));
    p.push_back(rr(OP3_ADD, 3, 3, 7));
    p.push_back(rr(OP3_ADD, 3, 3, 8));
    p.push_back(st(3, 4, 0));
    p.push_back(ld(9, 4, 0));
    p.push_back(rr(OP3_ADD, 10, 9, 1));
    p.push_back(ri(OP3_ADD, 4, 4, 4));
    p.push_back(ri(OP3_ADD, 1, 1, 1));
    p.push_back(rr(OP3_SUBCC, 0, 1, 2));
    p.push_back(bicc(C_NE, -12));
    p.push_back(bicc(C_A, 1));
    for (int k = 0; k < 25; k++) p.push_back(ri(OP3_ADD, 25, 25, 3));
    p.push_back(bicc(C_A, 1));
    for (int k = 0; k < 11; k++) p.push_back(rr(OP3_ADD, 26 + k % 3, 2 * k + 1, 2 * k + 2));
    p.push_back(sethi(24, 22'h200000));
    p.push_back(st(3, 24, 64 * c));
    p.push_back(ld(12, 24, 64 * c));
    p.push_back(halt());
  endfunction

  initial begin
    logic [31:0] prog [$];
    logic [31:0] acc [NC];
    int cycles;
    im_we = '0; im_addr = 0; im_wdata = 0; dbg_reg = 0;
    for (int c = 0; c < NC; c++) begin
      int n;
      n = 8 + 4 * c;
      acc[c] = 0;
      for (int i = 0; i < n; i++) acc[c] = acc[c] + ((i + 3) ^ (i << 2)) + (i + 3) * i;
      build(c, prog);
      for (int i = 0; i < prog.size(); i++) begin
        @(negedge clk);
        im_we = '0; im_we[c] = 1'b1; im_addr = 10'(i); im_wdata = prog[i];
      end
    end
    @(negedge clk) im_we = '0;
    @(negedge clk) rst_n = 1;
    cycles = 0;
    while (halted != '1) begin @(negedge clk); cycles++; end
    repeat (5) @(negedge clk);

    for (int c = 0; c < NC; c++) begin
      int n;
      n = 8 + 4 * c;
      dbg_reg = 1;  #1 check($sformatf("core%0d r1", c), dbg_data[c], n);
      dbg_reg = 3;  #1 check($sformatf("core%0d r3", c), dbg_data[c], acc[c]);
      dbg_reg = 9;  #1 check($sformatf("core%0d r9", c), dbg_data[c], acc[c]);
      dbg_reg = 10; #1 check($sformatf("core%0d r10", c), dbg_data[c], acc[c] + n - 1);
      dbg_reg = 4;  #1 check($sformatf("core%0d r4", c), dbg_data[c], 256 + 4 * n);
      dbg_reg = 25; #1 check($sformatf("core%0d r25", c), dbg_data[c], 75);
      dbg_reg = 26; #1 check($sformatf("core%0d r26", c), dbg_data[c], 108 + 109);
      dbg_reg = 27; #1 check($sformatf("core%0d r27", c), dbg_data[c], 110 + 111);
      dbg_reg = 28; #1 check($sformatf("core%0d r28", c), dbg_data[c], 106 + 107);
      dbg_reg = 12; #1 check($sformatf("core%0d r12 (shared)", c), dbg_data[c], acc[c]);
      // the first configuration is ready one or two iterations after the block was first seen
      checks++;
      if (st_array_runs[c] < n - 3 || st_array_runs[c] > n - 2) begin
        failures++;
        $display("FAIL core%0d array runs %0d", c, st_array_runs[c]);
      end
      checks++;
      if (st_configs[c] < 1 || st_close_full[c] < 1 || st_close_ctx[c] < 1) begin
        failures++;
        $display("FAIL core%0d configs %0d full %0d ctx %0d", c, st_configs[c], st_close_full[c],
                 st_close_ctx[c]);
      end
      $display("core%0d (%s): retired=%0d array_runs=%0d configs=%0d full=%0d ctx=%0d", c,
               c < 2 ? "large" : c == 2 ? "medium" : "small", st_retired[c], st_array_runs[c],
               st_configs[c], st_close_full[c], st_close_ctx[c]);
    end
    checks++;
    if (st_l2_misses == 0 || st_l2_hits == 0 || n_noc_both == 0 || n_load_use == 0 ||
        n_squash == 0 || n_arr_busy == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("cycles=%0d l2_hits=%0d l2_misses=%0d noc_contention_cycles=%0d load_use=%0d squashes=%0d array_busy_cycles=%0d",
             cycles, st_l2_hits, st_l2_misses, n_noc_both, n_load_use, n_squash, n_arr_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
