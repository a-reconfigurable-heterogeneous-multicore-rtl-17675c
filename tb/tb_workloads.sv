// tb_workloads: small kernels in the style of the benchmarks HARTMP was evaluated with, each run as
// one thread per core on the full-size four-core system (two large, one medium, one small DAP).
//
//   fft        integer butterflies: x = a + b*w, y = a - b*w, folded into a checksum
//   susan      branch-free absolute brightness differences against a centre value of 128
//   swaptions  an independent linear congruential random stream per thread (high TLP)
//   equake     the butterfly kernel on one core only, the other three stop at once (low TLP)
//
// The kernels are this testbench's own; the original benchmarks are compiled programs far larger
// than a core's instruction RAM. Every thread keeps its loop counter in r1, its checksum in r3 and
// finishes by storing the checksum to the shared L2 and loading it back into r12. The checksums
// are compared with a model here, and every working core must have run blocks on its array.
// Between workloads the system is reset and reloaded. Cycle counts, retired instructions and array
// runs are printed per workload.
module tb_workloads;
  import hartmp_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NC = 4;
  typedef enum int { W_FFT, W_SUSAN, W_SWAP, W_EQUAKE } wl_e;

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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] LCG_A = 32'd1664525;

  function automatic int trips(wl_e w, int t);
    if (w == W_EQUAKE) return (t == 0) ? 48 : 0;
    return 16;
  endfunction

  // thread t of workload w
  function automatic void build(wl_e w, int t, ref logic [31:0] p [$]);
    int top;
    p.delete();
    if (trips(w, t) == 0) begin p.push_back(halt()); return; end
    p.push_back(ri(OP3_ADD, 1, 0, 0));
    p.push_back(ri(OP3_ADD, 2, 0, trips(w, t)));
    p.push_back(ri(OP3_ADD, 3, 0, 0));
    p.push_back(ri(OP3_ADD, 4, 0, 256));
    p.push_back(ri(OP3_ADD, 20, 0, t));
    p.push_back(ri(OP3_ADD, 21, 0, 11 * t));
    p.push_back(ri(OP3_ADD, 22, 0, t + 1));
    p.push_back(sethi(23, 22'(LCG_A >> 10)));
    p.push_back(ri(OP3_OR, 23, 23, int'(LCG_A & 32'h3ff)));
    top = p.size();
    case (w)
      W_FFT, W_EQUAKE: begin
        p.push_back(rr(OP3_ADD, 5, 1, 20));        // a = i + t
        p.push_back(ri(OP3_XOR, 6, 1, 'h55));      // b = i ^ 0x55
        p.push_back(ri(OP3_ADD, 7, 1, 7));         // w = i + 7
        p.push_back(rr(OP3_UMUL, 8, 6, 7));        // b * w
        p.push_back(rr(OP3_ADD, 9, 5, 8));         // x
        p.push_back(rr(OP3_SUB, 10, 5, 8));        // y
        p.push_back(rr(OP3_ADD, 3, 3, 9));
        p.push_back(rr(OP3_XOR, 3, 3, 10));
        p.push_back(st(9, 4, 0));
        p.push_back(ri(OP3_ADD, 4, 4, 4));
      end
      W_SUSAN: begin
        p.push_back(ri(OP3_SLL, 5, 1, 5));         // pixel = (37 i + 11 t) & 255
        p.push_back(rr(OP3_ADD, 5, 5, 1));
        p.push_back(ri(OP3_SLL, 6, 1, 2));
        p.push_back(rr(OP3_ADD, 5, 5, 6));
        p.push_back(rr(OP3_ADD, 5, 5, 21));
        p.push_back(ri(OP3_AND, 5, 5, 255));
        p.push_back(ri(OP3_SUB, 6, 5, 128));       // d = pixel - centre
        p.push_back(ri(OP3_SRA, 7, 6, 31));
        p.push_back(rr(OP3_XOR, 8, 6, 7));
        p.push_back(rr(OP3_SUB, 8, 8, 7));         // |d|
        p.push_back(rr(OP3_ADD, 3, 3, 8));
      end
      default: begin                               // swaptions
        p.push_back(rr(OP3_UMUL, 5, 22, 23));
        p.push_back(ri(OP3_ADD, 22, 5, 1013));
        p.push_back(ri(OP3_SRL, 6, 22, 16));
        p.push_back(rr(OP3_ADD, 3, 3, 6));
      end
    endcase
    p.push_back(ri(OP3_ADD, 1, 1, 1));
    p.push_back(rr(OP3_SUBCC, 0, 1, 2));
    p.push_back(bicc(C_NE, top - p.size()));
    p.push_back(sethi(24, 22'h200000));
    p.push_back(st(3, 24, 64 * t));
    p.push_back(ld(12, 24, 64 * t));
    p.push_back(halt());
  endfunction

  function automatic logic [31:0] model(wl_e w, int t);
    logic [31:0] acc, x, a, b, wt, p, d, m;
    acc = 0;
    x = 32'(t + 1);
    for (int i = 0; i < trips(w, t); i++) begin
      case (w)
        W_FFT, W_EQUAKE: begin
          a = 32'(i + t);  b = 32'(i) ^ 32'h55;  wt = 32'(i + 7);  p = b * wt;
          acc = (acc + (a + p)) ^ (a - p);
        end
        W_SUSAN: begin
          d = ((32'(37 * i + 11 * t)) & 32'hff) - 32'd128;
          m = {32{d[31]}};
          acc = acc + ((d ^ m) - m);
        end
        default: begin
          x = x * LCG_A + 32'd1013;
          acc = acc + (x >> 16);
        end
      endcase
    end
    return acc;
  endfunction

  initial begin
    logic [31:0] prog [$];
    int cycles, runs, ret;
    im_we = '0; im_addr = 0; im_wdata = 0; dbg_reg = 0;
    for (int wi = 0; wi < 4; wi++) begin
      wl_e w;
      w = wl_e'(wi);
      rst_n = 0;
      for (int t = 0; t < NC; t++) begin
        build(w, t, prog);
        for (int i = 0; i < prog.size(); i++) begin
          @(negedge clk);
          im_we = '0; im_we[t] = 1'b1; im_addr = 10'(i); im_wdata = prog[i];
        end
      end
      @(negedge clk) im_we = '0;
      @(negedge clk) rst_n = 1;
      cycles = 0;
      while (halted != '1) begin @(negedge clk); cycles++; end
      repeat (3) @(negedge clk);
      runs = 0; ret = 0;
      for (int t = 0; t < NC; t++) begin
        runs += st_array_runs[t];
        ret  += st_retired[t];
        if (trips(w, t) == 0) continue;
        dbg_reg = 1;  #1 check($sformatf("%s t%0d r1", w.name(), t), dbg_data[t], trips(w, t));
        dbg_reg = 3;  #1 check($sformatf("%s t%0d checksum", w.name(), t), dbg_data[t], model(w, t));
        dbg_reg = 12; #1 check($sformatf("%s t%0d shared copy", w.name(), t), dbg_data[t], model(w, t));
        checks++;
        if (st_array_runs[t] == 0) begin
          failures++;
          $display("FAIL %s t%0d never used the array", w.name(), t);
        end
      end
      $display("%-9s cycles=%0d retired=%0d array_runs=%0d", w.name(), cycles, ret, runs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
