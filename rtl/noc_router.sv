// noc_router: one router of the 2D-mesh network that connects the DAPs and the shared L2.
//
// Five ports (local, north, south, east, west; see hartmp_pkg). Every flit is a whole packet.
// Routing is dimension-ordered XY, as the document states: a flit first travels along X until its
// column matches, then along Y, then leaves through the local port. Buffering and arbitration are
// this design's choices: each input has a DEPTH-entry FIFO whose ready is "not full" (a registered
// signal, so there is no combinational path between routers), and each output picks among the
// inputs that want it in round-robin order; once offered, a flit stays on the output until it is
// taken. A flit moves when its output's valid and ready are both
// high; a router forwards up to five flits per cycle, one per output, with one cycle per hop.
// A concurrent assertion checks the input side of that rule (an offered flit that is not taken
// stays valid and unchanged). Its reset disable makes verilator report rst_n as used both
// synchronously and asynchronously (SYNCASYNCNET); the reset of the logic itself is asynchronous.
module noc_router
  import hartmp_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = '0,
  parameter logic [COORD_W-1:0] Y = '0,
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit  [NPORTS],
  input  logic  in_valid [NPORTS],
  output logic  in_ready [NPORTS],
  output flit_t out_flit  [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS]
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             fifo  [NPORTS][DEPTH];
  logic [PTR_W-1:0]  rd_ptr [NPORTS];
  logic [PTR_W-1:0]  wr_ptr [NPORTS];
  logic [PTR_W:0]    count  [NPORTS];

  function automatic logic [2:0] route(input flit_t f);
    if (f.dst_x > X) return 3'(P_EAST);
    if (f.dst_x < X) return 3'(P_WEST);
    if (f.dst_y > Y) return 3'(P_NORTH);
    if (f.dst_y < Y) return 3'(P_SOUTH);
    return 3'(P_LOCAL);
  endfunction

  logic [2:0] want   [NPORTS];
  logic       hvalid [NPORTS];
  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      hvalid[i] = (count[i] != '0);
      want[i]   = route(fifo[i][rd_ptr[i]]);
    end
  always_comb
    for (int i = 0; i < NPORTS; i++) in_ready[i] = (int'(count[i]) < DEPTH);

  // round-robin arbitration per output
  logic [2:0] rr    [NPORTS];
  logic [2:0] grant [NPORTS];
  logic       gval  [NPORTS];
  logic       pop   [NPORTS];
  logic       hold  [NPORTS];     // output offered a flit last cycle that was not taken
  logic [2:0] held  [NPORTS];
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      gval[o]  = hold[o];
      grant[o] = hold[o] ? held[o] : '0;
      for (int k = 0; k < NPORTS; k++) begin
        int unsigned i;
        i = (int'(rr[o]) + k) % NPORTS;
        if (!gval[o] && hvalid[i] && int'(want[i]) == o) begin
          gval[o]  = 1'b1;
          grant[o] = 3'(i);
        end
      end
      out_valid[o] = gval[o];
      out_flit[o]  = fifo[grant[o]][rd_ptr[grant[o]]];
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++)
      if (gval[o] && out_ready[o]) pop[grant[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        rd_ptr[i] <= '0;  wr_ptr[i] <= '0;  count[i] <= '0;  rr[i] <= '0;
        hold[i] <= 1'b0;  held[i] <= '0;
        for (int d = 0; d < DEPTH; d++) fifo[i][d] <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        logic push;
        push = in_valid[i] && in_ready[i];
        if (push) begin
          fifo[i][wr_ptr[i]] <= in_flit[i];
          wr_ptr[i] <= (int'(wr_ptr[i]) == DEPTH - 1) ? '0 : wr_ptr[i] + 1'b1;
        end
        if (pop[i]) rd_ptr[i] <= (int'(rd_ptr[i]) == DEPTH - 1) ? '0 : rd_ptr[i] + 1'b1;
        count[i] <= count[i] + (PTR_W+1)'(push) - (PTR_W+1)'(pop[i]);
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (gval[o] && out_ready[o]) rr[o] <= (int'(grant[o]) == NPORTS - 1) ? '0 : grant[o] + 1'b1;
        // an offered flit stays offered until taken
        hold[o] <= gval[o] && !out_ready[o];
        held[o] <= grant[o];
      end
    end
  end

  // a flit offered on an input stays unchanged until accepted
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable(in_flit[i]));
  end

endmodule
