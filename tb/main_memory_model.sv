// main_memory_model: behavioural off-chip memory behind the shared L2 (simulation only).
// A line request held on req is acknowledged LATENCY cycles later; reads return the line in the
// acknowledge cycle, writes store it. Unwritten lines read as a pattern derived from the address.
// Off-chip memory is outside the described chip; its latency and line format are this model's own,
// sized to the L2's line port.
module main_memory_model #(
  parameter int unsigned LINE_W  = 256,
  parameter int unsigned ADDR_W  = 27,
  parameter int unsigned LATENCY = 3
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [LINE_W-1:0] wdata,
  output logic              ack,
  output logic [LINE_W-1:0] rdata
);
  logic [LINE_W-1:0] lines [logic [ADDR_W-1:0]];
  int unsigned wait_cnt = 0;

  function automatic logic [LINE_W-1:0] initial_line(logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = {a[26:0], 5'(w * 4)} ^ 32'h5A5A_0000;
    return l;
  endfunction

  assign ack   = req && (wait_cnt == LATENCY);
  assign rdata = lines.exists(addr) ? lines[addr] : initial_line(addr);

  always @(posedge clk) begin
    if (req && !ack) wait_cnt <= wait_cnt + 1;
    else wait_cnt <= 0;
    if (ack && we) lines[addr] = wdata;
  end
endmodule
