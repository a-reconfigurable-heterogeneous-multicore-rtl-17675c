// noc_mesh: a MX x MY two-dimensional mesh of noc_router instances.
//
// Node n sits at x = n % MX, y = n / MX; its local port is brought out as element n of the
// node_* arrays (tx = into the network, rx = out of the network). Neighbouring routers are joined
// by their north/south and east/west ports; ports on the mesh edge are tied off (never valid,
// always ready). The document specifies a 2D mesh with XY routing; its size follows the core count.
module noc_mesh
  import hartmp_pkg::*;
#(
  parameter int unsigned MX = 3,
  parameter int unsigned MY = 2,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned NN = MX * MY
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t node_tx_flit  [NN],
  input  logic  node_tx_valid [NN],
  output logic  node_tx_ready [NN],
  output flit_t node_rx_flit  [NN],
  output logic  node_rx_valid [NN],
  input  logic  node_rx_ready [NN]
);

  flit_t r_in_flit   [NN][NPORTS];
  logic  r_in_valid  [NN][NPORTS];
  logic  r_in_ready  [NN][NPORTS];
  flit_t r_out_flit  [NN][NPORTS];
  logic  r_out_valid [NN][NPORTS];
  logic  r_out_ready [NN][NPORTS];

  for (genvar n = 0; n < NN; n++) begin : g_node
    noc_router #(.X(COORD_W'(n % MX)), .Y(COORD_W'(n / MX)), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_flit(r_in_flit[n]), .in_valid(r_in_valid[n]), .in_ready(r_in_ready[n]),
      .out_flit(r_out_flit[n]), .out_valid(r_out_valid[n]), .out_ready(r_out_ready[n])
    );
  end

  // neighbour of node n through port p, or -1 at the edge
  function automatic int neighbour(input int n, input int p);
    int x, y;
    x = n % int'(MX);
    y = n / int'(MX);
    case (p)
      P_NORTH: return (y + 1 < int'(MY)) ? n + int'(MX) : -1;
      P_SOUTH: return (y > 0) ? n - int'(MX) : -1;
      P_EAST:  return (x + 1 < int'(MX)) ? n + 1 : -1;
      P_WEST:  return (x > 0) ? n - 1 : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opposite(input int p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      default: return P_EAST;
    endcase
  endfunction

  // forward direction: flits and valids
  always_comb begin
    for (int n = 0; n < int'(NN); n++) begin
      r_in_flit[n][P_LOCAL]  = node_tx_flit[n];
      r_in_valid[n][P_LOCAL] = node_tx_valid[n];
      node_rx_flit[n]        = r_out_flit[n][P_LOCAL];
      node_rx_valid[n]       = r_out_valid[n][P_LOCAL];
      for (int p = 1; p < int'(NPORTS); p++) begin
        int m;
        m = neighbour(n, p);
        if (m >= 0) begin
          r_in_flit[n][p]  = r_out_flit[m][opposite(p)];
          r_in_valid[n][p] = r_out_valid[m][opposite(p)];
        end else begin
          r_in_flit[n][p]  = '0;
          r_in_valid[n][p] = 1'b0;
        end
      end
    end
  end

  // backward direction: readies
  always_comb begin
    for (int n = 0; n < int'(NN); n++) begin
      node_tx_ready[n]        = r_in_ready[n][P_LOCAL];
      r_out_ready[n][P_LOCAL] = node_rx_ready[n];
      for (int p = 1; p < int'(NPORTS); p++) begin
        int m;
        m = neighbour(n, p);
        r_out_ready[n][p] = (m >= 0) ? r_in_ready[m][opposite(p)] : 1'b1;
      end
    end
  end

endmodule
