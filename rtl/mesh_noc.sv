// mesh_noc: ROWS x COLS mesh of routers with application-specific
// long-range links, each node a router plus a network interface.
//
// Node n sits in row n / COLS (row 0 is north) and column n % COLS. Every
// router has the local port 0 and one port for each mesh neighbour that
// exists, so corner, edge and inner routers have 3, 4 and 5 ports. A node
// named in the long-range link list gets one more port for its link, so an
// inner node with a link has the 6-port router. Ports are numbered in the
// order local, north, east, south, west, long-range link, skipping the
// directions a node lacks.
//
// Routing is deterministic and held in each router's table, computed here at
// elaboration: a packet for node d leaves node n over n's long-range link if
// the far end is more than one hop nearer to d (in mesh hops) than n itself,
// and otherwise goes X first, then Y. A packet that crossed a link can never
// be sent back over it, since that would need the opposite inequality. The
// tables can be rewritten at run time through cfg_we (node cfg_node, entry
// cfg_dest, port cfg_port).
//
// Core ports are those of noc_ni, one set per node, indexed by node number.
// Each router adds four cycles for a header, so with no contention the first
// body word reaches the destination core 4*(hops+1)+1 cycles after the source
// interface's header was taken.
//
// The 4x4 size, the reuse of one router with 3 to 6 ports and the long-range
// links follow the source design. Which node pairs are linked is application
// specific and given here by NUM_LRL, LRL_A and LRL_B; the default pairs
// (5-15 and 9-3), the routing rule, the 16-bit flits and the 16-flit buffers
// are this design's own choices. Links are bidirectional, one flit per cycle
// in each direction, and have no registers of their own.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned ROWS    = 4,
  parameter int unsigned COLS    = 4,
  parameter int unsigned FLIT_W  = 16,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned NUM_LRL = 2,
  parameter int          LRL_A [4] = '{5, 9, 0, 0},
  parameter int          LRL_B [4] = '{15, 3, 0, 0}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid [ROWS*COLS],
  input  logic [FLIT_W-1:0] tx_data  [ROWS*COLS],
  input  addr_t             tx_dest  [ROWS*COLS],
  input  len_t              tx_len   [ROWS*COLS],
  output logic              tx_ready [ROWS*COLS],
  output logic              rx_valid [ROWS*COLS],
  output logic [FLIT_W-1:0] rx_data  [ROWS*COLS],
  output logic              rx_first [ROWS*COLS],
  output logic              rx_last  [ROWS*COLS],
  input  logic              rx_ready [ROWS*COLS],
  input  logic              cfg_we,
  input  addr_t             cfg_node,
  input  addr_t             cfg_dest,
  input  port_t             cfg_port
);

  localparam int NN = ROWS * COLS;

  function automatic int lrl_peer(input int n);
    int peer = -1;
    for (int i = 0; i < NUM_LRL; i++) begin
      if (LRL_A[i] == n) peer = LRL_B[i];
      if (LRL_B[i] == n) peer = LRL_A[i];
    end
    return peer;
  endfunction

  function automatic bit has_dir(input int n, input int d);
    int r = n / COLS;
    int c = n % COLS;
    case (d)
      DIR_LOCAL: return 1'b1;
      DIR_N:     return r > 0;
      DIR_E:     return c < COLS - 1;
      DIR_S:     return r < ROWS - 1;
      DIR_W:     return c > 0;
      DIR_LRL:   return lrl_peer(n) >= 0;
      default:   return 1'b0;
    endcase
  endfunction

  function automatic int num_ports(input int n);
    int k = 0;
    for (int d = 0; d < NUM_DIRS; d++) if (has_dir(n, d)) k++;
    return k;
  endfunction

  function automatic int port_of(input int n, input int d);
    int k = 0;
    for (int e = 0; e < d; e++) if (has_dir(n, e)) k++;
    return k;
  endfunction

  function automatic int dir_of_port(input int n, input int p);
    int dd = 0;
    for (int d = 0; d < NUM_DIRS; d++)
      if (has_dir(n, d) && port_of(n, d) == p) dd = d;
    return dd;
  endfunction

  function automatic int neighbour(input int n, input int d);
    case (d)
      DIR_N:   return n - COLS;
      DIR_E:   return n + 1;
      DIR_S:   return n + COLS;
      DIR_W:   return n - 1;
      DIR_LRL: return lrl_peer(n);
      default: return n;
    endcase
  endfunction

  function automatic int opposite(input int d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      default: return d;
    endcase
  endfunction

  function automatic int hops(input int a, input int b);
    int dr = a / COLS - b / COLS;
    int dc = a % COLS - b % COLS;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  function automatic int route_dir(input int n, input int dst);
    int peer = lrl_peer(n);
    if (dst == n) return DIR_LOCAL;
    if (peer >= 0 && hops(peer, dst) + 1 < hops(n, dst)) return DIR_LRL;
    if (dst % COLS > n % COLS) return DIR_E;
    if (dst % COLS < n % COLS) return DIR_W;
    if (dst / COLS > n / COLS) return DIR_S;
    return DIR_N;
  endfunction

  function automatic route_init_t node_routes(input int n);
    route_init_t r = '0;
    for (int d = 0; d < NN; d++) r[d] = port_t'(port_of(n, route_dir(n, d)));
    return r;
  endfunction

  // Link leaving node n in direction d: valid and flit from n, ready from the
  // receiving node.
  logic              lv [NN][NUM_DIRS];
  logic [FLIT_W-1:0] lf [NN][NUM_DIRS];
  logic              lr [NN][NUM_DIRS];

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int NP = num_ports(n);

    logic              in_v  [NP];
    logic [FLIT_W-1:0] in_f  [NP];
    logic              in_r  [NP];
    logic              out_v [NP];
    logic [FLIT_W-1:0] out_f [NP];
    logic              out_r [NP];

    noc_router #(
      .NUM_PORTS (NP),
      .FLIT_W    (FLIT_W),
      .DEPTH     (DEPTH),
      .NUM_NODES (NN),
      .ROUTE_INIT(node_routes(n))
    ) u_router (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_v),
      .in_flit  (in_f),
      .in_ready (in_r),
      .out_valid(out_v),
      .out_flit (out_f),
      .out_ready(out_r),
      .rt_we    (cfg_we && (32'(cfg_node) == n)),
      .rt_addr  (cfg_dest),
      .rt_port  (cfg_port)
    );

    noc_ni #(.FLIT_W(FLIT_W)) u_ni (
      .clk          (clk),
      .rst_n        (rst_n),
      .tx_valid     (tx_valid[n]),
      .tx_data      (tx_data[n]),
      .tx_dest      (tx_dest[n]),
      .tx_len       (tx_len[n]),
      .tx_ready     (tx_ready[n]),
      .net_out_valid(in_v[0]),
      .net_out_flit (in_f[0]),
      .net_out_ready(in_r[0]),
      .net_in_valid (out_v[0]),
      .net_in_flit  (out_f[0]),
      .net_in_ready (out_r[0]),
      .rx_valid     (rx_valid[n]),
      .rx_data      (rx_data[n]),
      .rx_first     (rx_first[n]),
      .rx_last      (rx_last[n]),
      .rx_ready     (rx_ready[n])
    );

    // The local direction is served by the interface, not by a link.
    assign lv[n][DIR_LOCAL] = 1'b0;
    assign lf[n][DIR_LOCAL] = '0;
    assign lr[n][DIR_LOCAL] = 1'b0;

    for (genvar d = 1; d < NUM_DIRS; d++) begin : g_dir
      if (has_dir(n, d)) begin : g_link
        localparam int P = port_of(n, d);
        localparam int M = neighbour(n, d);
        localparam int O = opposite(d);
        assign lv[n][d] = out_v[P];
        assign lf[n][d] = out_f[P];
        assign out_r[P] = lr[n][d];
        assign in_v[P]  = lv[M][O];
        assign in_f[P]  = lf[M][O];
        assign lr[M][O] = in_r[P];
      end else begin : g_none
        assign lv[n][d] = 1'b0;
        assign lf[n][d] = '0;
        assign lr[n][d] = 1'b0;
      end
    end
  end

endmodule
