// mpeg2_noc: two-router network of the MPEG-2 encoder.
//
// Router R1 (5 ports) serves node 0 input buffer, node 1 DCT and
// quantization, node 2 motion estimation and node 3 frame buffer on ports 0
// to 3, and reaches R2 through port 4. Router R2 serves node 4 inverse
// quantization and IDCT, node 5 VLE and output buffer and node 6 motion
// compensation on ports 0 to 2, and reaches R1 through port 3. With
// NUM_ME = 2 a second motion estimator, node 7, is added on a fifth R2 port;
// the document uses that variant to remove the motion-estimation bottleneck.
// Channels are 16 bits and a packet is a header plus 64 body flits (one 8x8
// block). Each core connects through a network interface whose ports are
// brought out, indexed by node number. Between cores on one router a header
// takes four cycles, between routers eight, so the first body word arrives 5
// or 9 cycles after the sender's header was taken.
// cfg_we/cfg_router/cfg_dest/cfg_port rewrite a routing table entry of R1
// (cfg_router = 0) or R2 (1).
// Topology, core placement (after the document's figure), flit width and
// packet format follow the source design; buffer depth 16 (stated for the
// MJPEG encoder's routers) and the node numbering are this design's choices.
module mpeg2_noc
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned NUM_ME = 1,
  localparam int unsigned NN    = 6 + NUM_ME
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid [NN],
  input  logic [FLIT_W-1:0] tx_data  [NN],
  input  addr_t             tx_dest  [NN],
  input  len_t              tx_len   [NN],
  output logic              tx_ready [NN],
  output logic              rx_valid [NN],
  output logic [FLIT_W-1:0] rx_data  [NN],
  output logic              rx_first [NN],
  output logic              rx_last  [NN],
  input  logic              rx_ready [NN],
  input  logic              cfg_we,
  input  logic              cfg_router,
  input  addr_t             cfg_dest,
  input  port_t             cfg_port
);

  localparam int NP1 = 5;
  localparam int NP2 = (NUM_ME > 1) ? 5 : 4;

  // Which router and port each node uses.
  function automatic int node_router(input int n);
    return (n < 4) ? 0 : 1;
  endfunction

  function automatic int node_port(input int n);
    if (n < 4)  return n;
    if (n == 7) return 4;
    return n - 4;
  endfunction

  function automatic route_init_t r1_routes();
    route_init_t r = '0;
    for (int d = 0; d < NN; d++) r[d] = port_t'((d < 4) ? d : 4);
    return r;
  endfunction

  function automatic route_init_t r2_routes();
    route_init_t r = '0;
    for (int d = 0; d < NN; d++) r[d] = port_t'((d < 4) ? 3 : node_port(d));
    return r;
  endfunction

  logic              in1_v [NP1], in1_r [NP1], out1_v [NP1], out1_r [NP1];
  logic [FLIT_W-1:0] in1_f [NP1], out1_f [NP1];
  logic              in2_v [NP2], in2_r [NP2], out2_v [NP2], out2_r [NP2];
  logic [FLIT_W-1:0] in2_f [NP2], out2_f [NP2];

  // Per-node interface signals on the router side.
  logic              ni_ov [NN], ni_or [NN], ni_iv [NN], ni_ir [NN];
  logic [FLIT_W-1:0] ni_of [NN], ni_if [NN];

  noc_router #(
    .NUM_PORTS(NP1), .FLIT_W(FLIT_W), .DEPTH(DEPTH), .NUM_NODES(NN),
    .ROUTE_INIT(r1_routes())
  ) u_r1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in1_v), .in_flit(in1_f), .in_ready(in1_r),
    .out_valid(out1_v), .out_flit(out1_f), .out_ready(out1_r),
    .rt_we(cfg_we && !cfg_router), .rt_addr(cfg_dest), .rt_port(cfg_port)
  );

  noc_router #(
    .NUM_PORTS(NP2), .FLIT_W(FLIT_W), .DEPTH(DEPTH), .NUM_NODES(NN),
    .ROUTE_INIT(r2_routes())
  ) u_r2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in2_v), .in_flit(in2_f), .in_ready(in2_r),
    .out_valid(out2_v), .out_flit(out2_f), .out_ready(out2_r),
    .rt_we(cfg_we && cfg_router), .rt_addr(cfg_dest), .rt_port(cfg_port)
  );

  // Inter-router channel: R1 port 4 <-> R2 port 3.
  assign in2_v[3]  = out1_v[4];
  assign in2_f[3]  = out1_f[4];
  assign out1_r[4] = in2_r[3];
  assign in1_v[4]  = out2_v[3];
  assign in1_f[4]  = out2_f[3];
  assign out2_r[3] = in1_r[4];

  for (genvar n = 0; n < NN; n++) begin : g_core
    localparam int P = node_port(n);

    noc_ni #(.FLIT_W(FLIT_W)) u_ni (
      .clk          (clk),
      .rst_n        (rst_n),
      .tx_valid     (tx_valid[n]),
      .tx_data      (tx_data[n]),
      .tx_dest      (tx_dest[n]),
      .tx_len       (tx_len[n]),
      .tx_ready     (tx_ready[n]),
      .net_out_valid(ni_ov[n]),
      .net_out_flit (ni_of[n]),
      .net_out_ready(ni_or[n]),
      .net_in_valid (ni_iv[n]),
      .net_in_flit  (ni_if[n]),
      .net_in_ready (ni_ir[n]),
      .rx_valid     (rx_valid[n]),
      .rx_data      (rx_data[n]),
      .rx_first     (rx_first[n]),
      .rx_last      (rx_last[n]),
      .rx_ready     (rx_ready[n])
    );

    if (node_router(n) == 0) begin : g_on_r1
      assign in1_v[P]  = ni_ov[n];
      assign in1_f[P]  = ni_of[n];
      assign ni_or[n]  = in1_r[P];
      assign ni_iv[n]  = out1_v[P];
      assign ni_if[n]  = out1_f[P];
      assign out1_r[P] = ni_ir[n];
    end else begin : g_on_r2
      assign in2_v[P]  = ni_ov[n];
      assign in2_f[P]  = ni_of[n];
      assign ni_or[n]  = in2_r[P];
      assign ni_iv[n]  = out2_v[P];
      assign ni_if[n]  = out2_f[P];
      assign out2_r[P] = ni_ir[n];
    end
  end

endmodule
