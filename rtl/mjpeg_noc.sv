// mjpeg_noc: star network of the Motion JPEG encoder.
//
// One 5-port router joins five cores, each through a network interface:
// node 0 input buffer, node 1 DCT, node 2 zigzag and quantization, node 3
// variable-length encoder (VLE), node 4 output image; node i sits on router
// port i. Flits and channels are 16 bits wide and the output buffers hold 16
// flits. An 8x8 block of 16-bit pixels travels as one packet of a header and
// 64 body flits (the core sends tx_len = 64). Between any two cores a header
// takes the router's four cycles, so the first body word reaches the
// receiving core 5 cycles after the sender's header was taken, and the
// packet's words then follow one per cycle.
// The processing cores themselves are not part of this module: their
// network-interface ports are brought out, indexed by node number. The
// routing table can be rewritten through cfg_we/cfg_dest/cfg_port.
// Topology, core set, flit width, packet format and buffer depth follow the
// source design; the node numbering is this design's own.
module mjpeg_noc
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid [5],
  input  logic [FLIT_W-1:0] tx_data  [5],
  input  addr_t             tx_dest  [5],
  input  len_t              tx_len   [5],
  output logic              tx_ready [5],
  output logic              rx_valid [5],
  output logic [FLIT_W-1:0] rx_data  [5],
  output logic              rx_first [5],
  output logic              rx_last  [5],
  input  logic              rx_ready [5],
  input  logic              cfg_we,
  input  addr_t             cfg_dest,
  input  port_t             cfg_port
);

  localparam int NN = 5;

  logic              in_v  [NN];
  logic [FLIT_W-1:0] in_f  [NN];
  logic              in_r  [NN];
  logic              out_v [NN];
  logic [FLIT_W-1:0] out_f [NN];
  logic              out_r [NN];

  noc_router #(
    .NUM_PORTS (NN),
    .FLIT_W    (FLIT_W),
    .DEPTH     (DEPTH),
    .NUM_NODES (NN),
    .ROUTE_INIT(star_routes(NN))
  ) u_r1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_v),
    .in_flit  (in_f),
    .in_ready (in_r),
    .out_valid(out_v),
    .out_flit (out_f),
    .out_ready(out_r),
    .rt_we    (cfg_we),
    .rt_addr  (cfg_dest),
    .rt_port  (cfg_port)
  );

  for (genvar n = 0; n < NN; n++) begin : g_core
    noc_ni #(.FLIT_W(FLIT_W)) u_ni (
      .clk          (clk),
      .rst_n        (rst_n),
      .tx_valid     (tx_valid[n]),
      .tx_data      (tx_data[n]),
      .tx_dest      (tx_dest[n]),
      .tx_len       (tx_len[n]),
      .tx_ready     (tx_ready[n]),
      .net_out_valid(in_v[n]),
      .net_out_flit (in_f[n]),
      .net_out_ready(in_r[n]),
      .net_in_valid (out_v[n]),
      .net_in_flit  (out_f[n]),
      .net_in_ready (out_r[n]),
      .rx_valid     (rx_valid[n]),
      .rx_data      (rx_data[n]),
      .rx_first     (rx_first[n]),
      .rx_last      (rx_last[n]),
      .rx_ready     (rx_ready[n])
    );
  end

endmodule
