// noc_router: output-buffered wormhole router with table-based routing.
//
// NUM_PORTS bidirectional ports, each with an input control (stages 1 and
// 2: input register, routing table lookup) and an output control (stage 3:
// arbitration and crossbar multiplexer, stage 4: write into the output FIFO).
// A header flit takes four cycles from being accepted on an input link to
// appearing on an output link; the remaining flits of the packet (1 to 255
// flits in all) follow one per cycle. The routing table maps a destination
// node to an output port and can be rewritten through rt_we/rt_addr/rt_port.
// The port count, the buffer depth and the flit width are parameters, so the
// same module gives the 3- to 6-port routers of a mesh with long-range links
// and the 4- and 5-port routers of the star networks.
//
// Links use valid/ready handshakes (a flit moves when both are high). All
// ready outputs depend only on registers of this router, so any number of
// routers can be connected in rings without combinational loops.
// The four-stage pipeline, wormhole switching, output buffering, table lookup
// and parameterized buffers follow the source design; the handshake, the
// header layout (see noc_pkg) and the arbitration are this design's own.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 5,
  parameter int unsigned FLIT_W     = 16,
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned NUM_NODES  = 16,
  parameter route_init_t ROUTE_INIT = star_routes(5)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid  [NUM_PORTS],
  input  logic [FLIT_W-1:0] in_flit   [NUM_PORTS],
  output logic              in_ready  [NUM_PORTS],
  output logic              out_valid [NUM_PORTS],
  output logic [FLIT_W-1:0] out_flit  [NUM_PORTS],
  input  logic              out_ready [NUM_PORTS],
  input  logic              rt_we,
  input  addr_t             rt_addr,
  input  port_t             rt_port
);

  addr_t             rt_dest  [NUM_PORTS];
  port_t             rt_res   [NUM_PORTS];
  logic              req_valid[NUM_PORTS];
  logic [FLIT_W-1:0] req_flit [NUM_PORTS];
  port_t             req_port [NUM_PORTS];
  logic              req_head [NUM_PORTS];
  logic              req_tail [NUM_PORTS];
  logic              grant    [NUM_PORTS][NUM_PORTS];   // [output][input]
  logic              accept   [NUM_PORTS];

  noc_route_table #(
    .NUM_NODES (NUM_NODES),
    .NUM_RD    (NUM_PORTS),
    .ROUTE_INIT(ROUTE_INIT)
  ) u_rt (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd_dest(rt_dest),
    .rd_port(rt_res),
    .we     (rt_we),
    .waddr  (rt_addr),
    .wport  (rt_port)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    noc_input_ctrl #(.FLIT_W(FLIT_W)) u_in (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[p]),
      .in_flit   (in_flit[p]),
      .in_ready  (in_ready[p]),
      .rt_dest   (rt_dest[p]),
      .rt_port   (rt_res[p]),
      .req_valid (req_valid[p]),
      .req_flit  (req_flit[p]),
      .req_port  (req_port[p]),
      .req_head  (req_head[p]),
      .req_tail  (req_tail[p]),
      .req_accept(accept[p])
    );
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    noc_output_ctrl #(
      .FLIT_W   (FLIT_W),
      .NUM_PORTS(NUM_PORTS),
      .DEPTH    (DEPTH),
      .MY_PORT  (o)
    ) u_out (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_valid(req_valid),
      .req_flit (req_flit),
      .req_port (req_port),
      .req_head (req_head),
      .req_tail (req_tail),
      .grant    (grant[o]),
      .out_valid(out_valid[o]),
      .out_flit (out_flit[o]),
      .out_ready(out_ready[o])
    );
  end

  // An input's request is taken when the output it names grants it.
  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      accept[i] = 1'b0;
      for (int unsigned o = 0; o < NUM_PORTS; o++)
        accept[i] = accept[i] | grant[o][i];
    end
  end

endmodule
