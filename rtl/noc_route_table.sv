// noc_route_table: the router's routing lookup table.
//
// Deterministic routing is held in a table with one entry per destination
// node, each giving the output port a header for that node must take. There
// are NUM_RD combinational read ports, one per input control, and one write
// port so that the routing can be changed at run time; the table reloads
// ROUTE_INIT on reset. A destination at or beyond NUM_NODES reads port 0.
// That routing is a lookup table follows the source design; the reset
// contents, the write port and the out-of-range rule are this design's own.
module noc_route_table
  import noc_pkg::*;
#(
  parameter int unsigned NUM_NODES  = 16,
  parameter int unsigned NUM_RD     = 5,
  parameter route_init_t ROUTE_INIT = star_routes(5)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t rd_dest [NUM_RD],
  output port_t rd_port [NUM_RD],
  input  logic  we,
  input  addr_t waddr,
  input  port_t wport
);

  port_t table_q [NUM_NODES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < NUM_NODES; n++) table_q[n] <= ROUTE_INIT[n];
    end else if (we) begin
      for (int unsigned n = 0; n < NUM_NODES; n++)
        if (32'(waddr) == n) table_q[n] <= wport;
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < NUM_RD; r++) begin
      rd_port[r] = '0;
      for (int unsigned n = 0; n < NUM_NODES; n++)
        if (32'(rd_dest[r]) == n) rd_port[r] = table_q[n];
    end
  end

endmodule
