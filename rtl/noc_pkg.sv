// noc_pkg: types and constants shared by the router, the network interface
// and the three networks built from them.
//
// A packet is one header flit followed by its body flits (wormhole flow
// control). Packets are 1 to 255 flits long, header included, and the header
// carries the destination address. The header layout is this design's own
// choice: bits [15:8] hold the total packet length in flits and bits [7:0]
// the destination node number; any bits above 15 of a wider flit are zero.
// Links are valid/ready handshakes: a flit moves in a cycle where both are high.
package noc_pkg;

  localparam int unsigned HDR_W = 16;   // header fields live in the low 16 bits
  localparam int unsigned LEN_W = 8;    // up to 255 flits per packet
  localparam int unsigned ADDR_W = 8;   // up to 256 destination nodes

  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Mesh directions. The router's port 0 is always the local (core) port;
  // the mesh compacts the remaining directions into consecutive port numbers.
  localparam int DIR_LOCAL = 0;
  localparam int DIR_N     = 1;
  localparam int DIR_E     = 2;
  localparam int DIR_S     = 3;
  localparam int DIR_W     = 4;
  localparam int DIR_LRL   = 5;

  localparam int NUM_DIRS = 6;

  // Router port numbers are 3 bits wide (up to 8 ports). A routing table is
  // initialised from a route_init_t, one port number per destination node.
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned MAX_NODES = 256;
  typedef logic [PORT_W-1:0] port_t;
  typedef port_t [MAX_NODES-1:0] route_init_t;

  // Routes of a single star router whose node i sits on port i.
  function automatic route_init_t star_routes(input int unsigned num_ports);
    route_init_t r;
    for (int unsigned i = 0; i < MAX_NODES; i++)
      r[i] = (i < num_ports) ? port_t'(i) : '0;
    return r;
  endfunction

  function automatic len_t hdr_len(input logic [HDR_W-1:0] f);
    return f[15:8];
  endfunction

  function automatic addr_t hdr_dest(input logic [HDR_W-1:0] f);
    return f[7:0];
  endfunction

  function automatic logic [HDR_W-1:0] make_header(input addr_t dest, input len_t len);
    return {len, dest};
  endfunction

endpackage
