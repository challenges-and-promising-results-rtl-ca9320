// noc_fifo: synchronous FIFO used as a router output buffer.
//
// A circular buffer of DEPTH words of WIDTH bits with first-word-fall-through
// reads: rdata shows the oldest word whenever empty is low, and pop removes
// it. A push is accepted only when full is low; push and pop may happen in
// the same cycle. full and empty come straight from registers, so a consumer
// freeing a slot this cycle is only seen as "not full" in the next cycle; this
// keeps the ready path of a link free of combinational paths that span
// routers. The router's output buffers are FIFOs with a parameterized depth
// and width as the source design has; the default depth of 16 flits and width
// of 16 bits are those of its MJPEG encoder. The first-word-fall-through
// behaviour and the registered status flags are this design's choices.
module noc_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rd_ptr];
  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  // A producer must not push into a full buffer, nor a consumer pop an empty one.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> !full;
  endproperty
  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) pop |-> !empty;
  endproperty
  a_no_overflow:  assert property (p_no_overflow);
  a_no_underflow: assert property (p_no_underflow);

endmodule
