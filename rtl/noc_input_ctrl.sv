// noc_input_ctrl: input control of one router port.
//
// Holds the first two of the router's four pipeline stages.
//   Stage 1 (input register): a flit offered on the link is taken when
//     in_valid and in_ready are both high.
//   Stage 2 (route): a header's destination is looked up in the routing
//     table; the output port found is kept for the rest of the packet, and the
//     header's length field (total flits, header included) loads a counter
//     that marks each later flit as body or tail. A length of 0 is taken as 1.
// The stage-2 register is offered to the output controls as a request
// (req_valid, req_port, req_head, req_tail, req_flit); the output control of
// req_port answers with req_accept in the same cycle, and the request
// register then frees. in_ready is high when stage 1 is empty or moves on, so
// a stalled output propagates back to the link one stage per cycle; it
// depends only on this router's registers. Four pipeline stages with table
// lookup follow the source design; the split of the work among the stages and
// the handshake are this design's own.
module noc_input_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // link from the upstream router or network interface
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_flit,
  output logic              in_ready,
  // routing table read port
  output addr_t             rt_dest,
  input  port_t             rt_port,
  // request to the output controls
  output logic              req_valid,
  output logic [FLIT_W-1:0] req_flit,
  output port_t             req_port,
  output logic              req_head,
  output logic              req_tail,
  input  logic              req_accept
);

  logic              s1_v;
  logic [FLIT_W-1:0] s1_flit;
  logic              s2_ready, s1_adv;
  len_t              rem;        // flits of the current packet not yet in stage 2
  port_t             cur_port;
  len_t              len_eff;

  assign s2_ready = !req_valid || req_accept;
  assign s1_adv   = s1_v && s2_ready;
  assign in_ready = !s1_v || s2_ready;
  assign rt_dest  = hdr_dest(s1_flit[HDR_W-1:0]);
  assign len_eff  = (hdr_len(s1_flit[HDR_W-1:0]) == 0) ? len_t'(1) : hdr_len(s1_flit[HDR_W-1:0]);

  // Stage 1
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v    <= 1'b0;
      s1_flit <= '0;
    end else if (in_ready) begin
      s1_v <= in_valid;
      if (in_valid) s1_flit <= in_flit;
    end
  end

  // Stage 2
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_valid <= 1'b0;
      req_flit  <= '0;
      req_port  <= '0;
      req_head  <= 1'b0;
      req_tail  <= 1'b0;
      rem       <= '0;
      cur_port  <= '0;
    end else if (s1_adv) begin
      req_valid <= 1'b1;
      req_flit  <= s1_flit;
      if (rem == 0) begin
        req_port <= rt_port;
        cur_port <= rt_port;
        req_head <= 1'b1;
        req_tail <= (len_eff == 1);
        rem      <= len_eff - 1'b1;
      end else begin
        req_port <= cur_port;
        req_head <= 1'b0;
        req_tail <= (rem == 1);
        rem      <= rem - 1'b1;
      end
    end else if (req_accept) begin
      req_valid <= 1'b0;
    end
  end

  // The request must stay stable until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_accept |=> req_valid && $stable(req_flit) && $stable(req_port));

endmodule
