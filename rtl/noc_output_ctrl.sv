// noc_output_ctrl: output control of one router port, with its multiplexer
// and output buffer.
//
// Holds the last two of the router's four pipeline stages.
//   Stage 3 (arbitrate and switch): among the input controls whose request
//     targets this port (req_port == MY_PORT), a free port grants one header
//     in round-robin order; the grant is then held for that input until its
//     tail flit has passed (wormhole), so flits of different packets never
//     mix. The winner's flit goes through the multiplexer into the stage
//     register, and grant[i] tells input i that its request was taken.
//   Stage 4 (buffer write): the stage register is written into the output
//     FIFO, which drives the outgoing link (out_valid is "FIFO not empty").
// A header taken at stage 1 in cycle t is on out_valid/out_flit in cycle t+4
// if nothing stalls, and body flits follow at one per cycle. The router is
// output buffered with a multiplexer in front of each buffer, as in the
// source design; round-robin arbitration and the held grant are this design's
// own choices, which it does not describe.
module noc_output_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W    = 16,
  parameter int unsigned NUM_PORTS = 5,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned MY_PORT   = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid [NUM_PORTS],
  input  logic [FLIT_W-1:0] req_flit  [NUM_PORTS],
  input  port_t             req_port  [NUM_PORTS],
  input  logic              req_head  [NUM_PORTS],
  input  logic              req_tail  [NUM_PORTS],
  output logic              grant     [NUM_PORTS],
  output logic              out_valid,
  output logic [FLIT_W-1:0] out_flit,
  input  logic              out_ready
);

  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic              st_v;
  logic [FLIT_W-1:0] st_flit;
  logic              fifo_full, fifo_empty, st_ready, push;
  logic              locked;
  logic [IW-1:0]     owner, last, sel;
  logic              any_grant;
  logic              want [NUM_PORTS];

  assign push     = st_v && !fifo_full;
  assign st_ready = !st_v || !fifo_full;

  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++)
      want[i] = req_valid[i] && (32'(req_port[i]) == MY_PORT);
  end

  // Arbitration: held grant for a packet in flight, round-robin for a new one.
  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++) grant[i] = 1'b0;
    any_grant = 1'b0;
    sel       = owner;
    if (st_ready) begin
      if (locked) begin
        if (want[owner]) begin
          grant[owner] = 1'b1;
          any_grant    = 1'b1;
        end
      end else begin
        for (int unsigned k = 1; k <= NUM_PORTS; k++) begin
          automatic int unsigned idx = 32'(last) + k;
          if (idx >= NUM_PORTS) idx = idx - NUM_PORTS;
          if (!any_grant && want[idx] && req_head[idx]) begin
            grant[idx] = 1'b1;
            any_grant  = 1'b1;
            sel        = IW'(idx);
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_v    <= 1'b0;
      st_flit <= '0;
      locked  <= 1'b0;
      owner   <= '0;
      last    <= IW'(NUM_PORTS - 1);
    end else begin
      if (any_grant) begin
        st_v    <= 1'b1;
        st_flit <= req_flit[sel];
        if (!locked) begin
          last <= sel;
          if (!req_tail[sel]) begin
            locked <= 1'b1;
            owner  <= sel;
          end
        end else if (req_tail[sel]) begin
          locked <= 1'b0;
        end
      end else if (push) begin
        st_v <= 1'b0;
      end
    end
  end

  noc_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .wdata (st_flit),
    .pop   (out_valid && out_ready),
    .rdata (out_flit),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count ()
  );

  assign out_valid = !fifo_empty;

  // A free port only ever starts a packet with its header.
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    any_grant && !locked |-> req_head[sel]);

endmodule
