// noc_ni: network interface (wrapper) between a processing core and the
// local port of a router.
//
// Packetization: the core offers words on tx_valid/tx_data. With the first
// word of a packet it also gives the destination (tx_dest) and the number of
// body words (tx_len, 1 to 254). The interface first sends a header flit
// built from them (length field = tx_len + 1), without taking the word, and
// then passes tx_len words to the router as body flits, one per cycle,
// tx_ready telling the core which word was taken. tx_dest and tx_len are
// read only while the header is sent.
// Depacketization: every header arriving from the router is consumed, and the
// body flits that follow are delivered on rx_valid/rx_data with rx_first and
// rx_last marking the first and last word of the packet; rx_ready from the
// core stalls the router's output buffer. Packets of a header alone deliver
// nothing.
// No register lies between core and router: the interface adds no latency,
// and rx_data is the incoming flit itself (only rx_valid is gated).
// That simple wrappers packetize and depacketize follows the source design;
// the core-side protocol is this design's own.
module noc_ni
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // core, transmit side
  input  logic              tx_valid,
  input  logic [FLIT_W-1:0] tx_data,
  input  addr_t             tx_dest,
  input  len_t              tx_len,
  output logic              tx_ready,
  // router local input port
  output logic              net_out_valid,
  output logic [FLIT_W-1:0] net_out_flit,
  input  logic              net_out_ready,
  // router local output port
  input  logic              net_in_valid,
  input  logic [FLIT_W-1:0] net_in_flit,
  output logic              net_in_ready,
  // core, receive side
  output logic              rx_valid,
  output logic [FLIT_W-1:0] rx_data,
  output logic              rx_first,
  output logic              rx_last,
  input  logic              rx_ready
);

  typedef enum logic {S_HEAD = 1'b0, S_BODY = 1'b1} ni_state_e;

  ni_state_e tx_state, rx_state;
  len_t      tx_cnt, rx_cnt;
  logic      rx_at_first;

  // ---------------- packetization ----------------
  always_comb begin
    net_out_valid = tx_valid;
    if (tx_state == S_HEAD) begin
      net_out_flit = FLIT_W'(make_header(tx_dest, tx_len + 1'b1));
      tx_ready     = 1'b0;
    end else begin
      net_out_flit = tx_data;
      tx_ready     = net_out_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_state <= S_HEAD;
      tx_cnt   <= '0;
    end else if (tx_valid && net_out_ready) begin
      if (tx_state == S_HEAD) begin
        tx_state <= S_BODY;
        tx_cnt   <= tx_len;
      end else begin
        tx_cnt <= tx_cnt - 1'b1;
        if (tx_cnt == 1) tx_state <= S_HEAD;
      end
    end
  end

  // ---------------- depacketization ----------------
  assign rx_data      = net_in_flit;
  assign rx_valid     = (rx_state == S_BODY) && net_in_valid;
  assign net_in_ready = (rx_state == S_HEAD) || rx_ready;
  assign rx_first     = rx_at_first;
  assign rx_last      = (rx_cnt == 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_state    <= S_HEAD;
      rx_cnt      <= '0;
      rx_at_first <= 1'b0;
    end else if (net_in_valid && net_in_ready) begin
      if (rx_state == S_HEAD) begin
        if (hdr_len(net_in_flit[HDR_W-1:0]) > 1) begin
          rx_state    <= S_BODY;
          rx_cnt      <= hdr_len(net_in_flit[HDR_W-1:0]) - 1'b1;
          rx_at_first <= 1'b1;
        end
      end else begin
        rx_at_first <= 1'b0;
        rx_cnt      <= rx_cnt - 1'b1;
        if (rx_cnt == 1) rx_state <= S_HEAD;
      end
    end
  end

  a_tx_len: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && tx_state == S_HEAD |-> tx_len >= 1 && tx_len <= 254);

endmodule
