// tb_core_agent: test-only processing core for one network-interface port.
//
// Transmit side: sends npkt packets through the interface's core port.
// Destinations are uniform over the other nodes (dest_mode 0), a hotspot
// node with probability hot_pct percent and uniform otherwise (1), one fixed
// node (2), or the next node in a ring (3); modes 4 and 5 are modes 0 and 1
// with the random choice taken from a hash of (source, sequence), so that two
// networks can be given identical traffic. In bursty mode a new packet starts
// as soon as the previous one has been taken; otherwise packet i is created
// at cycle start + i*interval and waits in the core until the network takes
// it. Body words: word 0 = {source, destination, sequence}, word 1 = the
// creation cycle (for latency), later words a hash of (source, sequence,
// index). body_len gives the body length; 0 picks 2..MAXLEN from the hash.
// Receive side: checks every packet it gets against the same rules (right
// destination, known length, intact words, per-source order) and sums the
// latency from creation to the last word. rx_stall_pct holds rx_ready low at
// random. All checking is independent of the network under test.
module tb_core_agent
  import noc_pkg::*;
#(
  parameter int ID     = 0,
  parameter int NN     = 16,
  parameter int W      = 16,
  parameter int MAXLEN = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         bursty,
  input  int           interval,
  input  int           npkt,
  input  int           body_len,
  input  int           dest_mode,
  input  int           hot_node,
  input  int           hot_pct,
  input  int           fixed_dest,
  input  int           rx_stall_pct,
  output logic         tx_valid,
  output logic [W-1:0] tx_data,
  output addr_t        tx_dest,
  output len_t         tx_len,
  input  logic         tx_ready,
  input  logic         rx_valid,
  input  logic [W-1:0] rx_data,
  input  logic         rx_first,
  input  logic         rx_last,
  output logic         rx_ready,
  output int           sent,
  output int           received,
  output int           errors,
  output int           nchecks,
  output longint       lat_sum,
  output longint       last_rx_cycle,
  output int           tx_stalls
);

  function automatic logic [15:0] hash16(input int src, input int seq, input int k);
    int unsigned x = 32'(src) * 32'd2654435761 ^ 32'(seq) * 32'd40503 ^ 32'(k) * 32'd69069;
    x = x ^ (x >> 13);
    return x[15:0];
  endfunction

  function automatic int pkt_len(input int src, input int seq);
    if (body_len > 0) return body_len;
    return 2 + int'(hash16(src, seq, 999) % 16'(MAXLEN - 1));
  endfunction

  function automatic logic [W-1:0] word(input int src, input int dst, input int seq,
                                        input int k, input longint ts);
    if (k == 0) return W'({src[3:0], dst[3:0], seq[7:0]});
    if (k == 1) return W'(ts[15:0]);
    return W'(hash16(src, seq, k));
  endfunction

  longint cycle;
  always @(posedge clk) cycle <= rst_n ? cycle + 1 : 0;

  // ---------------- transmit ----------------
  int     seq, k, len, dst;
  bit     active;
  longint ts, next_gen;

  initial begin
    tx_valid = 1'b0; tx_data = '0; tx_dest = '0; tx_len = '0;
    sent = 0; tx_stalls = 0; active = 0; seq = 0; k = 0; len = 0; dst = 0;
    ts = 0; next_gen = 0;
    @(posedge rst_n);
    forever begin
      automatic bit fire;
      @(negedge clk);
      fire = tx_valid && tx_ready;
      if (tx_valid && !tx_ready && k > 0) tx_stalls++;
      @(posedge clk);
      #1;
      if (fire) begin
        k++;
        if (k == len) begin
          active = 0;
          sent++;
          seq++;
        end
      end
      // with nothing left to send, the next packet is created when asked for
      if (!active && seq >= npkt) next_gen = cycle;
      if (!active && enable && seq < npkt && (bursty || cycle >= next_gen)) begin
        active = 1;
        k = 0;
        len = pkt_len(ID, seq % 256);
        ts = bursty ? cycle : next_gen;
        next_gen += interval;
        case (dest_mode)
          1: dst = (($urandom % 100) < hot_pct && hot_node != ID) ? hot_node
                   : (ID + 1 + ($urandom % (NN - 1))) % NN;
          2: dst = fixed_dest;
          3: dst = (ID + 1) % NN;
          4: dst = (ID + 1 + int'(hash16(ID, seq, 777) % 16'(NN - 1))) % NN;
          5: dst = (int'(hash16(ID, seq, 555) % 16'd100) < hot_pct && hot_node != ID) ? hot_node
                   : (ID + 1 + int'(hash16(ID, seq, 777) % 16'(NN - 1))) % NN;
          default: dst = (ID + 1 + ($urandom % (NN - 1))) % NN;
        endcase
      end
      tx_valid = active;
      tx_dest  = addr_t'(dst);
      tx_len   = len_t'(len);
      tx_data  = word(ID, dst, seq % 256, k, ts);
    end
  end

  // ---------------- receive ----------------
  int r_src, r_seq, r_k, r_dst;
  longint r_ts;
  int last_seq [NN];

  task automatic chk(input bit ok, input string what);
    nchecks++;
    if (!ok) begin
      errors++;
      if (errors < 5) $display("node %0d: FAIL %s at %0t", ID, what, $time);
    end
  endtask

  initial begin
    rx_ready = 1'b0; received = 0; errors = 0; nchecks = 0; lat_sum = 0; last_rx_cycle = 0;
    r_src = 0; r_seq = 0; r_k = 0; r_dst = 0; r_ts = 0;
    for (int i = 0; i < NN; i++) last_seq[i] = -1;
    @(posedge rst_n);
    forever begin
      automatic bit fire;
      automatic logic [W-1:0] d;
      @(negedge clk);
      fire = rx_valid && rx_ready;
      d = rx_data;
      if (fire) begin
        if (rx_first) begin
          r_src = int'(d[15:12]);
          r_dst = int'(d[11:8]);
          r_seq = int'(d[7:0]);
          r_k   = 0;
          chk(r_dst == ID % 16, "packet at its destination");
          chk(r_src < NN, "known source");
          if (r_src < NN) begin
            // sequence numbers are 8 bits: "newer" means 1..239 ahead, modulo 256,
            // so a packet overtaken by up to 16 later ones is caught
            chk(last_seq[r_src] < 0 || (((r_seq - last_seq[r_src]) & 255) inside {[1:239]}),
                "in order per source");
            last_seq[r_src] = r_seq;
          end
        end else begin
          if (r_k == 1) r_ts = longint'(d);
          else chk(d == word(r_src, r_dst, r_seq, r_k, 0), "body word intact");
        end
        if (!rx_first && r_k == 0) chk(1'b0, "first word flagged");
        if (rx_last) begin
          chk(r_k + 1 == pkt_len(r_src, r_seq), "packet length");
          received++;
          lat_sum += ((cycle - r_ts) & 64'hffff);
          last_rx_cycle = cycle;
        end
        r_k++;
      end
      @(posedge clk);
      #1;
      rx_ready = (($urandom % 100) >= rx_stall_pct);
    end
  end

endmodule
