// tb_mjpeg_frame: one full 352x288 frame streamed through the MJPEG star.
//
// The input-buffer node (0) sends every 8x8 block of a 4:2:0 frame
// (1584 luminance + 792 chrominance blocks = 2376 packets of a header and 64
// body words) to the DCT node (1). Nodes 1, 2 and 3 stand in for the DCT,
// zigzag/quantization and VLE cores: each forwards every block it receives
// to the next node as soon as its words arrive, adding its own node number
// to every word so that the output shows which stages the data went through.
// Node 4 (output image) checks every word, the first/last markers and the
// block order.
//
// All four hops carry the whole frame at once, so this measures what the
// network alone can sustain. The cores here take no time, while the real
// ones do; the measurement is therefore an upper bound set by the network.
// The frame must finish within the cycle budget of 582.8 frames/s at
// 100 MHz (171,585 cycles), and close to the limit of this chain: a link
// needs 65 cycles per block, and a forwarding core can only send its header
// once the first word of the incoming block is there, holding that word for
// the header's cycle, so a block moves along the chain every 66 cycles.
// The 4:2:0 frame layout is this test's assumption; the frame size, block
// size, packet size and clock follow the source design.
// Handshakes are sampled on the falling edge and stimulus moves 1 ns after
// the rising edge. A watchdog ends the run if the frame never completes.
module tb_mjpeg_frame;
  import noc_pkg::*;
  localparam int W      = 16;
  localparam int NN     = 5;
  localparam int NBLK   = 2376;
  localparam int BODY   = 64;
  localparam longint BUDGET = 171585;   // 100e6 / 582.8

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         tx_valid [NN], tx_ready [NN], rx_valid [NN], rx_first [NN], rx_last [NN], rx_ready [NN];
  logic [W-1:0] tx_data [NN], rx_data [NN];
  addr_t        tx_dest [NN];
  len_t         tx_len [NN];
  logic         cfg_we = 1'b0;
  addr_t        cfg_dest = '0;
  port_t        cfg_port = '0;

  mjpeg_noc dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0, t_start = -1, t_end = -1;

  // source state (node 0) and sink state (node 4)
  int src_blk = 0, src_idx = 0;
  int snk_blk = 0, snk_idx = 0;
  logic src_fire = 1'b0;
  bit done = 1'b0;

  function automatic logic [W-1:0] word_of(int blk, int idx);
    return W'(blk * BODY + idx);
  endfunction

  // Node 0 streams the frame; nodes 1..3 forward to the next node; node 4 sinks.
  always_comb begin
    tx_valid[0] = rst_n && (src_blk < NBLK);
    tx_data[0]  = word_of(src_blk, src_idx);
    tx_dest[0]  = 8'd1;
    tx_len[0]   = 8'(BODY);
    rx_ready[0] = 1'b1;
    for (int k = 1; k <= 3; k++) begin
      tx_valid[k] = rx_valid[k];
      tx_data[k]  = rx_data[k] + W'(k);
      tx_dest[k]  = 8'(k + 1);
      tx_len[k]   = 8'(BODY);
      rx_ready[k] = tx_ready[k];
    end
    tx_valid[4] = 1'b0;
    tx_data[4]  = '0;
    tx_dest[4]  = '0;
    tx_len[4]   = 8'(BODY);
    rx_ready[4] = 1'b1;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (src_fire) begin
      if (src_idx == BODY - 1) begin
        src_idx = 0;
        src_blk = src_blk + 1;
      end else begin
        src_idx = src_idx + 1;
      end
    end
  end

  always @(negedge clk) begin
    // node 0: a transfer with tx_ready high takes a body word
    src_fire = tx_valid[0] && tx_ready[0];
    if (tx_valid[0] && t_start < 0 && rst_n) t_start = cycle;
    // nothing is ever sent to the input-buffer node
    if (rx_valid[0]) begin
      failures++;
      $display("node 0 received an unexpected word");
    end
    if (rx_valid[4] && rx_ready[4]) begin
      checks++;
      if (rx_data[4] !== word_of(snk_blk, snk_idx) + W'(6)) begin
        failures++;
        if (failures < 10)
          $display("block %0d word %0d: got %h expected %h", snk_blk, snk_idx,
                   rx_data[4], word_of(snk_blk, snk_idx) + W'(6));
      end
      checks++;
      if (rx_first[4] !== (snk_idx == 0) || rx_last[4] !== (snk_idx == BODY - 1)) begin
        failures++;
        if (failures < 10) $display("block %0d word %0d: wrong first/last marker", snk_blk, snk_idx);
      end
      if (snk_idx == BODY - 1) begin
        snk_idx = 0;
        snk_blk = snk_blk + 1;
        if (snk_blk == NBLK) begin
          t_end = cycle + 1;
          done  = 1'b1;
        end
      end else begin
        snk_idx = snk_idx + 1;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!done) @(posedge clk);
    repeat (20) @(posedge clk);
    begin
      automatic longint frame = t_end - t_start;
      automatic longint ideal = longint'(NBLK) * longint'(BODY + 2);
      $display("tb_mjpeg_frame: %0d blocks in %0d cycles (chain limit %0d, budget %0d), %0d frames/s at 100 MHz",
               NBLK, frame, ideal, BUDGET, 100_000_000 / frame);
      checks++;
      if (snk_blk != NBLK || src_blk != NBLK) begin
        failures++;
        $display("blocks sent %0d, received %0d", src_blk, snk_blk);
      end
      checks++;
      if (frame > BUDGET) begin
        failures++;
        $display("frame takes longer than the 582.8 frames/s budget");
      end
      checks++;
      if (frame < ideal || frame > ideal + 64) begin
        failures++;
        $display("frame time %0d is not within 64 cycles of the chain limit %0d", frame, ideal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: frame not complete, %0d of %0d blocks received", snk_blk, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
