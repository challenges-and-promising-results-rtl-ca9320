// tb_mjpeg_noc: self-checking test of the MJPEG encoder star network.
// A test core sits on every node and packets carry one 8x8 block: a header
// and 64 body words. Phases:
//   1 zero load: one packet for every ordered node pair; header to last word
//     must take 4*R + 64 cycles, R being the routers on the path (always one router);
//   2 streaming: the encoder chain input buffer -> DCT -> zigzag/quantization -> VLE -> output image runs with 20 blocks on each hop at once; a stream of back-to-back blocks must use a link
//     fully, one flit per cycle (65 cycles per block);
//   3 hotspot: every other node sends 20 blocks to node 4 at once; the
//     receiving link is the bottleneck, so the job must take at least
//     65 cycles per block and at most 10% more, with headers competing for
//     one output and stalled senders observed.
// Receivers check destination, length, contents and per-source order.
module tb_mjpeg_noc;
  import noc_pkg::*;
  localparam int W = 16;
  localparam int NN = 5;

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

  int sent [NN], received [NN], errors [NN], nchecks [NN], tx_stalls [NN];
  longint lat_sum [NN], last_rx [NN];
  logic enable = 1'b0;
  int npkt [NN], dmode [NN], fdest [NN];

  int checks = 0, failures = 0;
  longint cycle = 0;

  mjpeg_noc dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_core
    tb_core_agent #(.ID(n), .NN(NN), .W(W), .MAXLEN(64)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(enable), .bursty(1'b1), .interval(0),
      .npkt(npkt[n]), .body_len(64), .dest_mode(dmode[n]), .hot_node(0), .hot_pct(0),
      .fixed_dest(fdest[n]), .rx_stall_pct(0),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_dest(tx_dest[n]), .tx_len(tx_len[n]),
      .tx_ready(tx_ready[n]), .rx_valid(rx_valid[n]), .rx_data(rx_data[n]),
      .rx_first(rx_first[n]), .rx_last(rx_last[n]), .rx_ready(rx_ready[n]),
      .sent(sent[n]), .received(received[n]), .errors(errors[n]), .nchecks(nchecks[n]),
      .lat_sum(lat_sum[n]), .last_rx_cycle(last_rx[n]), .tx_stalls(tx_stalls[n])
    );
  end

  int conflicts = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int o = 0; o < 5; o++) begin
        automatic int nh = 0;
        for (int i = 0; i < 5; i++)
          if (dut.u_r1.req_valid[i] && dut.u_r1.req_head[i] && dut.u_r1.req_port[i] == port_t'(o)) nh++;
        if (nh > 1) conflicts++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int routers_on_path(input int s, input int d);
    return 1;
  endfunction

  function automatic int total_received();
    int t = 0;
    for (int n = 0; n < NN; n++) t += received[n];
    return t;
  endfunction

  task automatic one_packet(input int s, input int d);
    longint l0 = lat_sum[d];
    int r0 = total_received();
    fdest[s] = d;
    npkt[s]++;
    while (total_received() == r0) @(posedge clk);
    check(lat_sum[d] - l0 == longint'(4 * routers_on_path(s, d) + 64), "zero-load latency");
    repeat (2) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t_stream, t_hot;
  int base, stalls0;
  initial begin
    for (int n = 0; n < NN; n++) begin npkt[n] = 0; dmode[n] = 2; fdest[n] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    enable = 1'b1;
    for (int s = 0; s < NN; s++)
      for (int d = 0; d < NN; d++)
        if (s != d) one_packet(s, d);
    // streaming
    @(negedge clk);
    base = total_received();
    t0 = cycle;
    for (int n = 0; n < NN - 1; n++) begin fdest[n] = n + 1; npkt[n] += 20; end
    while (total_received() < base + 20 * (NN - 1)) @(posedge clk);
    t_stream = cycle - t0;
    check(t_stream >= 20 * 65 && t_stream <= 20 * 65 + 4 * 1 + 10, "one flit per cycle on a streaming link");
    // hotspot
    repeat (10) @(posedge clk);
    @(negedge clk);
    stalls0 = 0;
    for (int n = 0; n < NN; n++) stalls0 += tx_stalls[n];
    base = total_received();
    t0 = cycle;
    for (int n = 0; n < NN; n++)
      if (n != 4) begin fdest[n] = 4; npkt[n] += 20; end
    while (total_received() < base + 20 * (NN - 1)) @(posedge clk);
    t_hot = cycle - t0;
    check(t_hot >= 20 * (NN - 1) * 65, "hotspot bounded by one link");
    check(t_hot <= 20 * (NN - 1) * 65 * 11 / 10, "hotspot link kept busy");
    repeat (5) @(posedge clk);
    begin
      int stalls = 0;
      for (int n = 0; n < NN; n++) begin
        checks += nchecks[n];
        failures += errors[n];
        check(sent[n] == npkt[n], "every packet sent");
        stalls += tx_stalls[n];
      end
      check(stalls > stalls0, "senders stalled at the hotspot");
      check(conflicts > 0, "headers competing for one output");
      $display("tb_mjpeg_noc: stream %0d cycles, hotspot %0d cycles, arbitration conflicts %0d", t_stream, t_hot, conflicts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
