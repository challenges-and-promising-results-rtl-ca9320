// tb_mesh_noc: self-checking test of the 4x4 mesh with long-range links
// (default parameters: links 5-15 and 9-3).
// A test core sits on every node. Phases:
//   1 zero load: one packet at a time for every ordered node pair; the
//     latency from header to last word must be 4*R + L cycles, where R is the
//     number of routers on the path (worked out here from the routing rule:
//     long-range link when its far end is more than one hop nearer, else X
//     then Y) and L the body length;
//   2 routing table rewrite: node 5's entry for node 15 is pointed at its east
//     port, so that packet must take the 5-router mesh path instead of the
//     2-router link path;
//   3 bursty job: every node sends 50 packets of 32 flits (header + 31 body
//     words) to random nodes as fast as the network takes them;
//   4 constant-rate job: the same, one packet per node every 150 cycles.
// Every packet is checked by its receiver (destination, length, contents,
// per-source order); all must arrive. Long-range link traversals, stalled
// cores and full output buffers are counted and must all occur.
module tb_mesh_noc;
  import noc_pkg::*;
  localparam int W = 16;
  localparam int R = 4, C = 4, NN = R * C;
  localparam int LA [2] = '{5, 9};
  localparam int LB [2] = '{15, 3};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         tx_valid [NN], tx_ready [NN], rx_valid [NN], rx_first [NN], rx_last [NN], rx_ready [NN];
  logic [W-1:0] tx_data [NN], rx_data [NN];
  addr_t        tx_dest [NN];
  len_t         tx_len [NN];
  logic         cfg_we = 1'b0;
  addr_t        cfg_node = '0, cfg_dest = '0;
  port_t        cfg_port = '0;

  int sent [NN], received [NN], errors [NN], nchecks [NN], tx_stalls [NN];
  longint lat_sum [NN], last_rx [NN];
  logic enable = 1'b0, bursty = 1'b1;
  int interval = 0, body_len = 4;
  int npkt [NN], dmode [NN], fdest [NN];

  int checks = 0, failures = 0;
  longint cycle = 0;

  mesh_noc dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_core
    tb_core_agent #(.ID(n), .NN(NN), .W(W), .MAXLEN(32)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(enable), .bursty(bursty), .interval(interval),
      .npkt(npkt[n]), .body_len(body_len), .dest_mode(dmode[n]), .hot_node(0), .hot_pct(0),
      .fixed_dest(fdest[n]), .rx_stall_pct(0),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_dest(tx_dest[n]), .tx_len(tx_len[n]),
      .tx_ready(tx_ready[n]), .rx_valid(rx_valid[n]), .rx_data(rx_data[n]),
      .rx_first(rx_first[n]), .rx_last(rx_last[n]), .rx_ready(rx_ready[n]),
      .sent(sent[n]), .received(received[n]), .errors(errors[n]), .nchecks(nchecks[n]),
      .lat_sum(lat_sum[n]), .last_rx_cycle(last_rx[n]), .tx_stalls(tx_stalls[n])
    );
  end

  // Probes: long-range link use and full output buffers.
  int lrl_flits = 0, full_cycles = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int i = 0; i < 2; i++) begin
        if (dut.lv[LA[i]][DIR_LRL] && dut.lr[LA[i]][DIR_LRL]) lrl_flits++;
        if (dut.lv[LB[i]][DIR_LRL] && dut.lr[LB[i]][DIR_LRL]) lrl_flits++;
      end
      for (int n = 0; n < NN; n++)
        for (int d = 1; d < NUM_DIRS; d++)
          if (dut.lv[n][d] && !dut.lr[n][d]) full_cycles++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int peer(input int n);
    for (int i = 0; i < 2; i++) begin
      if (LA[i] == n) return LB[i];
      if (LB[i] == n) return LA[i];
    end
    return -1;
  endfunction

  function automatic int mdist(input int a, input int b);
    int dr = a / C - b / C, dc = a % C - b % C;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  function automatic int routers_on_path(input int s, input int d);
    int n = s, k = 1;
    while (n != d) begin
      if (peer(n) >= 0 && mdist(peer(n), d) + 1 < mdist(n, d)) n = peer(n);
      else if (d % C > n % C) n = n + 1;
      else if (d % C < n % C) n = n - 1;
      else if (d / C > n / C) n = n + C;
      else n = n - C;
      k++;
    end
    return k;
  endfunction

  function automatic int total_received();
    int t = 0;
    for (int n = 0; n < NN; n++) t += received[n];
    return t;
  endfunction

  task automatic one_packet(input int s, input int d, input int expect_routers);
    longint l0 = lat_sum[d];
    int r0 = total_received();
    fdest[s] = d;
    npkt[s]++;
    while (total_received() == r0) @(posedge clk);
    check(lat_sum[d] - l0 == longint'(4 * expect_routers + body_len), "zero-load latency");
    if (lat_sum[d] - l0 != longint'(4 * expect_routers + body_len) && failures < 5)
      $display("  %0d->%0d latency %0d expected %0d", s, d, lat_sum[d] - l0, 4 * expect_routers + body_len);
    repeat (2) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: received %0d", total_received());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t_bursty, t_const;
  int base;
  int lrl_zero;
  initial begin
    for (int n = 0; n < NN; n++) begin npkt[n] = 0; dmode[n] = 2; fdest[n] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    enable = 1'b1;
    // phase 1: zero-load latency for every pair
    for (int s = 0; s < NN; s++)
      for (int d = 0; d < NN; d++)
        if (s != d) one_packet(s, d, routers_on_path(s, d));
    lrl_zero = lrl_flits;
    check(lrl_zero > 0, "long-range links used at zero load");
    // phase 2: rewrite node 5's entry for node 15 to its east port (port 2)
    @(negedge clk);
    cfg_we = 1'b1; cfg_node = 8'd5; cfg_dest = 8'd15; cfg_port = 3'd2;
    @(negedge clk);
    cfg_we = 1'b0;
    one_packet(5, 15, 5);
    @(negedge clk);
    cfg_we = 1'b1; cfg_port = 3'd5;    // back to the long-range link
    @(negedge clk);
    cfg_we = 1'b0;
    one_packet(5, 15, 2);
    // phase 3: bursty job, 50 packets of 32 flits per node
    @(negedge clk);
    body_len = 31;
    base = total_received();
    t0 = cycle;
    for (int n = 0; n < NN; n++) begin dmode[n] = 0; npkt[n] += 50; end
    while (total_received() < base + 50 * NN) @(posedge clk);
    t_bursty = cycle - t0;
    // phase 4: constant rate, one packet every 150 cycles per node
    repeat (20) @(posedge clk);
    @(negedge clk);
    bursty = 1'b0;
    interval = 150;
    base = total_received();
    t0 = cycle;
    for (int n = 0; n < NN; n++) npkt[n] += 50;
    while (total_received() < base + 50 * NN) @(posedge clk);
    t_const = cycle - t0;
    repeat (5) @(posedge clk);
    begin
      int stalls = 0;
      for (int n = 0; n < NN; n++) begin
        checks += nchecks[n];
        failures += errors[n];
        check(sent[n] == npkt[n], "every packet sent");
        stalls += tx_stalls[n];
      end
      check(total_received() == base + 50 * NN, "every packet received");
      check(stalls > 0, "cores stalled by the network");
      check(full_cycles > 0, "links held by full buffers");
      check(lrl_flits > lrl_zero, "long-range links used under load");
      $display("mesh: bursty job %0d cycles, constant-rate job %0d cycles, link flits %0d, stalls %0d, blocked link cycles %0d",
               t_bursty, t_const, lrl_flits, stalls, full_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
