// tb_mesh_workloads: the mesh workloads, run on the 4x4 mesh with its
// long-range links (default parameters, traffic set "a") and, for
// comparison, on the same mesh without them (NUM_LRL = 0, set "b"). Both get
// identical traffic: destinations come from a hash of (source, sequence).
//   1 bursty job: every node sends 50 packets of 32 flits as fast as the
//     network takes them; the job with links must not take longer;
//   2 constant-rate job: the same packets, one per node every 150 cycles;
//   3 hotspot latency sweep: packets of 9 flits, 25% of them to node 15 and
//     the rest uniform, 40 per node, at per-node intervals of 200, 100, 60,
//     45 and 36 cycles (0.08 to 0.44 packets per cycle over the network); the
//     average latency from packet creation to its last word is printed for
//     both meshes, and at the lightest load the mesh with links must not be
//     slower.
// Every packet is checked by its receiver and all must arrive.
module tb_mesh_workloads;
  import noc_pkg::*;
  localparam int W = 16;
  localparam int NN = 16;
  localparam int HOT = 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         a_tx_valid [NN], a_tx_ready [NN], a_rx_valid [NN], a_rx_first [NN], a_rx_last [NN], a_rx_ready [NN];
  logic [W-1:0] a_tx_data [NN], a_rx_data [NN];
  addr_t        a_tx_dest [NN];
  len_t         a_tx_len [NN];
  int a_sent [NN], a_recv [NN], a_err [NN], a_chk [NN], a_stall [NN];
  longint a_lat [NN], a_last [NN];
  int a_r;
  longint a_l;
  logic         b_tx_valid [NN], b_tx_ready [NN], b_rx_valid [NN], b_rx_first [NN], b_rx_last [NN], b_rx_ready [NN];
  logic [W-1:0] b_tx_data [NN], b_rx_data [NN];
  addr_t        b_tx_dest [NN];
  len_t         b_tx_len [NN];
  int b_sent [NN], b_recv [NN], b_err [NN], b_chk [NN], b_stall [NN];
  longint b_lat [NN], b_last [NN];
  int b_r;
  longint b_l;

  logic bursty = 1'b1;
  int interval = 0, npkt = 0, body_len = 31, dmode = 4, hot_pct = 0;
  int checks = 0, failures = 0;
  longint cycle = 0;

  mesh_noc dut_lrl (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(a_tx_valid), .tx_data(a_tx_data), .tx_dest(a_tx_dest), .tx_len(a_tx_len), .tx_ready(a_tx_ready),
    .rx_valid(a_rx_valid), .rx_data(a_rx_data), .rx_first(a_rx_first), .rx_last(a_rx_last), .rx_ready(a_rx_ready),
    .cfg_we(1'b0), .cfg_node('0), .cfg_dest('0), .cfg_port('0)
  );

  mesh_noc #(.NUM_LRL(0)) dut_mesh (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(b_tx_valid), .tx_data(b_tx_data), .tx_dest(b_tx_dest), .tx_len(b_tx_len), .tx_ready(b_tx_ready),
    .rx_valid(b_rx_valid), .rx_data(b_rx_data), .rx_first(b_rx_first), .rx_last(b_rx_last), .rx_ready(b_rx_ready),
    .cfg_we(1'b0), .cfg_node('0), .cfg_dest('0), .cfg_port('0)
  );

  for (genvar n = 0; n < NN; n++) begin : g_a
    tb_core_agent #(.ID(n), .NN(NN), .W(W), .MAXLEN(32)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .bursty(bursty), .interval(interval),
      .npkt(npkt), .body_len(body_len), .dest_mode(dmode), .hot_node(HOT), .hot_pct(hot_pct),
      .fixed_dest(0), .rx_stall_pct(0),
      .tx_valid(a_tx_valid[n]), .tx_data(a_tx_data[n]), .tx_dest(a_tx_dest[n]), .tx_len(a_tx_len[n]),
      .tx_ready(a_tx_ready[n]), .rx_valid(a_rx_valid[n]), .rx_data(a_rx_data[n]),
      .rx_first(a_rx_first[n]), .rx_last(a_rx_last[n]), .rx_ready(a_rx_ready[n]),
      .sent(a_sent[n]), .received(a_recv[n]), .errors(a_err[n]), .nchecks(a_chk[n]),
      .lat_sum(a_lat[n]), .last_rx_cycle(a_last[n]), .tx_stalls(a_stall[n])
    );
  end

  for (genvar n = 0; n < NN; n++) begin : g_b
    tb_core_agent #(.ID(n), .NN(NN), .W(W), .MAXLEN(32)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .bursty(bursty), .interval(interval),
      .npkt(npkt), .body_len(body_len), .dest_mode(dmode), .hot_node(HOT), .hot_pct(hot_pct),
      .fixed_dest(0), .rx_stall_pct(0),
      .tx_valid(b_tx_valid[n]), .tx_data(b_tx_data[n]), .tx_dest(b_tx_dest[n]), .tx_len(b_tx_len[n]),
      .tx_ready(b_tx_ready[n]), .rx_valid(b_rx_valid[n]), .rx_data(b_rx_data[n]),
      .rx_first(b_rx_first[n]), .rx_last(b_rx_last[n]), .rx_ready(b_rx_ready[n]),
      .sent(b_sent[n]), .received(b_recv[n]), .errors(b_err[n]), .nchecks(b_chk[n]),
      .lat_sum(b_lat[n]), .last_rx_cycle(b_last[n]), .tx_stalls(b_stall[n])
    );
  end

  always @(negedge clk) if (rst_n) cycle++;

  always_comb begin
    a_r = 0; b_r = 0; a_l = 0; b_l = 0;
    for (int i = 0; i < NN; i++) begin
      a_r += a_recv[i]; b_r += b_recv[i]; a_l += a_lat[i]; b_l += b_lat[i];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: received %0d / %0d", a_r, b_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one job on both meshes; returns completion cycles and latency sums
  task automatic run_job(input int add, output longint ta, output longint tb_, output longint la, output longint lb);
    longint t0 = cycle;
    int ra = a_r, rb = b_r;
    longint la0 = a_l, lb0 = b_l;
    bit da = 0, db = 0;
    npkt += add;
    while (!(da && db)) begin
      @(posedge clk);
      if (!da && a_r == ra + add * NN) begin da = 1; ta = cycle - t0; end
      if (!db && b_r == rb + add * NN) begin db = 1; tb_ = cycle - t0; end
    end
    la = a_l - la0;
    lb = b_l - lb0;
    repeat (10) @(posedge clk);
  endtask

  longint ta, tbm, la, lb, la_first, lb_first;
  int rates [5] = '{200, 100, 60, 45, 36};
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    // 1 bursty job
    run_job(50, ta, tbm, la, lb);
    $display("bursty job, 50 x 32 flits per node: with links %0d cycles, without %0d cycles", ta, tbm);
    check(ta <= tbm, "long-range links do not slow the bursty job");
    // 2 constant-rate job
    @(negedge clk);
    bursty = 1'b0; interval = 150;
    run_job(50, ta, tbm, la, lb);
    $display("constant-rate job, one packet per node per 150 cycles: with links %0d cycles, without %0d cycles", ta, tbm);
    check(ta >= 49 * 150 && tbm >= 49 * 150, "constant-rate job paced by its interval");
    // 3 hotspot sweep
    body_len = 8; dmode = 5; hot_pct = 25;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      interval = rates[i];
      run_job(40, ta, tbm, la, lb);
      $display("hotspot, %0.3f packets/cycle in the network: average latency with links %0.1f, without %0.1f cycles",
               16.0 / rates[i], real'(la) / (40.0 * NN), real'(lb) / (40.0 * NN));
      if (i == 0) begin la_first = la; lb_first = lb; end
    end
    check(la_first <= lb_first, "links lower the latency at light load");
    repeat (5) @(posedge clk);
    for (int n = 0; n < NN; n++) begin
      checks += a_chk[n] + b_chk[n];
      failures += a_err[n] + b_err[n];
      check(a_sent[n] == npkt && b_sent[n] == npkt, "every packet sent");
    end
    check(a_r == npkt * NN && b_r == npkt * NN, "every packet received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
