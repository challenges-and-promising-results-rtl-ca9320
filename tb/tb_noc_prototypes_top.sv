// tb_noc_prototypes_top: end-to-end test of the three prototypes together,
// with every parameter at its default (so it is also the full-size test).
// Test cores sit on all 28 nodes and run at the same time:
//   MJPEG star: the encoder chain input buffer -> DCT -> zigzag/quantization
//     -> VLE -> output image, 30 blocks (header + 64 words) on every hop;
//   MPEG-2 network: the encoder's data flow, 20 blocks on every hop: input
//     buffer -> motion estimation -> motion compensation -> DCT/quantization
//     -> VLE/output buffer, DCT/quantization -> inverse quantization/IDCT ->
//     frame buffer -> motion estimation;
//   mesh: the bursty job of 50 packets of 32 flits per node to hashed random
//     nodes, after a routing table rewrite that sends node 0's traffic for
//     node 15 through node 4 (first south, then X-Y from there) instead of X-Y.
// Before the loads, one packet on each network measures the zero-load
// latency (4 cycles per router). Every packet is checked by its receiver.
// Each mechanism is counted and must occur: multi-flit wormhole packets,
// headers competing for an output, stalled senders, full output buffers,
// flits on the MPEG-2 inter-router channel, flits on long-range links and a
// packet following a rewritten table entry.
module tb_noc_prototypes_top;
  import noc_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int MJ_NN = 5;
  logic         mj_tx_valid [5], mj_tx_ready [5], mj_rx_valid [5], mj_rx_first [5], mj_rx_last [5], mj_rx_ready [5];
  logic [W-1:0] mj_tx_data [5], mj_rx_data [5];
  addr_t        mj_tx_dest [5];
  len_t         mj_tx_len [5];
  logic         mj_cfg_we = 1'b0;
  addr_t        mj_cfg_dest = '0;
  port_t        mj_cfg_port = '0;
  int mj_sent [5], mj_recv [5], mj_err [5], mj_chk [5], mj_stall [5];
  longint mj_lat [5], mj_last [5];
  int mj_npkt [5], mj_dmode [5], mj_fdest [5];
  int mj_blen = 64;

  localparam int MP_NN = 7;
  logic         mp_tx_valid [7], mp_tx_ready [7], mp_rx_valid [7], mp_rx_first [7], mp_rx_last [7], mp_rx_ready [7];
  logic [W-1:0] mp_tx_data [7], mp_rx_data [7];
  addr_t        mp_tx_dest [7];
  len_t         mp_tx_len [7];
  logic         mp_cfg_we = 1'b0;
  addr_t        mp_cfg_dest = '0;
  port_t        mp_cfg_port = '0;
  int mp_sent [7], mp_recv [7], mp_err [7], mp_chk [7], mp_stall [7];
  longint mp_lat [7], mp_last [7];
  int mp_npkt [7], mp_dmode [7], mp_fdest [7];
  int mp_blen = 64;

  localparam int MS_NN = 16;
  logic         ms_tx_valid [16], ms_tx_ready [16], ms_rx_valid [16], ms_rx_first [16], ms_rx_last [16], ms_rx_ready [16];
  logic [W-1:0] ms_tx_data [16], ms_rx_data [16];
  addr_t        ms_tx_dest [16];
  len_t         ms_tx_len [16];
  logic         ms_cfg_we = 1'b0;
  addr_t        ms_cfg_dest = '0;
  port_t        ms_cfg_port = '0;
  int ms_sent [16], ms_recv [16], ms_err [16], ms_chk [16], ms_stall [16];
  longint ms_lat [16], ms_last [16];
  int ms_npkt [16], ms_dmode [16], ms_fdest [16];
  int ms_blen = 64;

  logic mp_cfg_router = 1'b0;
  addr_t ms_cfg_node = '0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  noc_prototypes_top dut (.*);

  for (genvar n = 0; n < 5; n++) begin : g_mj
    tb_core_agent #(.ID(n), .NN(5), .W(W), .MAXLEN(64)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .bursty(1'b1), .interval(0),
      .npkt(mj_npkt[n]), .body_len(mj_blen), .dest_mode(mj_dmode[n]), .hot_node(0), .hot_pct(0),
      .fixed_dest(mj_fdest[n]), .rx_stall_pct(0),
      .tx_valid(mj_tx_valid[n]), .tx_data(mj_tx_data[n]), .tx_dest(mj_tx_dest[n]), .tx_len(mj_tx_len[n]),
      .tx_ready(mj_tx_ready[n]), .rx_valid(mj_rx_valid[n]), .rx_data(mj_rx_data[n]),
      .rx_first(mj_rx_first[n]), .rx_last(mj_rx_last[n]), .rx_ready(mj_rx_ready[n]),
      .sent(mj_sent[n]), .received(mj_recv[n]), .errors(mj_err[n]), .nchecks(mj_chk[n]),
      .lat_sum(mj_lat[n]), .last_rx_cycle(mj_last[n]), .tx_stalls(mj_stall[n])
    );
  end

  for (genvar n = 0; n < 7; n++) begin : g_mp
    tb_core_agent #(.ID(n), .NN(7), .W(W), .MAXLEN(64)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .bursty(1'b1), .interval(0),
      .npkt(mp_npkt[n]), .body_len(mp_blen), .dest_mode(mp_dmode[n]), .hot_node(0), .hot_pct(0),
      .fixed_dest(mp_fdest[n]), .rx_stall_pct(0),
      .tx_valid(mp_tx_valid[n]), .tx_data(mp_tx_data[n]), .tx_dest(mp_tx_dest[n]), .tx_len(mp_tx_len[n]),
      .tx_ready(mp_tx_ready[n]), .rx_valid(mp_rx_valid[n]), .rx_data(mp_rx_data[n]),
      .rx_first(mp_rx_first[n]), .rx_last(mp_rx_last[n]), .rx_ready(mp_rx_ready[n]),
      .sent(mp_sent[n]), .received(mp_recv[n]), .errors(mp_err[n]), .nchecks(mp_chk[n]),
      .lat_sum(mp_lat[n]), .last_rx_cycle(mp_last[n]), .tx_stalls(mp_stall[n])
    );
  end

  for (genvar n = 0; n < 16; n++) begin : g_ms
    tb_core_agent #(.ID(n), .NN(16), .W(W), .MAXLEN(64)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .bursty(1'b1), .interval(0),
      .npkt(ms_npkt[n]), .body_len(ms_blen), .dest_mode(ms_dmode[n]), .hot_node(0), .hot_pct(0),
      .fixed_dest(ms_fdest[n]), .rx_stall_pct(0),
      .tx_valid(ms_tx_valid[n]), .tx_data(ms_tx_data[n]), .tx_dest(ms_tx_dest[n]), .tx_len(ms_tx_len[n]),
      .tx_ready(ms_tx_ready[n]), .rx_valid(ms_rx_valid[n]), .rx_data(ms_rx_data[n]),
      .rx_first(ms_rx_first[n]), .rx_last(ms_rx_last[n]), .rx_ready(ms_rx_ready[n]),
      .sent(ms_sent[n]), .received(ms_recv[n]), .errors(ms_err[n]), .nchecks(ms_chk[n]),
      .lat_sum(ms_lat[n]), .last_rx_cycle(ms_last[n]), .tx_stalls(ms_stall[n])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_conflict = 0, n_full = 0, n_inter = 0, n_lrl = 0, n_rewrite = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int o = 0; o < 5; o++) begin
        automatic int nh = 0;
        for (int i = 0; i < 5; i++)
          if (dut.u_mjpeg.u_r1.req_valid[i] && dut.u_mjpeg.u_r1.req_head[i]
              && dut.u_mjpeg.u_r1.req_port[i] == port_t'(o)) nh++;
        if (nh > 1) n_conflict++;
      end
      for (int o = 0; o < 5; o++) begin
        automatic int nh = 0;
        for (int i = 0; i < 5; i++)
          if (dut.u_mpeg2.u_r1.req_valid[i] && dut.u_mpeg2.u_r1.req_head[i]
              && dut.u_mpeg2.u_r1.req_port[i] == port_t'(o)) nh++;
        if (nh > 1) n_conflict++;
      end
      if (dut.u_mpeg2.out1_v[4] && dut.u_mpeg2.out1_r[4]) n_inter++;
      if (dut.u_mpeg2.out2_v[3] && dut.u_mpeg2.out2_r[3]) n_inter++;
      if (dut.u_mesh.lv[5][DIR_LRL] && dut.u_mesh.lr[5][DIR_LRL]) n_lrl++;
      if (dut.u_mesh.lv[15][DIR_LRL] && dut.u_mesh.lr[15][DIR_LRL]) n_lrl++;
      if (dut.u_mesh.lv[9][DIR_LRL] && dut.u_mesh.lr[9][DIR_LRL]) n_lrl++;
      if (dut.u_mesh.lv[3][DIR_LRL] && dut.u_mesh.lr[3][DIR_LRL]) n_lrl++;
      for (int n = 0; n < 16; n++)
        for (int d = 1; d < NUM_DIRS; d++)
          if (dut.u_mesh.lv[n][d] && !dut.u_mesh.lr[n][d]) n_full++;
      // node 0 -> node 15 packets leaving node 0 southwards after the rewrite
      if (ms_cfg_port == 3'd2 && dut.u_mesh.lv[0][DIR_S] && dut.u_mesh.lr[0][DIR_S]
          && dut.u_mesh.lf[0][DIR_S][7:0] == 8'd15 && dut.u_mesh.lf[0][DIR_S][15:8] == 8'd32) n_rewrite++;
    end
  end

  function automatic int sum(input int a [], input int n);
    int t = 0;
    for (int i = 0; i < n; i++) t += a[i];
    return t;
  endfunction

  int mj_r, mp_r, ms_r;
  always_comb begin
    mj_r = 0; mp_r = 0; ms_r = 0;
    for (int i = 0; i < 5; i++) mj_r += mj_recv[i];
    for (int i = 0; i < 7; i++) mp_r += mp_recv[i];
    for (int i = 0; i < 16; i++) ms_r += ms_recv[i];
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: received %0d %0d %0d", mj_r, mp_r, ms_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t_ms, t_mj, t_mp;
  bit mj_done = 0, mp_done = 0, ms_done = 0;
  initial begin
    for (int n = 0; n < 5; n++) begin mj_npkt[n] = 0; mj_dmode[n] = 2; mj_fdest[n] = 0; end
    for (int n = 0; n < 7; n++) begin mp_npkt[n] = 0; mp_dmode[n] = 2; mp_fdest[n] = 0; end
    for (int n = 0; n < 16; n++) begin ms_npkt[n] = 0; ms_dmode[n] = 2; ms_fdest[n] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // zero-load latency: mj 0->1 (1 router), mp 0->6 (2 routers), ms 0->15 over X-Y (7 routers)
    @(negedge clk);
    mj_fdest[0] = 1; mj_npkt[0] = 1;
    mp_fdest[0] = 6; mp_npkt[0] = 1;
    ms_blen = 31;
    ms_fdest[0] = 15; ms_npkt[0] = 1;
    while (!(mj_recv[1] == 1 && mp_recv[6] == 1 && ms_recv[15] == 1)) @(posedge clk);
    check(mj_lat[1] == 4 * 1 + 64, "MJPEG zero-load latency");
    check(mp_lat[6] == 4 * 2 + 64, "MPEG-2 zero-load latency across both routers");
    check(ms_lat[15] == 4 * 7 + 31, "mesh zero-load latency, 7 routers");
    // rewrite node 0's entry for node 15: south (port 2 at a corner: local, east, south)
    @(negedge clk);
    ms_cfg_we = 1'b1; ms_cfg_node = 8'd0; ms_cfg_dest = 8'd15; ms_cfg_port = 3'd2;
    @(negedge clk);
    ms_cfg_we = 1'b0;
    // loads, all at once
    t0 = cycle;
    for (int n = 0; n < 4; n++) begin mj_fdest[n] = n + 1; mj_npkt[n] += 30; end
    mp_fdest[0] = 2; mp_npkt[0] += 20;   // input buffer -> motion estimation
    mp_fdest[2] = 6; mp_npkt[2] += 20;   // motion estimation -> motion compensation
    mp_fdest[6] = 1; mp_npkt[6] += 20;   // motion compensation -> DCT and quantization
    mp_fdest[1] = 5; mp_npkt[1] += 20;   // DCT and quantization -> VLE and output buffer
    mp_fdest[5] = 4; mp_npkt[5] += 20;   // (reconstruction path) -> inverse quantization / IDCT
    mp_fdest[4] = 3; mp_npkt[4] += 20;   // IDCT -> frame buffer
    mp_fdest[3] = 2; mp_npkt[3] += 20;   // frame buffer -> motion estimation
    for (int n = 0; n < 16; n++) begin ms_dmode[n] = 4; ms_npkt[n] += 50; end
    while (!(mj_done && mp_done && ms_done)) begin
      @(posedge clk);
      if (!mj_done && mj_r == 1 + 120) begin mj_done = 1; t_mj = cycle - t0; end
      if (!mp_done && mp_r == 1 + 140) begin mp_done = 1; t_mp = cycle - t0; end
      if (!ms_done && ms_r == 1 + 800) begin ms_done = 1; t_ms = cycle - t0; end
    end
    repeat (5) @(posedge clk);
    for (int n = 0; n < 5; n++) begin checks += mj_chk[n]; failures += mj_err[n]; check(mj_sent[n] == mj_npkt[n], "MJPEG sent"); end
    for (int n = 0; n < 7; n++) begin checks += mp_chk[n]; failures += mp_err[n]; check(mp_sent[n] == mp_npkt[n], "MPEG-2 sent"); end
    for (int n = 0; n < 16; n++) begin checks += ms_chk[n]; failures += ms_err[n]; check(ms_sent[n] == ms_npkt[n], "mesh sent"); end
    check(mj_r == 121 && mp_r == 141 && ms_r == 801, "every packet received once");
    check(t_mj >= 30 * 65, "MJPEG chain no faster than one flit per cycle per hop");
    check(n_conflict > 0, "headers competed for an output");
    check(sum(ms_stall, 16) > 0, "senders stalled");
    check(n_full > 0, "full buffers held links");
    check(n_inter > 0, "MPEG-2 inter-router channel used");
    check(n_lrl > 0, "long-range links used");
    check(n_rewrite > 0, "rewritten table entry followed");
    $display("top: MJPEG %0d cycles, MPEG-2 %0d cycles, mesh %0d cycles; conflicts %0d, full %0d, inter-router flits %0d, link flits %0d, rerouted headers %0d",
             t_mj, t_mp, t_ms, n_conflict, n_full, n_inter, n_lrl, n_rewrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
