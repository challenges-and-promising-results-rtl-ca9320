// tb_noc_router: self-checking test of the 5-port router.
// Each input offers packets of random length (2 to 40 flits) to random
// destinations; each output accepts at random. Body flits carry
// {source, sequence, index}, so every output checks that a packet arrives
// whole, uninterleaved, at the port the routing table names for its header,
// with the length its header gives, and in order per source. Phases:
//   0  one packet at a time into an idle router: a header must take exactly
//      four cycles from input link to output link, body flits one per cycle;
//   1  all inputs at once with random output stalls (contention, full
//      output buffers and back-pressure must all occur);
//   2  a routing table entry is rewritten at run time and packets for that
//      node must follow the new entry.
module tb_noc_router;
  import noc_pkg::*;
  localparam int W  = 16;
  localparam int NP = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid  [NP];
  logic [W-1:0] in_flit   [NP];
  logic         in_ready  [NP];
  logic         out_valid [NP];
  logic [W-1:0] out_flit  [NP];
  logic         out_ready [NP];
  logic         rt_we = 1'b0;
  addr_t        rt_addr = '0;
  port_t        rt_port = '0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int phase = 0;
  port_t route [NP];              // model of the routing table
  logic [W-1:0] src_q [NP][$];
  bit           src_h [NP][$];    // 1 for a header flit
  int exp_seq [NP][NP][$];        // [output][source] sequence numbers due
  int seqno [NP];
  longint hdr_t [NP][$];          // input cycle of headers in phase 0
  int lat_checks = 0, full_seen = 0, stall_seen = 0, conflict_seen = 0, rewritten = 0;
  int delivered = 0, sent = 0;

  noc_router #(.NUM_PORTS(NP), .FLIT_W(W), .DEPTH(16), .NUM_NODES(8),
               .ROUTE_INIT(star_routes(NP))) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic add_packet(input int i, input int dst, input int len);
    src_q[i].push_back(make_header(addr_t'(dst), len_t'(len)));
    src_h[i].push_back(1'b1);
    for (int k = 1; k < len; k++) begin
      src_q[i].push_back({i[2:0], seqno[i][6:0], k[5:0]});
      src_h[i].push_back(1'b0);
    end
    exp_seq[route[dst]][i].push_back(seqno[i]);
    seqno[i] = (seqno[i] + 1) % 128;
    sent++;
  endtask

  function automatic bit all_idle();
    for (int i = 0; i < NP; i++) begin
      if (src_q[i].size() > 0) return 1'b0;
      for (int o = 0; o < NP; o++) if (exp_seq[o][i].size() > 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ofull [NP];
  for (genvar g = 0; g < NP; g++) begin : g_probe
    assign ofull[g] = dut.g_out[g].u_out.fifo_full;
  end

  // Drivers and monitors: sample handshakes at the falling edge, change
  // stimulus just after the rising edge.
  int o_left [NP];
  int o_src [NP];
  int o_seq [NP];
  int o_idx [NP];
  int o_len [NP];
  initial begin
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 1'b0; in_flit[i] = '0; out_ready[i] = 1'b0;
      o_left[i] = 0; seqno[i] = 0; route[i] = port_t'(i);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      automatic bit in_fire [NP];
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        in_fire[i] = in_valid[i] && in_ready[i];
        if (in_valid[i] && !in_ready[i]) stall_seen++;
        if (ofull[i]) full_seen++;
      end
      // two heads waiting for one free output
      for (int o = 0; o < NP; o++) begin
        automatic int nh = 0;
        for (int i = 0; i < NP; i++)
          if (dut.req_valid[i] && dut.req_head[i] && dut.req_port[i] == port_t'(o)) nh++;
        if (nh > 1) conflict_seen++;
      end
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          automatic logic [W-1:0] f = out_flit[o];
          delivered++;
          if (o_left[o] == 0) begin
            check(route[hdr_dest(f)] == port_t'(o), "header at the port its table entry names");
            o_len[o]  = int'(hdr_len(f));
            o_left[o] = o_len[o] - 1;
            o_idx[o]  = 1;
            o_src[o]  = -1;
            if (phase == 0) begin
              // exactly one header is in flight in phase 0
              for (int i = 0; i < NP; i++)
                if (hdr_t[i].size() > 0) begin
                  check(cycle - hdr_t[i].pop_front() == 4, "four-cycle header latency");
                  lat_checks++;
                end
            end
          end else begin
            if (o_src[o] < 0) begin
              o_src[o] = int'(f[15:13]);
              o_seq[o] = int'(f[12:6]);
              if (o_src[o] < NP && exp_seq[o][o_src[o]].size() > 0)
                check(exp_seq[o][o_src[o]].pop_front() == o_seq[o], "in order per source");
              else
                check(1'b0, "packet expected at this output");
            end
            check(f == {o_src[o][2:0], o_seq[o][6:0], o_idx[o][5:0]}, "body flit intact");
            o_idx[o]++;
            o_left[o]--;
          end
        end
      end
      @(posedge clk);
      cycle++;
      #1;
      for (int i = 0; i < NP; i++) begin
        if (in_fire[i]) begin
          if (phase == 0 && src_h[i][0]) hdr_t[i].push_back(cycle - 1);
          void'(src_q[i].pop_front());
          void'(src_h[i].pop_front());
        end
        in_valid[i]  = (src_q[i].size() > 0) && (phase == 0 || ($urandom % 100) < 80);
        in_flit[i]   = (src_q[i].size() > 0) ? src_q[i][0] : '0;
        out_ready[i] = (phase != 1) || (($urandom % 100) < 50);
      end
    end
  end

  initial begin
    @(posedge rst_n);
    // phase 0: isolated packets, every input to every output
    for (int i = 0; i < NP; i++)
      for (int d = 0; d < NP; d++) begin
        @(negedge clk);
        add_packet(i, d, 2 + ($urandom % 10));
        while (!all_idle()) @(posedge clk);
        repeat (2) @(posedge clk);
      end
    // phase 1: everyone at once
    @(negedge clk);
    phase = 1;
    for (int p = 0; p < 40; p++)
      for (int i = 0; i < NP; i++) add_packet(i, $urandom % NP, 2 + ($urandom % 39));
    while (!all_idle()) @(posedge clk);
    repeat (3) @(posedge clk);
    // phase 2: send node 3's traffic out of port 0 instead
    @(negedge clk);
    phase = 2;
    rt_we = 1'b1; rt_addr = 8'd3; rt_port = 3'd0;
    @(negedge clk);
    rt_we = 1'b0;
    route[3] = 3'd0;
    for (int p = 0; p < 10; p++)
      for (int i = 0; i < NP; i++) add_packet(i, 3, 2 + ($urandom % 8));
    while (!all_idle()) @(posedge clk);
    rewritten = 1;
    repeat (3) @(posedge clk);
    check(lat_checks == NP * NP, "latency measured for every port pair");
    check(full_seen > 0, "an output buffer filled");
    check(stall_seen > 0, "back-pressure reached an input link");
    check(conflict_seen > 0, "two headers competed for one output");
    check(delivered > 4000, "flits delivered");
    $display("router: sent %0d packets, %0d flits out, %0d latency checks, full %0d, stalls %0d, conflicts %0d",
             sent, delivered, lat_checks, full_seen, stall_seen, conflict_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
