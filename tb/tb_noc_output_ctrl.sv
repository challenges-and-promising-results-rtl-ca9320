// tb_noc_output_ctrl: self-checking test of a router output control.
// Three modelled input controls offer packets, most for this output
// (MY_PORT = 1) and some for another port, which the model takes itself.
// The header's destination field carries the sender's number so the
// receiver can tell the packets apart. Checked: only requests for this port
// are granted, at most one per cycle; each packet leaves the output whole,
// never interleaved with another, and in the order its sender offered it; a
// granted flit reaches the link two cycles later when the link never stalls;
// with all inputs competing the grant rotates (round robin) so no waiting
// input is passed over twice.
module tb_noc_output_ctrl;
  import noc_pkg::*;
  localparam int W  = 16;
  localparam int NP = 3;
  localparam int MY = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid [NP];
  logic [W-1:0] req_flit  [NP];
  port_t        req_port  [NP];
  logic         req_head  [NP];
  logic         req_tail  [NP];
  logic         grant     [NP];
  logic         out_valid;
  logic [W-1:0] out_flit;
  logic         out_ready = 1'b0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int phase = 0;              // 0: free-running link, 1: random stalls, 2: single-flit contention

  typedef struct {
    logic [W-1:0] flit;
    bit           mine;
    bit           head;
    bit           tail;
  } rq_t;
  rq_t          src_q [NP][$];   // flits still to offer, per input
  logic [W-1:0] exp_q [NP][$];   // flits for this port, per input, in order
  longint       t_q [$];         // grant cycles of flits not yet on the link
  int delivered = 0;
  int lat_checks = 0;
  int rr_checks = 0;
  int other_taken = 0;

  noc_output_ctrl #(.FLIT_W(W), .NUM_PORTS(NP), .DEPTH(4), .MY_PORT(MY)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic add_packet(input int i, input int len, input bit mine);
    for (int k = 0; k < len; k++) begin
      automatic rq_t r;
      r.flit = (k == 0) ? make_header(addr_t'(i), len_t'(len)) : W'({i[3:0], 12'($urandom)});
      r.mine = mine;
      r.head = (k == 0);
      r.tail = (k == len - 1);
      src_q[i].push_back(r);
      if (mine) exp_q[i].push_back(r.flit);
    end
    drive_reqs();
  endtask

  task automatic drive_reqs();
    for (int i = 0; i < NP; i++) begin
      req_valid[i] = rst_n && (src_q[i].size() > 0);
      req_flit[i]  = (src_q[i].size() > 0) ? src_q[i][0].flit : '0;
      req_port[i]  = (src_q[i].size() > 0 && src_q[i][0].mine) ? port_t'(MY) : port_t'(2);
      req_head[i]  = (src_q[i].size() > 0) ? src_q[i][0].head : 1'b0;
      req_tail[i]  = (src_q[i].size() > 0) ? src_q[i][0].tail : 1'b0;
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("phase %0d src %0d %0d %0d exp %0d %0d %0d deliv %0d", phase, src_q[0].size(), src_q[1].size(), src_q[2].size(), exp_q[0].size(), exp_q[1].size(), exp_q[2].size(), delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sample at the falling edge, update the model after the rising edge.
  int cur_src = -1;
  int cur_left = 0;
  int last_winner = -1;
  initial begin
    @(posedge rst_n);
    forever begin
      automatic int ngr = 0;
      automatic int win = -1;
      automatic bit pop_other [NP];
      automatic bit waiting [NP];
      @(negedge clk);
      out_ready = (phase == 1) ? (($urandom % 100) < 40) : 1'b1;
      #1;
      for (int i = 0; i < NP; i++) begin
        pop_other[i] = 1'b0;
        waiting[i] = req_valid[i] && req_head[i] && (req_port[i] == port_t'(MY));
        if (grant[i]) begin
          ngr++;
          win = i;
          check(req_valid[i] && req_port[i] == port_t'(MY), "grant only to a request for this port");
        end
        if (req_valid[i] && req_port[i] != port_t'(MY) && ($urandom % 2 == 0)) pop_other[i] = 1'b1;
      end
      check(ngr <= 1, "one grant per cycle");
      // round robin: in the contention phase a new packet goes to the next waiting input
      if (phase == 2 && win >= 0 && req_head[win] && last_winner >= 0) begin
        automatic int expw = -1;
        for (int k = 1; k <= NP; k++) begin
          automatic int idx = (last_winner + k) % NP;
          if (expw < 0 && waiting[idx]) expw = idx;
        end
        check(win == expw, "round-robin order");
        rr_checks++;
      end
      if (win >= 0 && req_head[win]) last_winner = win;
      if (win >= 0) t_q.push_back(cycle);
      // link side
      if (out_valid && out_ready) begin
        automatic longint tg = t_q.pop_front();
        if (phase == 0) begin
          check(cycle - tg == 2, "two cycles from grant to link");
          if (cycle - tg != 2 && failures < 5) $display("lat %0d", cycle - tg);
          lat_checks++;
        end
        if (cur_left == 0) begin
          cur_src  = int'(hdr_dest(out_flit));
          cur_left = int'(hdr_len(out_flit));
          check(cur_src < NP, "header names a sender");
        end
        if (cur_src < NP && exp_q[cur_src].size() > 0) begin
          automatic logic [W-1:0] ef = exp_q[cur_src].pop_front();
          check(out_flit == ef, "packet whole and in order");
          if (out_flit != ef && failures < 4) $display("src %0d left %0d got %h exp %h", cur_src, cur_left, out_flit, ef);
        end else begin
          check(1'b0, "unexpected flit");
        end
        cur_left--;
        delivered++;
      end
      @(posedge clk);
      cycle++;
      for (int i = 0; i < NP; i++) begin
        if (i == win) void'(src_q[i].pop_front());
        else if (pop_other[i]) begin void'(src_q[i].pop_front()); other_taken++; end
      end
      #1 drive_reqs();
    end
  end

  initial begin
    drive_reqs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    drive_reqs();
    for (phase = 0; phase < 3; phase++) begin
      @(negedge clk);
      for (int p = 0; p < 60; p++)
        for (int i = 0; i < NP; i++)
          if (phase == 2) add_packet(i, 1, 1'b1);
          else add_packet(i, 1 + ($urandom % 12), ($urandom % 100) < 75);
      while (!(src_q[0].size() == 0 && src_q[1].size() == 0 && src_q[2].size() == 0
               && exp_q[0].size() == 0 && exp_q[1].size() == 0 && exp_q[2].size() == 0))
        @(posedge clk);
      repeat (3) @(posedge clk);
    end
    check(lat_checks > 100, "latency observed");
    check(rr_checks > 100, "arbitration observed");
    check(other_taken > 10, "requests for other ports left alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
