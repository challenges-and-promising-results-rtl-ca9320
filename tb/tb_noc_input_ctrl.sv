// tb_noc_input_ctrl: self-checking test of a router input control.
// A stream of packets of random length (1 to 20 flits) and destination is
// offered with random gaps, and the request side is accepted at random. Each
// request must carry the flits in order, flag the header and the tail
// correctly, name the port the (modelled) routing table gives for the
// header's destination, and keep that port for the body. With no stalls a
// flit must reach the request register two cycles after it was taken.
module tb_noc_input_ctrl;
  import noc_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0, in_ready;
  logic [W-1:0] in_flit = '0;
  addr_t        rt_dest;
  port_t        rt_port;
  logic         req_valid, req_head, req_tail;
  logic [W-1:0] req_flit;
  port_t        req_port;
  logic         req_accept = 1'b0;

  int checks = 0, failures = 0;
  int stall_pct = 0;
  int gap_pct = 0;
  longint cycle = 0;

  typedef struct {
    logic [W-1:0] flit;
    port_t        port;
    bit           head;
    bit           tail;
    longint       t_in;
  } exp_t;
  exp_t exp_q [$];
  exp_t src_q [$];

  // routing table model
  assign rt_port = port_t'((rt_dest * 3 + 1) % 6);

  noc_input_ctrl #(.FLIT_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the stimulus
  initial begin
    for (int p = 0; p < 300; p++) begin
      automatic int len = 1 + ($urandom % 20);
      automatic addr_t dst = addr_t'($urandom % 16);
      automatic port_t pt = port_t'((dst * 3 + 1) % 6);
      for (int k = 0; k < len; k++) begin
        exp_t e;
        e.flit = (k == 0) ? make_header(dst, len_t'(len)) : W'($urandom);
        e.port = pt;
        e.head = (k == 0);
        e.tail = (k == len - 1);
        e.t_in = 0;
        src_q.push_back(e);
      end
    end
  end

  // driver
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (src_q.size() > 0) begin
      if (cycle > 8000) begin stall_pct = 30; gap_pct = 30; end
      in_valid = (($urandom % 100) >= gap_pct);
      in_flit  = src_q[0].flit;
      @(negedge clk);
      if (in_valid && in_ready) begin
        automatic exp_t e;
        e = src_q.pop_front();
        e.t_in = cycle;
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
  end

  // request side
  int got = 0;
  int latency_checks = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      #1;
      req_accept = (($urandom % 100) >= stall_pct);
      @(negedge clk);
      if (req_valid && req_accept) begin
        automatic exp_t e;
        e = exp_q.pop_front();
        check(req_flit == e.flit, "flit");
        if (req_flit != e.flit && failures < 4) $display("got %h exp %h q=%0d", req_flit, e.flit, exp_q.size());
        check(req_port == e.port, "port");
        check(req_head == e.head, "head flag");
        check(req_tail == e.tail, "tail flag");
        if (stall_pct == 0 && e.t_in != 0) begin
          check(cycle - e.t_in == 2, "two-cycle latency");
          latency_checks++;
        end
        got++;
      end
      @(posedge clk);
    end
  end

  initial begin
    wait (rst_n);
    wait (got > 0 && src_q.size() == 0 && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(latency_checks > 100, "latency observed");
    check(got > 1000, "flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
