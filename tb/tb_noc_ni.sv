// tb_noc_ni: self-checking test of the network interface.
// Two interfaces are wired back to back (A's router side to B's and back),
// each driven by a test core that sends packets of random length (2 to 40
// body words) to the other. Checked: every header on the wire carries the
// destination and a length of body words + 1; the body arrives intact and
// complete with first/last flags (checked by the cores); with no stalls the
// first word reaches the receiving core one cycle after its header crossed
// the wire (the interface adds no register); and with the receiving core
// stalling at random, nothing is lost.
module tb_noc_ni;
  import noc_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         tx_valid [2], tx_ready [2], rx_valid [2], rx_first [2], rx_last [2], rx_ready [2];
  logic [W-1:0] tx_data [2], rx_data [2];
  addr_t        tx_dest [2];
  len_t         tx_len [2];
  logic         lv [2], lr [2];
  logic [W-1:0] lf [2];
  int sent [2], received [2], errors [2], nchecks [2], tx_stalls [2];
  longint lat_sum [2], last_rx [2];
  logic enable = 1'b0;
  int stall_pct = 0;
  int npkt = 0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int hdr_checks = 0, gap_checks = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar n = 0; n < 2; n++) begin : g_n
    noc_ni #(.FLIT_W(W)) u_ni (
      .clk(clk), .rst_n(rst_n),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_dest(tx_dest[n]), .tx_len(tx_len[n]),
      .tx_ready(tx_ready[n]),
      .net_out_valid(lv[n]), .net_out_flit(lf[n]), .net_out_ready(lr[n]),
      .net_in_valid(lv[1-n]), .net_in_flit(lf[1-n]), .net_in_ready(lr[1-n]),
      .rx_valid(rx_valid[n]), .rx_data(rx_data[n]), .rx_first(rx_first[n]), .rx_last(rx_last[n]),
      .rx_ready(rx_ready[n])
    );
    tb_core_agent #(.ID(n), .NN(2), .W(W), .MAXLEN(40)) u_core (
      .clk(clk), .rst_n(rst_n), .enable(enable), .bursty(1'b1), .interval(0), .npkt(npkt),
      .body_len(0), .dest_mode(2), .hot_node(0), .hot_pct(0), .fixed_dest(1 - n),
      .rx_stall_pct(stall_pct),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]), .tx_dest(tx_dest[n]), .tx_len(tx_len[n]),
      .tx_ready(tx_ready[n]), .rx_valid(rx_valid[n]), .rx_data(rx_data[n]),
      .rx_first(rx_first[n]), .rx_last(rx_last[n]), .rx_ready(rx_ready[n]),
      .sent(sent[n]), .received(received[n]), .errors(errors[n]), .nchecks(nchecks[n]),
      .lat_sum(lat_sum[n]), .last_rx_cycle(last_rx[n]), .tx_stalls(tx_stalls[n])
    );
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wire monitor: headers, and the gap from header to first delivered word
  int  left [2] = '{0, 0};
  longint hdr_cyc [2];
  bit  want_first [2] = '{0, 0};
  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < 2; n++) begin
        if (lv[n] && lr[n]) begin
          if (left[n] == 0) begin
            check(hdr_dest(lf[n]) == addr_t'(1 - n), "header destination");
            check(hdr_len(lf[n]) == tx_len[n] + 1'b1, "header length = body + 1");
            hdr_checks++;
            left[n] = int'(hdr_len(lf[n])) - 1;
            hdr_cyc[n] = cycle;
            want_first[n] = 1'b1;
          end else begin
            left[n]--;
          end
        end
        if (want_first[1-n] && rx_valid[n] && rx_first[n] && stall_pct == 0) begin
          check(cycle - hdr_cyc[1-n] == 1, "first word one cycle after its header");
          gap_checks++;
          want_first[1-n] = 1'b0;
        end
      end
      cycle++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    npkt = 30;
    enable = 1'b1;
    while (received[0] + received[1] < 60) @(posedge clk);
    @(negedge clk);
    stall_pct = 60;
    npkt = 60;
    while (received[0] + received[1] < 120) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      checks += nchecks[n];
      failures += errors[n];
      check(sent[n] == 60 && received[n] == 60, "all packets through");
    end
    check(hdr_checks == 120, "headers seen");
    check(gap_checks >= 50, "gaps measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
