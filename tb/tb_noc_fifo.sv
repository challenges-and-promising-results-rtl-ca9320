// tb_noc_fifo: self-checking test of the output-buffer FIFO.
// Random pushes and pops (with a phase that fills the buffer and one that
// drains it) are compared against a queue model: read data, empty, full and
// count are checked every cycle, and a filled buffer must hold exactly DEPTH
// words.
module tb_noc_fifo;
  localparam int W = 16;
  localparam int D = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic         empty, full;
  logic [$clog2(D+1)-1:0] count;

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int fullseen = 0;

  noc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int pp, pq;
      // phase 0: mostly push, phase 1: mostly pop, phase 2: mixed
      case ((cyc / 500) % 3)
        0: begin pp = 90; pq = 10; end
        1: begin pp = 10; pq = 90; end
        default: begin pp = 50; pq = 50; end
      endcase
      @(negedge clk);
      // compare outputs with the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rdata == model[0], "rdata");
      if (full) fullseen++;
      push  = (($urandom % 100) < pp) && !full;
      pop   = (($urandom % 100) < pq) && !empty;
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(fullseen > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
