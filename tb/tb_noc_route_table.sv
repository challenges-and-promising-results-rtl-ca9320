// tb_noc_route_table: self-checking test of the routing lookup table.
// After reset every read port must return the initial routes; then random
// entries are rewritten and all destinations are read back on every port and
// compared with a model. Out-of-range destinations must read port 0.
module tb_noc_route_table;
  import noc_pkg::*;
  localparam int NN = 16;
  localparam int NR = 3;

  function automatic route_init_t init_routes();
    route_init_t r = '0;
    for (int i = 0; i < NN; i++) r[i] = port_t'((i * 5 + 3) % 7);
    return r;
  endfunction

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t rd_dest [NR];
  port_t rd_port [NR];
  logic  we = 1'b0;
  addr_t waddr = '0;
  port_t wport = '0;
  port_t model [NN];
  int checks = 0, failures = 0;

  noc_route_table #(.NUM_NODES(NN), .NUM_RD(NR), .ROUTE_INIT(init_routes())) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic read_all();
    for (int d = 0; d < NN + 2; d++) begin
      for (int r = 0; r < NR; r++) rd_dest[r] = addr_t'((d + r) % (NN + 2));
      #1;
      for (int r = 0; r < NR; r++) begin
        int dd = (d + r) % (NN + 2);
        check(rd_port[r] == ((dd < NN) ? model[dd] : port_t'(0)), "read");
      end
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) rd_dest[r] = '0;
    for (int i = 0; i < NN; i++) model[i] = port_t'((i * 5 + 3) % 7);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    read_all();
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = addr_t'($urandom % (NN + 4));
      wport = port_t'($urandom);
      @(posedge clk);
      #1;
      we = 1'b0;
      if (int'(waddr) < NN) model[waddr] = wport;
      read_all();
    end
    // reset restores the initial table
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NN; i++) model[i] = port_t'((i * 5 + 3) % 7);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
