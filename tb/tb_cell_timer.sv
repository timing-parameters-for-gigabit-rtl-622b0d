// Testbench for cell_timer. CELL_CLK is driven once every 16 clocks; for
// every CC_TAP value the four strobes must be high exactly in the cycle that
// ends with edge 1, 3, 4 and 8 (plus CC_TAP, modulo 16) after the edge that
// sampled CELL_CLK, and never before the first CELL_CLK. A misplaced CELL_CLK
// must raise cell_clk_err and restart the count.
`timescale 1ns / 1ps
module tb_cell_timer;
  import gbs_timing_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cell_clk = 1'b0;
  cell_phase_t tap = '0, phase;
  logic locked, err;
  cell_strobes_t stb;
  int checks = 0, failures = 0;
  int e = -1;          // edges since the edge that sampled CELL_CLK high
  int errs = 0;

  cell_timer dut (.clk(clk), .rst_n(rst_n), .cell_clk(cell_clk), .cc_tap(tap),
                  .phase(phase), .locked(locked), .cell_clk_err(err), .stb(stb));

  always #4.1665 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (edge %0d, tap %0d) at %t", what, e, tap, $time);
    end
  endtask

  function automatic bit due(int edge_no, int ee, int t);
    return ee >= 0 && ((ee % 16) == ((edge_no + t) % 16));
  endfunction

  // Observe the strobes just before each edge, then advance the edge count.
  always @(posedge clk) begin
    int next_e;
    next_e = (e < 0) ? -1 : e + 1;
    if (rst_n) begin
      check(stb.data_out == due(EDGE_DATA_OUT, next_e, int'(tap)), "data_out strobe");
      check(stb.data_in  == due(EDGE_DATA_IN,  next_e, int'(tap)), "data_in strobe");
      check(stb.gnt_out  == due(EDGE_GNT_OUT,  next_e, int'(tap)), "gnt_out strobe");
      check(stb.gnt_in   == due(EDGE_GNT_IN,   next_e, int'(tap)), "gnt_in strobe");
    end
    if (rst_n && err) errs++;
    e = cell_clk ? 0 : next_e;
  end

  task automatic cells(input int n, input int gap);
    repeat (n) begin
      repeat (gap - 1) @(posedge clk);
      cell_clk <= 1'b1;
      @(posedge clk);
      cell_clk <= 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    check(!locked, "not locked before CELL_CLK");
    cells(2, 16);
    for (int t = 0; t < 16; t++) begin
      tap <= cell_phase_t'(t);
      cells(3, 16);
    end
    tap <= 4'd5;
    check(errs == 0, "no CELL_CLK error while regular");
    cells(1, 11);            // early pulse
    @(posedge clk);
    @(posedge clk);
    check(errs == 1, "early CELL_CLK flagged");
    cells(3, 16);
    @(negedge clk);
    check(locked, "locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
