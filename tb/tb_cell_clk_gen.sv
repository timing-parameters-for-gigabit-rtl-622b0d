// Testbench for cell_clk_gen: the pulse must be one clock wide and recur
// exactly every CELL_CYCLES clocks, starting CELL_CYCLES clocks after reset.
`timescale 1ns / 1ps
module tb_cell_clk_gen;
  logic clk = 1'b0, rst_n = 1'b0, cell_clk;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, pulses = 0;

  cell_clk_gen dut (.clk(clk), .rst_n(rst_n), .cell_clk(cell_clk));

  always #4.1665 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cell_clk) begin
      pulses <= pulses + 1;
      if (last < 0) check(cyc == 15, "first pulse 16 clocks after reset");
      else          check(cyc - last == 16, "pulse period of 16 clocks");
      last <= cyc;
    end else if (last >= 0) begin
      check((cyc - last) % 16 != 0, "no missing pulse");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (16 * 20) @(posedge clk);
    @(negedge clk);
    check(pulses == 20, "20 pulses in 320 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
