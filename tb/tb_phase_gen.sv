// Testbench for the phase_gen model: every rising and falling edge of the two
// delayed phases must follow the clock edge by TPH_NS and 2*TPH_NS, for the
// ideal spacing and for the 1.3 ns minimum.
`timescale 1ns / 1ps
module tb_phase_gen;
  logic clk = 1'b0;
  logic [2:0] ph_a, ph_b;
  int checks = 0, failures = 0;
  realtime t_clk_r = 0.0, t_clk_f = 0.0;

  phase_gen #(.TPH_NS(2.7)) dut_a (.clk(clk), .ph_clk(ph_a));
  phase_gen #(.TPH_NS(1.3)) dut_b (.clk(clk), .ph_clk(ph_b));

  always #4.1665 clk = ~clk;
  always @(posedge clk) t_clk_r = $realtime;
  always @(negedge clk) t_clk_f = $realtime;

  task automatic check_dly(input realtime t_ref, input real want, input string what);
    real got;
    got = $realtime - t_ref;
    if (got < 0.0) got = got + 8.333;
    checks++;
    if (got < want - 0.01 || got > want + 0.01) begin
      failures++;
      $display("FAIL %s: delay %f want %f", what, got, want);
    end
  endtask

  always @(posedge ph_a[1]) if ($realtime > 20.0) check_dly(t_clk_r, 2.7, "a ph1 rise");
  always @(posedge ph_a[2]) if ($realtime > 20.0) check_dly(t_clk_r, 5.4, "a ph2 rise");
  always @(negedge ph_a[2]) if ($realtime > 20.0) check_dly(t_clk_f, 5.4, "a ph2 fall");
  always @(posedge ph_b[1]) if ($realtime > 20.0) check_dly(t_clk_r, 1.3, "b ph1 rise");
  always @(posedge ph_b[2]) if ($realtime > 20.0) check_dly(t_clk_r, 2.6, "b ph2 rise");
  always @(posedge clk) if ($realtime > 20.0) begin
    checks++;
    if (ph_a[0] !== 1'b1) failures++;
  end

  // every phase must toggle once per clock edge: about 120 edges in 500 ns
  int n_edges[6];
  always @(ph_a[0]) n_edges[0]++;
  always @(ph_a[1]) n_edges[1]++;
  always @(ph_a[2]) n_edges[2]++;
  always @(ph_b[0]) n_edges[3]++;
  always @(ph_b[1]) n_edges[4]++;
  always @(ph_b[2]) n_edges[5]++;

  initial begin
    #500;
    foreach (n_edges[i]) begin
      checks++;
      if (n_edges[i] < 115 || n_edges[i] > 122) begin
        failures++;
        $display("FAIL phase %0d toggled %0d times", i, n_edges[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
