// Per-chip cell timer.
//
// Samples CELL_CLK on every rising clock edge (it is the one input that must
// meet setup and hold at every edge) and counts clock edges from the edge that
// saw it high. From that count it derives the clock enables of the chip's
// cell-synchronous flip-flops: data output (edge 1), data input (edge 3),
// grant output (edge 4) and grant input (edge 8), each moved later by CC_TAP
// edges, modulo 16. Grant and initialisation inputs are therefore sampled on
// only one edge in sixteen.
//
// Timing: a strobe is high during the cycle that ends with its edge, so a
// flip-flop using it as enable loads exactly at that edge. The counter
// free-runs between CELL_CLK pulses; `locked` rises with the first pulse and
// gates all strobes, and `cell_clk_err` flags a pulse that arrives at any
// count other than 15.
// The edge numbers and the modulo-16 CC_TAP come from the switch timing rules;
// the direction of CC_TAP (larger value = later) follows the switch's
// setup/hold equations. Locking and the error flag are this design's choice.
`timescale 1ns / 1ps
module cell_timer
  import gbs_timing_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cell_clk,
  input  cell_phase_t   cc_tap,
  output cell_phase_t   phase,         // edges since the edge that sampled CELL_CLK, minus 1
  output logic          locked,
  output logic          cell_clk_err,  // one-cycle pulse
  output cell_strobes_t stb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= '0;
      locked       <= 1'b0;
      cell_clk_err <= 1'b0;
    end else begin
      cell_clk_err <= cell_clk && locked && (phase != cell_phase_t'(CELL_WORDS - 1));
      if (cell_clk) begin
        phase  <= '0;
        locked <= 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  // Enable for the flip-flop clocked at edge E is high while phase == E-1.
  function automatic logic at_edge(input int unsigned e, input cell_phase_t p,
                                   input cell_phase_t tap);
    return p == cell_phase_t'(e - 1) + tap;
  endfunction

  always_comb begin
    stb.data_out = locked && at_edge(EDGE_DATA_OUT, phase, cc_tap);
    stb.data_in  = locked && at_edge(EDGE_DATA_IN, phase, cc_tap);
    stb.gnt_out  = locked && at_edge(EDGE_GNT_OUT, phase, cc_tap);
    stb.gnt_in   = locked && at_edge(EDGE_GNT_IN, phase, cc_tap);
  end
endmodule
