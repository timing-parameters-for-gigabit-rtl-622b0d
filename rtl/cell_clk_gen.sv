// Cell clock generator.
//
// Produces the system CELL_CLK: a pulse one clock period wide, once every
// CELL_CYCLES periods of the system clock, that marks the start of every cell
// period in all chips. A free-running modulo-CELL_CYCLES counter drives a
// registered output, so the pulse changes right after a clock edge and meets
// the chips' CELL_CLK setup and hold times when clock skew is small.
// The 16-period cell is the switch's figure; the reset behaviour (first pulse
// CELL_CYCLES cycles after reset) is this design's choice.
`timescale 1ns / 1ps
module cell_clk_gen #(
  parameter int unsigned CELL_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic cell_clk
);
  localparam int unsigned CW = (CELL_CYCLES > 1) ? $clog2(CELL_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      cell_clk <= 1'b0;
    end else begin
      cnt      <= (cnt == CW'(CELL_CYCLES - 1)) ? '0 : cnt + 1'b1;
      cell_clk <= (cnt == CW'(CELL_CYCLES - 2));
    end
  end
endmodule
