// Three-phase sampling clock generator -- behavioural model.
//
// In the chips the deskewer's three sample clocks are made from the receiver's
// clock by chains of logic delays, so this part is analog timing, not logic,
// and is modelled here with transport delays. Phase 0 is the receiver clock
// itself; phases 1 and 2 follow it by TPH_NS and 2*TPH_NS. The real delays vary
// with process, voltage and temperature: 1.3 ns is the guaranteed minimum
// spacing and one third of the 8.33 ns clock (about 2.7 ns) the ideal one.
// The default is the ideal spacing; set TPH_NS to 1.3 to model the slowest
// case. Each phase is the previous one delayed by TPH_NS, as in a delay
// chain; TPH_NS must be shorter than half a clock period, and 2*TPH_NS
// therefore shorter than a period, so that the last sample can be retimed by
// the next clock edge.
`timescale 1ns / 1ps
module phase_gen #(
  parameter real TPH_NS = 2.7
) (
  input  logic       clk,
  output logic [2:0] ph_clk
);
  logic ph1, ph2;

  initial begin
    ph1 = 1'b0;
    ph2 = 1'b0;
  end

  always @(clk) ph1 <= #(TPH_NS) clk;
  always @(ph1) ph2 <= #(TPH_NS) ph1;

  assign ph_clk = {ph2, ph1, clk};
endmodule
