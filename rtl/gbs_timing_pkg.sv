// Shared constants and types for the gigabit-switch chip timing RTL.
//
// Every chip of the switch works on a 16-clock cell period that starts at the
// clock edge which samples CELL_CLK high (edge 0). Within that period a chip
// launches the first word of an outgoing cell at edge 1, captures the first
// word of an incoming cell at edge 3, launches its grant at edge 4 and samples
// a received grant at edge 8. These edge numbers, the 16-word cell and the
// three sampling phases per clock are the switch's own figures; the 4-bit width
// of CC_TAP follows from its "mod 16" arithmetic. Each edge moves later by the
// chip's CC_TAP value.
`timescale 1ns / 1ps
package gbs_timing_pkg;

  localparam int unsigned CELL_WORDS = 16;  // clock periods (and words) per cell
  localparam int unsigned TAP_W      = 4;   // CC_TAP counts modulo 16
  localparam int unsigned N_PHASES   = 3;   // deskewer samples per clock period

  // Clock edges, counted from the edge that samples CELL_CLK high, at which
  // the flip-flops of each group are clocked (with CC_TAP = 0).
  localparam int unsigned EDGE_DATA_OUT = 1;
  localparam int unsigned EDGE_DATA_IN  = 3;
  localparam int unsigned EDGE_GNT_OUT  = 4;
  localparam int unsigned EDGE_GNT_IN   = 8;

  typedef logic [TAP_W-1:0] cell_phase_t;

  // Clock enables produced by the cell timer. Each is high for the one cycle
  // that ends with the edge at which its flip-flops load.
  typedef struct packed {
    logic data_out;  // first word of the outgoing cell loads at the next edge
    logic data_in;   // first word of the incoming cell is captured at the next edge
    logic gnt_out;   // grant output flip-flop loads at the next edge
    logic gnt_in;    // grant / initialisation inputs are sampled at the next edge
  } cell_strobes_t;

endpackage
