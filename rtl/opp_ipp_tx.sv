// OPP output to the IPP: SOC_OPP, D_OPP<31..0> and PARI_OPP.
//
// Sends one cell of CELL_WORDS 32-bit words in every cell period, the first
// word loading at edge 1 + CC_TAP (strobe stb.data_out). The start-of-cell
// signal SOC_OPP is the group's control signal: it is high during the first
// word of every cell, so the receiving deskewer sees a rising control edge on
// every cell. If the core offers a cell (src_valid at the strobe) its words
// are taken one per clock through src_rd and bit 31 of the first word is set
// as the busy bit; otherwise an all-zero idle cell is sent. PARI_OPP is the
// even parity of D_OPP, so the 33 bits together always hold an even number
// of ones.
//
// Timing: src_word must be valid in the cycle src_rd is high (a read
// acknowledge, combinational from stb and the internal word counter); all
// three outputs are registered.
// The signal names and the control transition on every cell are the switch's;
// the busy bit, even parity and idle cell content are this design's choices.
`timescale 1ns / 1ps
module opp_ipp_tx
  import gbs_timing_pkg::*;
#(
  parameter int unsigned BUSY_BIT = 31
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_strobes_t stb,
  input  logic          src_valid,
  input  logic [31:0]   src_word,
  output logic          src_rd,
  output logic          soc_o,
  output logic [31:0]   d_o,
  output logic          par_o,
  output logic          sent_real,
  output logic          sent_idle
);
  localparam int unsigned IW = $clog2(CELL_WORDS + 1);

  logic          act, real_q;
  logic [IW-1:0] idx;
  logic          start_real;
  logic [31:0]   nxt;

  assign start_real = stb.data_out && src_valid;
  assign src_rd     = start_real || (act && real_q);

  always_comb begin
    nxt = '0;
    if (start_real) begin
      nxt           = src_word;
      nxt[BUSY_BIT] = 1'b1;
    end else if (act && real_q) begin
      nxt = src_word;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act       <= 1'b0;
      real_q    <= 1'b0;
      idx       <= '0;
      soc_o     <= 1'b0;
      d_o       <= '0;
      par_o     <= 1'b0;
      sent_real <= 1'b0;
      sent_idle <= 1'b0;
    end else begin
      sent_real <= start_real;
      sent_idle <= stb.data_out && !src_valid;
      soc_o     <= stb.data_out;
      d_o       <= nxt;
      par_o     <= ^nxt;
      if (stb.data_out) begin
        act    <= 1'b1;
        real_q <= src_valid;
        idx    <= IW'(1);
      end else if (act) begin
        idx <= idx + 1'b1;
        if (idx == IW'(CELL_WORDS - 1)) act <= 1'b0;
      end
    end
  end
endmodule
