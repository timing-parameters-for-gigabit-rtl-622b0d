// Cell output port of a sending chip (chip B in the switch's timing figures).
//
// Holds up to FIFO_CELLS cells received as a word stream from the chip core
// and drives one signal group (a control signal and W data signals) from
// output flip-flops that all load on the same clock edges. The first word of
// every cell period loads at the edge after the one that sampled CELL_CLK
// (edge 1 + CC_TAP, strobe stb.data_out) and the remaining words on the next
// CELL_WORDS-1 edges.
//
// Grant: the grant input flip-flop loads gnt_i only at edge 8 + CC_TAP
// (strobe stb.gnt_in), once per cell, so it has relaxed setup and hold. A
// cell is sent in the next cell period only if the grant sampled in this one
// was high and a complete cell is waiting; otherwise an idle cell is sent.
// An idle cell is all-zero data with the control signal high in its first
// word only, giving the receiver's deskewer the rising control edge it needs
// to (re)choose its sample phase. Real cells keep the control signal low.
// After reset the grant register is low, so the link carries idle
// (synchronisation) cells before any data.
//
// Status pulses: sent_real / sent_idle at each cell start, stall when a cell
// waits for want of a grant, drop when an arriving cell finds the buffer full.
// Edge numbers, the once-per-cell grant sampling and idle cells as the
// synchronisation source are the switch's; the idle-cell encoding, the grant
// meaning and the buffer are this design's choices.
`timescale 1ns / 1ps
module tx_port
  import gbs_timing_pkg::*;
#(
  parameter int unsigned W          = 32,
  parameter int unsigned FIFO_CELLS = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cell_strobes_t stb,
  // cell word stream from the chip core
  input  logic          in_valid,
  input  logic          in_sop,
  input  logic [W-1:0]  in_word,
  // pins
  input  logic          gnt_i,
  output logic          ctl_o,
  output logic [W-1:0]  d_o,
  // status
  output logic          gnt_q,
  output logic          sent_real,
  output logic          sent_idle,
  output logic          stall,
  output logic          drop
);
  localparam int unsigned IW = $clog2(CELL_WORDS + 1);
  localparam int unsigned SW = (FIFO_CELLS > 1) ? $clog2(FIFO_CELLS) : 1;
  localparam int unsigned CW = $clog2(FIFO_CELLS + 1);

  logic [W-1:0] mem [FIFO_CELLS * CELL_WORDS];

  logic [CW-1:0] occ;      // complete cells held, including the one being sent
  logic [SW-1:0] wr_slot, rd_slot;
  logic          wr_act;
  logic [IW-1:0] wr_idx;
  logic          tx_act, tx_real;
  logic [IW-1:0] tx_idx;

  function automatic logic [SW-1:0] next_slot(input logic [SW-1:0] s);
    return (s == SW'(FIFO_CELLS - 1)) ? '0 : s + 1'b1;
  endfunction

  // ---------------- write side ----------------
  logic wr_start, wr_en, wr_done;
  assign wr_start = in_valid && in_sop && (occ != CW'(FIFO_CELLS));
  assign wr_en    = wr_start || (in_valid && wr_act);
  assign wr_done  = wr_act && in_valid && !in_sop && (wr_idx == IW'(CELL_WORDS - 1));

  logic [IW-1:0] wr_idx_eff;
  assign wr_idx_eff = wr_start ? '0 : wr_idx;

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_slot) * CELL_WORDS + int'(wr_idx_eff)] <= in_word;
  end

  // ---------------- send side ----------------
  logic start_real, tx_done;
  assign start_real = stb.data_out && gnt_q && (occ != '0);
  assign tx_done    = tx_act && tx_real && (tx_idx == IW'(CELL_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act    <= 1'b0;
      wr_idx    <= '0;
      wr_slot   <= '0;
      rd_slot   <= '0;
      occ       <= '0;
      tx_act    <= 1'b0;
      tx_real   <= 1'b0;
      tx_idx    <= '0;
      ctl_o     <= 1'b0;
      d_o       <= '0;
      gnt_q     <= 1'b0;
      sent_real <= 1'b0;
      sent_idle <= 1'b0;
      stall     <= 1'b0;
      drop      <= 1'b0;
    end else begin
      // grant input flip-flop, enabled once per cell
      if (stb.gnt_in) gnt_q <= gnt_i;

      // cell buffer write
      drop <= in_valid && in_sop && (occ == CW'(FIFO_CELLS));
      if (in_valid && in_sop) begin
        wr_act <= wr_start;
        wr_idx <= IW'(1);
      end else if (wr_act && in_valid) begin
        wr_idx <= wr_idx + 1'b1;
        if (wr_done) begin
          wr_act  <= 1'b0;
          wr_slot <= next_slot(wr_slot);
        end
      end
      occ <= occ + CW'(wr_done) - CW'(tx_done);

      // output flip-flops
      sent_real <= start_real;
      sent_idle <= stb.data_out && !start_real;
      stall     <= stb.data_out && !gnt_q && (occ != '0);
      if (stb.data_out) begin
        tx_act  <= 1'b1;
        tx_real <= start_real;
        tx_idx  <= IW'(1);
        ctl_o   <= !start_real;
        d_o     <= start_real ? mem[int'(rd_slot) * CELL_WORDS] : '0;
      end else if (tx_act) begin
        ctl_o  <= 1'b0;
        d_o    <= tx_real ? mem[int'(rd_slot) * CELL_WORDS + int'(tx_idx)] : '0;
        tx_idx <= tx_idx + 1'b1;
        if (tx_idx == IW'(CELL_WORDS - 1)) begin
          tx_act <= 1'b0;
          if (tx_real) rd_slot <= next_slot(rd_slot);
        end
      end else begin
        ctl_o <= 1'b0;
        d_o   <= '0;
      end
    end
  end
endmodule
