// Cell re-aligner for the OPP-to-IPP link.
//
// On this link the first word of a cell may arrive at any time relative to
// the receiving chip's clock and cell clock. The deskewed word stream is
// written into one of BANKS cell buffers, starting a new cell on every word
// whose start-of-cell bit (the group's control signal) is set. A complete
// cell whose first word carries the busy bit (bit BUSY_BIT) is queued; an idle
// cell is discarded once complete (it has done its job of re-synchronising the
// deskewer). At each rd_start strobe from the local cell timer the oldest
// queued cell is read out as CELL_WORDS consecutive words, so the output is
// aligned to the local cell period.
//
// Interface/timing: in_* is one word per clock, valid while in_en is high.
// out_valid/out_sop/out_word are registered: word 0 appears right after the
// edge that ends the rd_start cycle. par_err pulses for every written word
// whose even parity (data and parity bit together) fails; overflow pulses when
// an arriving cell finds no free buffer and is dropped; short_cell pulses when a
// new start-of-cell cuts a cell short (the write restarts in the same buffer
// and the cut cell is lost). That happens only when the deskewer in front
// slips by a word, i.e. when drift exceeds its tracking range of about one
// clock period either way.
// That the IPP accepts the OPP's cells at any timing, and the SOC/data/parity
// signal set, are the switch's; buffering, the busy bit, even parity and the
// bank count are this design's choices.
`timescale 1ns / 1ps
module cell_realigner #(
  parameter int unsigned W          = 32,
  parameter int unsigned CELL_WORDS = 16,
  parameter int unsigned BANKS      = 3,
  parameter int unsigned BUSY_BIT   = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_en,
  input  logic         in_soc,
  input  logic [W-1:0] in_word,
  input  logic         in_par,
  input  logic         rd_start,
  output logic         out_valid,
  output logic         out_sop,
  output logic [W-1:0] out_word,
  output logic         par_err,
  output logic         overflow,
  output logic         short_cell
);
  localparam int unsigned IW = $clog2(CELL_WORDS + 1);
  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned CW = $clog2(BANKS + 1);

  logic [W-1:0] mem [BANKS * CELL_WORDS];

  // ---------------- write side ----------------
  logic          wr_act;
  logic [BW-1:0] wr_bank;
  logic [IW-1:0] wr_idx;
  logic          wr_busy;

  // ---------------- queue of complete cells (bank numbers, oldest first) ----
  logic [BW-1:0] q_bank [BANKS];
  logic [CW-1:0] q_cnt;

  // ---------------- read side ----------------
  logic          rd_act;
  logic [BW-1:0] rd_bank;
  logic [IW-1:0] rd_idx;

  // A bank is free if it is not being written, not queued and not being read.
  logic [BANKS-1:0] bank_used;
  always_comb begin
    bank_used = '0;
    if (wr_act) bank_used[wr_bank] = 1'b1;
    if (rd_act) bank_used[rd_bank] = 1'b1;
    for (int i = 0; i < BANKS; i++)
      if (CW'(i) < q_cnt) bank_used[q_bank[i]] = 1'b1;
  end

  logic          free_ok;
  logic [BW-1:0] free_bank;
  always_comb begin
    free_ok   = 1'b0;
    free_bank = '0;
    for (int i = BANKS - 1; i >= 0; i--)
      if (!bank_used[i]) begin
        free_ok   = 1'b1;
        free_bank = BW'(i);
      end
  end

  // A start of cell while a cell is still being written restarts the write in
  // the same bank (the unfinished cell is abandoned and flagged short_cell).
  logic          start_ok;
  logic [BW-1:0] start_bank;
  assign start_ok   = wr_act || free_ok;
  assign start_bank = wr_act ? wr_bank : free_bank;

  logic start_cell, wr_word, wr_last, push, pop;
  assign start_cell = in_en && in_soc;
  assign wr_word    = in_en && (start_cell ? start_ok : wr_act);
  assign wr_last    = wr_act && !start_cell && in_en && (wr_idx == IW'(CELL_WORDS - 1));
  assign push       = wr_last && wr_busy;
  assign pop        = rd_start && (q_cnt != '0);

  logic [BW-1:0] wr_bank_eff;
  logic [IW-1:0] wr_idx_eff;
  assign wr_bank_eff = start_cell ? start_bank : wr_bank;
  assign wr_idx_eff  = start_cell ? '0 : wr_idx;

  always_ff @(posedge clk) begin
    if (wr_word) mem[int'(wr_bank_eff) * CELL_WORDS + int'(wr_idx_eff)] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act   <= 1'b0;
      wr_bank  <= '0;
      wr_idx   <= '0;
      wr_busy  <= 1'b0;
      par_err  <= 1'b0;
      overflow <= 1'b0;
      short_cell    <= 1'b0;
    end else begin
      par_err  <= in_en && (wr_act || start_cell) && ((^in_word) ^ in_par);
      overflow <= start_cell && !start_ok;
      short_cell    <= start_cell && wr_act;
      if (start_cell) begin
        wr_act  <= start_ok;
        wr_bank <= start_bank;
        wr_idx  <= IW'(1);
        wr_busy <= in_word[BUSY_BIT];
      end else if (wr_act && in_en) begin
        wr_idx <= wr_idx + 1'b1;
        if (wr_last) wr_act <= 1'b0;
      end
    end
  end

  // Queue: pop from the head, push at the tail.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
      for (int i = 0; i < BANKS; i++) q_bank[i] <= '0;
    end else begin
      if (pop) begin
        for (int i = 0; i < BANKS - 1; i++) q_bank[i] <= q_bank[i+1];
      end
      if (push) q_bank[pop ? q_cnt - 1'b1 : q_cnt] <= wr_bank;
      q_cnt <= q_cnt + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act    <= 1'b0;
      rd_bank   <= '0;
      rd_idx    <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_word  <= '0;
    end else begin
      out_sop <= pop;
      if (pop) begin
        rd_act    <= 1'b1;
        rd_bank   <= q_bank[0];
        rd_idx    <= IW'(1);
        out_valid <= 1'b1;
        out_word  <= mem[int'(q_bank[0]) * CELL_WORDS];
      end else if (rd_act) begin
        out_valid <= 1'b1;
        out_word  <= mem[int'(rd_bank) * CELL_WORDS + int'(rd_idx)];
        rd_idx    <= rd_idx + 1'b1;
        if (rd_idx == IW'(CELL_WORDS - 1)) rd_act <= 1'b0;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
