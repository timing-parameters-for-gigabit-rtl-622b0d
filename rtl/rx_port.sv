// Cell input port of a receiving chip (chip C in the switch's timing figures).
//
// A deskewer takes the incoming signal group (control signal plus W data
// signals) at whatever phase it arrives, using the three phase clocks. The
// deskewed words then pass a delay line of LAG_MAX = 2 clocks. The input
// flip-flops capture one cell of CELL_WORDS words per cell period, starting at
// edge 3 + CC_TAP after the edge that sampled CELL_CLK, moved later by the
// deskewer's DSK_LAT-clock pipeline and the delay line. Which tap of the delay
// line holds word 0 (the word lag) is learned from idle cells, the only cells
// whose first word has the control signal high; real cells use the last lag
// learned. The deskewer absorbs where within a clock period a cell arrives,
// the lag absorbs in which of three clock periods, so the accepted arrival
// window is three clock periods wide. A cell whose first word has the control
// signal high is flagged rx_idle. Nothing is delivered until the deskewer has
// chosen a sample phase and an idle cell has set the lag.
//
// Grant: the grant output flip-flop loads accept_i at edge 4 + CC_TAP
// (strobe stb.gnt_out), once per cell, and holds it for the whole period.
//
// Timing: rx_valid is high for CELL_WORDS consecutive clocks per cell period;
// rx_sop marks word 0 and comes at edge 3 + CC_TAP + 5. Word 0's control edge
// must fall, after the sampling flip-flops, in one of the three receiver clock
// periods ending at edges 3, 2 and 1 + CC_TAP (lag 2, 1 and 0): with equal
// CC_TAP and clocks, 2*TPH to 3 periods + 2*TPH after the sender's edge 1.
// word_lag shows the lag in use and align_change pulses when an idle cell
// changes it.
// Edge numbers and the once-per-cell grant output are the switch's, as is a
// deskewed input that tolerates well over two clock periods of offset; the
// idle-cell encoding, learning the word position from idle cells and the
// pipeline latency are this design's choices.
`timescale 1ns / 1ps
module rx_port
  import gbs_timing_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [2:0]    ph_clk,   // ph_clk[0] is the chip clock
  input  logic          rst_n,
  input  cell_strobes_t stb,
  // pins
  input  logic          ctl_i,
  input  logic [W-1:0]  d_i,
  output logic          gnt_o,
  // from the chip core
  input  logic          accept_i,
  // received cells
  output logic          rx_valid,
  output logic          rx_sop,
  output logic          rx_idle,
  output logic [W-1:0]  rx_word,
  // deskewer status
  output logic [1:0]    phase_sel,
  output logic          phase_valid,
  output logic          phase_change,
  output logic          slip,
  // word alignment status
  output logic [1:0]    word_lag,
  output logic          align_change
);
  localparam int unsigned DSK_LAT = 3;
  localparam int unsigned IW = $clog2(CELL_WORDS + 1);

  logic clk;
  assign clk = ph_clk[0];

  logic         dsk_ctl;
  logic [W-1:0] dsk_data;

  deskewer #(.W(W)) u_dsk (
    .ph_clk       (ph_clk),
    .rst_n        (rst_n),
    .ctl_in       (ctl_i),
    .data_in      (d_i),
    .ctl_out      (dsk_ctl),
    .data_out     (dsk_data),
    .phase_sel    (phase_sel),
    .phase_valid  (phase_valid),
    .phase_change (phase_change),
    .slip         (slip)
  );

  // Word alignment. The deskewed stream passes a short delay line; a word
  // taken from tap a left the deskewer a clocks ago. At the capture strobe
  // (the data-input strobe delayed by DSK_LAT + LAG_MAX clocks) word 0 of the
  // cell is expected at tap lag = LAG_MAX - (lateness of its arrival in whole
  // clocks). An idle cell shows its word 0 by the raised control signal, so
  // at every idle cell the tap holding a raised control bit becomes the new
  // lag; real cells keep the last one. A word the deskewer repeats or skips
// at a slip is thereby corrected at the first idle cell after it.
  localparam int unsigned LAG_MAX = 2;

  typedef struct packed {
    logic         ctl;
    logic [W-1:0] data;
  } word_t;

  word_t tap_w [LAG_MAX+1];   // tap_w[a]: deskewer output a clocks ago
  word_t dly   [LAG_MAX];

  always_comb begin
    tap_w[0] = '{ctl: dsk_ctl, data: dsk_data};
    for (int a = 1; a <= LAG_MAX; a++) tap_w[a] = dly[a-1];
  end

  always_ff @(posedge clk) begin
    dly[0] <= tap_w[0];
    for (int a = 1; a < LAG_MAX; a++) dly[a] <= dly[a-1];
  end

  // capture strobe = data-input strobe delayed by the deskewer pipeline and
  // the delay line
  localparam int unsigned CAP_DLY = DSK_LAT + LAG_MAX;
  logic [CAP_DLY-1:0] cap_dly;
  logic               cap_start;
  assign cap_start = cap_dly[CAP_DLY-1];

  // Control bits seen at the capture strobe. Only word 0 of an idle cell has
  // the control signal raised, so any raised bit marks it. Two neighbouring
  // raised bits occur when the deskewer has just repeated that word (a slip
  // towards later arrival); the newer copy, the lowest tap, is the one that
  // lines up with the rest of the cell.
  logic [1:0] seen_at;
  logic       seen_one;
  always_comb begin
    seen_at  = '0;
    seen_one = 1'b0;
    for (int a = LAG_MAX; a >= 0; a--)
      if (tap_w[a].ctl) begin
        seen_at  = 2'(a);
        seen_one = 1'b1;
      end
  end

  logic       aligned;
  logic [1:0] lag, cap_lag;
  logic [1:0] lag_now;
  assign lag_now = seen_one ? seen_at : lag;

  logic          cap_act;
  logic [IW-1:0] cap_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_dly     <= '0;
      cap_act     <= 1'b0;
      cap_idx     <= '0;
      cap_lag     <= '0;
      lag         <= '0;
      aligned     <= 1'b0;
      align_change <= 1'b0;
      rx_valid    <= 1'b0;
      rx_sop      <= 1'b0;
      rx_idle     <= 1'b0;
      rx_word     <= '0;
      gnt_o       <= 1'b0;
    end else begin
      cap_dly <= {cap_dly[CAP_DLY-2:0], stb.data_in};
      if (stb.gnt_out) gnt_o <= accept_i;

      align_change <= 1'b0;
      if (cap_start && phase_valid && seen_one) begin
        lag          <= seen_at;
        aligned      <= 1'b1;
        align_change <= aligned && (seen_at != lag);
      end

      rx_sop <= cap_start && phase_valid && (aligned || seen_one);
      if (cap_start && phase_valid && (aligned || seen_one)) begin
        cap_act  <= 1'b1;
        cap_idx  <= IW'(1);
        cap_lag  <= lag_now;
        rx_valid <= 1'b1;
        rx_idle  <= tap_w[lag_now].ctl;
        rx_word  <= tap_w[lag_now].data;
      end else if (cap_act) begin
        rx_valid <= 1'b1;
        rx_word  <= tap_w[cap_lag].data;
        cap_idx  <= cap_idx + 1'b1;
        if (cap_idx == IW'(CELL_WORDS - 1)) cap_act <= 1'b0;
      end else begin
        rx_valid <= 1'b0;
      end
    end
  end

  assign word_lag = lag;
endmodule
