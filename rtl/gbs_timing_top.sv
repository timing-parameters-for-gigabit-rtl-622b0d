// Three chips of the gigabit switch joined at cell level, with their
// cell-timing logic: an OPP sending to an IPP, and the IPP sending to an SE
// which grants it permission to send.
//
//   cell_clk_gen --CELL_CLK--> cell_timer of every chip (each with its CC_TAP)
//   OPP  opp_ipp_tx  --SOC_OPP, D_OPP, PARI_OPP-->  IPP deskewer -> cell_realigner
//   IPP  tx_port     --control, data-->             SE  rx_port (deskewer inside)
//   SE   rx_port grant flip-flop  --grant-->        IPP tx_port grant flip-flop
//
// Every chip has its own clock input; all must come from one source but may
// have any fixed phase offset. The deskewed links tolerate that offset, the
// CELL_CLK and grant connections need only the relaxed timing described in
// the port modules. The inter-chip wires are brought out as ports so that the
// printed-circuit paths (with their delays) lie outside: connect opp_* outputs
// to ipp_opp_* inputs, ipp_ctl_o/ipp_d_o to se_ctl_i/se_d_i and se_gnt_o to
// ipp_gnt_i. The three-phase sample clocks come from behavioural delay models
// (phase_gen). The switching functions of the chips themselves are outside
// this design: the OPP takes cells from opp_src_*, the SE delivers received
// cells on se_rx_* and takes its grant decision from se_accept_i.
`timescale 1ns / 1ps
module gbs_timing_top
  import gbs_timing_pkg::*;
#(
  parameter real TPH_NS = 2.7
) (
  input  logic        clk_sys,      // clock of the cell clock generator
  input  logic        clk_opp,
  input  logic        clk_ipp,
  input  logic        clk_se,
  input  logic        rst_n,
  input  cell_phase_t cc_tap_opp,
  input  cell_phase_t cc_tap_ipp,
  input  cell_phase_t cc_tap_se,
  // OPP core side
  input  logic        opp_src_valid,
  input  logic [31:0] opp_src_word,
  output logic        opp_src_rd,
  // OPP -> IPP pins
  output logic        opp_soc_o,
  output logic [31:0] opp_d_o,
  output logic        opp_par_o,
  input  logic        ipp_opp_soc_i,
  input  logic [31:0] ipp_opp_d_i,
  input  logic        ipp_opp_par_i,
  // IPP -> SE pins and grant back
  output logic        ipp_ctl_o,
  output logic [31:0] ipp_d_o,
  input  logic        ipp_gnt_i,
  input  logic        se_ctl_i,
  input  logic [31:0] se_d_i,
  output logic        se_gnt_o,
  // SE core side
  input  logic        se_accept_i,
  output logic        se_rx_valid,
  output logic        se_rx_sop,
  output logic        se_rx_idle,
  output logic [31:0] se_rx_word,
  // status
  output logic        cell_clk_o,
  output logic [2:0]  cell_clk_err,   // {se, ipp, opp}
  output logic        ipp_phase_valid,
  output logic        ipp_phase_change,
  output logic        ipp_slip,
  output logic        ipp_short_cell,
  output logic        ipp_par_err,
  output logic        ipp_overflow,
  output logic        ipp_tx_stall,
  output logic        ipp_tx_drop,
  output logic        ipp_tx_real,
  output logic        ipp_tx_idle,
  output logic        se_phase_valid,
  output logic        se_phase_change,
  output logic        se_slip,
  output logic [1:0]  se_phase_sel,
  output logic [1:0]  se_word_lag,
  output logic        se_align_change,
  output logic        opp_tx_real,
  output logic        opp_tx_idle
);
  logic cell_clk;
  assign cell_clk_o = cell_clk;

  cell_clk_gen u_ccg (.clk(clk_sys), .rst_n(rst_n), .cell_clk(cell_clk));

  // ---------------------------------------------------------------- OPP
  cell_strobes_t opp_stb;
  cell_phase_t   opp_phase;
  logic          opp_locked;

  cell_timer u_opp_tmr (
    .clk(clk_opp), .rst_n(rst_n), .cell_clk(cell_clk), .cc_tap(cc_tap_opp),
    .phase(opp_phase), .locked(opp_locked), .cell_clk_err(cell_clk_err[0]),
    .stb(opp_stb)
  );

  opp_ipp_tx u_opp_tx (
    .clk(clk_opp), .rst_n(rst_n), .stb(opp_stb),
    .src_valid(opp_src_valid), .src_word(opp_src_word), .src_rd(opp_src_rd),
    .soc_o(opp_soc_o), .d_o(opp_d_o), .par_o(opp_par_o),
    .sent_real(opp_tx_real), .sent_idle(opp_tx_idle)
  );

  // ---------------------------------------------------------------- IPP
  cell_strobes_t ipp_stb;
  cell_phase_t   ipp_phase;
  logic          ipp_locked;
  logic [2:0]    ipp_ph;

  cell_timer u_ipp_tmr (
    .clk(clk_ipp), .rst_n(rst_n), .cell_clk(cell_clk), .cc_tap(cc_tap_ipp),
    .phase(ipp_phase), .locked(ipp_locked), .cell_clk_err(cell_clk_err[1]),
    .stb(ipp_stb)
  );

  phase_gen #(.TPH_NS(TPH_NS)) u_ipp_phg (.clk(clk_ipp), .ph_clk(ipp_ph));

  logic        opp_dsk_soc, opp_dsk_par;
  logic [31:0] opp_dsk_d;
  logic [1:0]  ipp_phase_sel;

  deskewer #(.W(33)) u_ipp_dsk (
    .ph_clk(ipp_ph), .rst_n(rst_n),
    .ctl_in(ipp_opp_soc_i), .data_in({ipp_opp_par_i, ipp_opp_d_i}),
    .ctl_out(opp_dsk_soc), .data_out({opp_dsk_par, opp_dsk_d}),
    .phase_sel(ipp_phase_sel), .phase_valid(ipp_phase_valid),
    .phase_change(ipp_phase_change), .slip(ipp_slip)
  );

  logic        aln_valid, aln_sop;
  logic [31:0] aln_word;

  cell_realigner #(.W(32)) u_ipp_aln (
    .clk(clk_ipp), .rst_n(rst_n),
    .in_en(ipp_phase_valid), .in_soc(opp_dsk_soc), .in_word(opp_dsk_d), .in_par(opp_dsk_par),
    .rd_start(ipp_stb.data_in),
    .out_valid(aln_valid), .out_sop(aln_sop), .out_word(aln_word),
    .par_err(ipp_par_err), .overflow(ipp_overflow), .short_cell(ipp_short_cell)
  );

  logic ipp_gnt_q;

  tx_port #(.W(32)) u_ipp_tx (
    .clk(clk_ipp), .rst_n(rst_n), .stb(ipp_stb),
    .in_valid(aln_valid), .in_sop(aln_sop), .in_word(aln_word),
    .gnt_i(ipp_gnt_i), .ctl_o(ipp_ctl_o), .d_o(ipp_d_o),
    .gnt_q(ipp_gnt_q), .sent_real(ipp_tx_real), .sent_idle(ipp_tx_idle),
    .stall(ipp_tx_stall), .drop(ipp_tx_drop)
  );

  // ---------------------------------------------------------------- SE
  cell_strobes_t se_stb;
  cell_phase_t   se_phase;
  logic          se_locked;
  logic [2:0]    se_ph;

  cell_timer u_se_tmr (
    .clk(clk_se), .rst_n(rst_n), .cell_clk(cell_clk), .cc_tap(cc_tap_se),
    .phase(se_phase), .locked(se_locked), .cell_clk_err(cell_clk_err[2]),
    .stb(se_stb)
  );

  phase_gen #(.TPH_NS(TPH_NS)) u_se_phg (.clk(clk_se), .ph_clk(se_ph));

  rx_port #(.W(32)) u_se_rx (
    .ph_clk(se_ph), .rst_n(rst_n), .stb(se_stb),
    .ctl_i(se_ctl_i), .d_i(se_d_i), .gnt_o(se_gnt_o), .accept_i(se_accept_i),
    .rx_valid(se_rx_valid), .rx_sop(se_rx_sop), .rx_idle(se_rx_idle), .rx_word(se_rx_word),
    .phase_sel(se_phase_sel), .phase_valid(se_phase_valid),
    .phase_change(se_phase_change), .slip(se_slip),
    .word_lag(se_word_lag), .align_change(se_align_change)
  );
endmodule
