// End-to-end testbench for gbs_timing_top, at its default parameters.
//
// The four clocks share the 8.333 ns period at fixed offsets, as if fed from
// one oscillator through clock drivers and board traces of different length.
// The testbench plays the printed-circuit board: the OPP-to-IPP, IPP-to-SE
// (long enough to need the second clock period of the SE's arrival window)
// and grant wires are connected through transport delays, with a few
// hundred picoseconds of skew between the lines of a group. The OPP core
// model offers a fresh cell in most cell periods; the SE core model accepts
// (grants) at random. The testbench checks that
//  * every real cell the SE delivers is an OPP cell, whole and in order,
//    and every OPP cell is either delivered or counted as dropped, even while
//    the drift carries both links across clock-period boundaries,
//  * the SE delivers one cell every 16 clocks, idle cells included,
//  * no CELL_CLK error is flagged,
// and counts how often each mechanism happened: deskewer lock at IPP and SE,
// deskewer phase change following a slow drift of the trace delays, idle
// (synchronisation) cells, grant refused (stall), full buffer (drop), parity
// error on a corrupted PARI_OPP line, and non-zero CC_TAP offsets.
`timescale 1ns / 1ps
module tb_gbs_timing_top;
  import gbs_timing_pkg::*;
  localparam real T  = 8.333;
  localparam int  CW = 16;

  logic clk_sys = 1'b0, clk_opp = 1'b0, clk_ipp = 1'b0, clk_se = 1'b0, rst_n = 1'b0;
  cell_phase_t cc_tap_opp = 4'd5, cc_tap_ipp = 4'd2, cc_tap_se = 4'd2;

  logic        opp_src_valid = 1'b0, opp_src_rd;
  logic [31:0] opp_src_word;
  logic        opp_soc_o, opp_par_o;
  logic [31:0] opp_d_o;
  logic        ipp_opp_soc_i = 1'b0, ipp_opp_par_i = 1'b0;
  logic [31:0] ipp_opp_d_i = '0;
  logic        ipp_ctl_o, ipp_gnt_i = 1'b0, se_ctl_i = 1'b0, se_gnt_o;
  logic [31:0] ipp_d_o, se_d_i = '0;
  logic        se_accept_i = 1'b0;
  logic        se_rx_valid, se_rx_sop, se_rx_idle;
  logic [31:0] se_rx_word;
  logic        cell_clk_o;
  logic [2:0]  cell_clk_err;
  logic        ipp_phase_valid, ipp_phase_change, ipp_slip, ipp_short_cell, ipp_par_err;
  logic        ipp_overflow, ipp_tx_stall, ipp_tx_drop, ipp_tx_real, ipp_tx_idle;
  logic        se_phase_valid, se_phase_change, se_slip;
  logic [1:0]  se_phase_sel, se_word_lag;
  logic        se_align_change;
  logic        opp_tx_real, opp_tx_idle;

  gbs_timing_top dut (.*);

  // ---------------- clocks: one source, fixed offsets ----------------
  initial forever begin #(T / 2.0) clk_sys = ~clk_sys; end
  initial begin #0.9; forever begin #(T / 2.0) clk_opp = ~clk_opp; end end
  initial begin #0.4; forever begin #(T / 2.0) clk_ipp = ~clk_ipp; end end
  initial begin #1.6; forever begin #(T / 2.0) clk_se  = ~clk_se;  end end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  // ---------------- board: transport delays with per-line skew -------------
  real d_opp_ipp = 17.3;   // any value is allowed on this link
  real d_ipp_se  = 21.0;   // IPP launch to SE arrival: second period of the rx_port window
  real d_gnt     = 6.0;
  real sk_opp[33], sk_se[32];
  bit  corrupt_par = 0;

  always @(opp_soc_o) begin
    automatic logic v = opp_soc_o;
    automatic real d = d_opp_ipp;
    fork begin #(d); ipp_opp_soc_i = v; end join_none
  end
  always @(opp_d_o or opp_par_o) begin
    automatic logic [32:0] v = {opp_par_o ^ corrupt_par, opp_d_o};
    automatic real d = d_opp_ipp;
    for (int b = 0; b < 33; b++) begin
      automatic int bb = b;
      automatic logic vb = v[b];
      fork begin
        #(d + sk_opp[bb]);
        if (bb == 32) ipp_opp_par_i = vb; else ipp_opp_d_i[bb] = vb;
      end join_none
    end
  end
  always @(ipp_ctl_o) begin
    automatic logic v = ipp_ctl_o;
    automatic real d = d_ipp_se;
    fork begin #(d); se_ctl_i = v; end join_none
  end
  always @(ipp_d_o) begin
    automatic logic [31:0] v = ipp_d_o;
    automatic real d = d_ipp_se;
    for (int b = 0; b < 32; b++) begin
      automatic int bb = b;
      automatic logic vb = v[b];
      fork begin #(d + sk_se[bb]); se_d_i[bb] = vb; end join_none
    end
  end
  always @(se_gnt_o) begin
    automatic logic v = se_gnt_o;
    fork begin #(d_gnt); ipp_gnt_i = v; end join_none
  end

  // ---------------- OPP core model ----------------
  function automatic logic [31:0] word_of(int cid, int w);
    logic [31:0] v;
    v = 32'(cid * 1234567 + w * 8191 + 3);
    if (w == 0) v[31] = 1'b1;   // the OPP sets the busy bit in word 0
    return v;
  endfunction
  int src_cell = 0, src_idx = 0, n_offered = 0;
  assign opp_src_word = word_of(src_cell, src_idx);
  always @(posedge clk_opp) if (rst_n && opp_src_rd) begin
    src_idx = src_idx + 1;
    if (src_idx == CW) begin
      src_idx = 0;
      src_cell = src_cell + 1;
    end
  end
  always @(negedge clk_opp) if (rst_n && src_idx == 0) opp_src_valid = ($urandom_range(0, 7) != 0);
  always @(posedge clk_opp) if (rst_n && opp_tx_real) n_offered++;

  // SE core model: accept in most cell periods
  always @(negedge clk_se) if ($urandom_range(0, 31) == 0) se_accept_i = ($urandom_range(0, 3) != 0);

  // ---------------- SE scoreboard ----------------
  int last_id = -1, cur_id = -1, rx_w = CW, n_real_rx = 0, n_idle_rx = 0;
  int last_sop = -1, se_cyc = 0;
  bit cur_real = 0;
  int n_drop = 0, n_stall = 0, n_ipp_idle = 0, n_ipp_real = 0, n_par = 0, n_ovf = 0;
  int n_se_change = 0, n_ipp_change = 0, n_slip = 0, n_ccerr = 0;
  int n_ipp_slip = 0, n_short = 0, n_realign = 0, n_wrap = 0;
  logic [1:0] prev_sel = 2'd0;

  always @(posedge clk_se) if (rst_n) begin
    se_cyc++;
    if (se_phase_change) n_se_change++;
    if (se_slip) n_slip++;
    if (se_align_change) n_realign++;
    if ((prev_sel == 2'd3 && se_phase_sel == 2'd1) || (prev_sel == 2'd1 && se_phase_sel == 2'd3)) n_wrap++;
    prev_sel = se_phase_sel;
    if (se_rx_sop) begin
      if (last_sop >= 0) check(se_cyc - last_sop == CW, "one cell per 16 clocks at the SE");
      last_sop = se_cyc;
      rx_w = 0;
      cur_real = !se_rx_idle;
      if (cur_real) begin
        // identify the cell from word 0
        cur_id = -1;
        for (int k = last_id + 1; k <= last_id + 64; k++)
          if (word_of(k, 0) == se_rx_word) begin cur_id = k; break; end
        check(cur_id > last_id, "real cell is a later OPP cell");
        if (cur_id > last_id) last_id = cur_id;
        n_real_rx++;
      end else begin
        n_idle_rx++;
        check(se_rx_word == '0, "idle cell carries no data");
      end
    end
    if (rx_w < CW) begin
      check(se_rx_valid, "SE word valid");
      if (cur_real && cur_id >= 0)
        check(se_rx_word == word_of(cur_id, rx_w), $sformatf("cell %0d word %0d", cur_id, rx_w));
      rx_w++;
    end
  end

  always @(posedge clk_ipp) if (rst_n) begin
    if (ipp_tx_drop) n_drop++;
    if (ipp_tx_stall) n_stall++;
    if (ipp_tx_idle) n_ipp_idle++;
    if (ipp_tx_real) n_ipp_real++;
    if (ipp_par_err) n_par++;
    if (ipp_overflow) n_ovf++;
    if (ipp_phase_change) n_ipp_change++;
    if (ipp_slip) begin n_slip++; n_ipp_slip++; end
    if (ipp_short_cell) n_short++;
  end
  always @(posedge clk_sys) if (rst_n && cell_clk_err != 0) n_ccerr++;

  task automatic mechanism(input string name, input int count);
    $display("mechanism %-34s %0d", name, count);
    check(count > 0, {"mechanism happened: ", name});
  endtask

  initial begin
    foreach (sk_opp[i]) sk_opp[i] = (real'($urandom_range(0, 1600)) - 800.0) / 1000.0;
    foreach (sk_se[i])  sk_se[i]  = (real'($urandom_range(0, 1600)) - 800.0) / 1000.0;
    repeat (3) @(posedge clk_sys);
    rst_n = 1'b1;
    repeat (120 * CW) @(posedge clk_sys);
    // one corrupted parity bit on the OPP-to-IPP board trace: word 1 of a
    // real cell (word 1 loads at the edge where sent_real is seen high)
    @(posedge clk_opp iff opp_tx_real);
    corrupt_par = 1'b1;
    #1.0;
    corrupt_par = 1'b0;
    // slow drift of both data paths (temperature), inside the accepted windows
    for (int i = 0; i < 60; i++) begin
      d_ipp_se  = d_ipp_se + 0.05;
      d_opp_ipp = d_opp_ipp + 0.1;
      repeat (2 * CW) @(posedge clk_sys);
    end
    repeat (120 * CW) @(posedge clk_sys);
    opp_src_valid = 1'b0;
    force opp_src_valid = 1'b0;
    force se_accept_i = 1'b1;     // drain: let every buffered cell through
    repeat (12 * CW) @(posedge clk_sys);

    check(n_ccerr == 0, "no CELL_CLK error");
    check(ipp_phase_valid && se_phase_valid, "both deskewers locked");
    check(n_short == 0, "no cell cut short");
    check(n_offered == n_real_rx + n_drop, $sformatf("offered %0d = delivered %0d + dropped %0d",
                                                    n_offered, n_real_rx, n_drop));
    check(n_par == 1, "exactly one parity error");
    mechanism("deskewer lock (IPP and SE)", int'(ipp_phase_valid && se_phase_valid));
    mechanism("SE deskewer phase change (drift)", n_se_change);
    mechanism("IPP deskewer phase change (drift)", n_ipp_change);
    mechanism("idle synchronisation cells", n_ipp_idle);
    mechanism("real cells delivered", n_real_rx);
    mechanism("grant refused (stall)", n_stall);
    mechanism("buffer full (drop)", n_drop);
    mechanism("parity error detected", n_par);
    mechanism("SE phase follows drift across a clock period", n_wrap);
    check(n_slip == 0, "no deskewer slip");
    check(n_realign == 0, "SE word position never re-learned");
    mechanism("non-zero CC_TAP", int'(cc_tap_opp != 0 && cc_tap_ipp != 0 && cc_tap_se != 0));
    $display("slips %0d (IPP %0d), short cells %0d, realigner overflows %0d, SE idle cells %0d",
             n_slip, n_ipp_slip, n_short, n_ovf, n_idle_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
