// Testbench for rx_port (deskewer, cell capture and grant output).
//
// A transmitter model shares the receiver's cell timing (same CC_TAP) and
// launches word 0 of every cell at edge 1 + CC_TAP, the next words on the
// following edges; each line reaches the receiver after a common delay plus
// its own skew of up to +/-1.0 ns. The first cells are idle (control high in
// word 0), later cells are real or idle at random. For several delays across
// the accepted arrival window and two CC_TAP values the testbench checks that
//  * each cell is delivered whole, in order, with the right idle flag,
//  * rx_sop comes exactly at edge 3 + CC_TAP + 5 (the capture edge moved by
//    the deskewer's three-clock pipeline and the two-clock alignment delay
//    line), and nothing is delivered before the deskewer has locked,
//  * after reset, the word lag learned from idle cells matches the delay: 2
//    for arrivals in the first clock period of the window, 1 and 0 in the
//    next two,
//  * a slow drift across a clock-period boundary is followed by the
//    deskewer without a word repeated or lost and without re-alignment,
//  * after a drift far beyond the deskewer's range, which makes it slip, the
//    word position is re-learned and whole cells follow without a reset,
//  * the grant output changes only at edge 4 + CC_TAP, to accept_i.
`timescale 1ns / 1ps
module tb_rx_port;
  import gbs_timing_pkg::*;
  localparam real T  = 8.333;
  localparam int  CW = 16;

  logic rclk = 1'b0, rst_n = 1'b0;
  logic [2:0] ph;
  cell_strobes_t stb = '0;
  logic ctl_i = 1'b0, accept_i = 1'b0;
  logic [31:0] d_i = '0;
  logic gnt_o, rx_valid, rx_sop, rx_idle, phase_valid, phase_change, slip;
  logic [31:0] rx_word;
  logic [1:0] phase_sel, word_lag;
  logic align_change;

  phase_gen #(.TPH_NS(2.7)) u_phg (.clk(rclk), .ph_clk(ph));
  rx_port dut (.ph_clk(ph), .rst_n(rst_n), .stb(stb), .ctl_i(ctl_i), .d_i(d_i), .gnt_o(gnt_o),
               .accept_i(accept_i), .rx_valid(rx_valid), .rx_sop(rx_sop), .rx_idle(rx_idle),
               .rx_word(rx_word), .phase_sel(phase_sel), .phase_valid(phase_valid),
               .phase_change(phase_change), .slip(slip), .word_lag(word_lag),
               .align_change(align_change));

  always #(T / 2.0) rclk = ~rclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  function automatic logic [31:0] word_of(int cid, int w);
    return 32'(cid * 7777777 + w * 31 + 1);
  endfunction

  int  tap = 0;
  real delay = 8.0;
  real skew[32];
  int  ph_e = 15;          // cell phase of the last rising edge (0 = edge 0)

  // ---------------- transmitter ----------------
  typedef struct { int id; bit idle; } sent_t;
  sent_t sent[$];
  int  cell_no = 0, tx_w = CW, tx_id = 0;
  bit  tx_idle = 1;
  int  n_cells_tx = 0, force_idle = 0;

  task automatic launch(input logic c, input logic [31:0] v);
    real d;
    d = delay;
    fork
      begin #(d); ctl_i = c; end
    join_none
    for (int b = 0; b < 32; b++) begin
      automatic int bb = b;
      automatic logic vb = v[b];
      fork
        begin #(d + skew[bb]); d_i[bb] = vb; end
      join_none
    end
  endtask

  task automatic tx_step();
    ph_e = (ph_e + 1) % CW;
    if (ph_e == (EDGE_DATA_OUT + tap) % CW) begin
      tx_w = 0;
      tx_id = cell_no++;
      tx_idle = (n_cells_tx < 3) || (force_idle > 0) || ($urandom_range(0, 2) == 0);
      if (force_idle > 0) force_idle--;
      n_cells_tx++;
      sent.push_back('{tx_id, tx_idle});
    end
    if (tx_w < CW) begin
      launch(tx_idle && tx_w == 0, tx_idle ? 32'h0 : word_of(tx_id, tx_w));
      tx_w++;
    end
  endtask

  // ---------------- strobes (set before the edge they name) ----------------
  always @(negedge rclk) if (rst_n) begin
    int nxt;
    nxt = (ph_e + 1) % CW;
    stb.data_in = (nxt == (EDGE_DATA_IN + tap) % CW);
    stb.gnt_out = (nxt == (EDGE_GNT_OUT + tap) % CW);
    if ($urandom_range(0, 4) == 0) accept_i = ~accept_i;
  end

  // ---------------- receiver check ----------------
  bit gnt_model = 0;
  int rx_w = CW, rx_id = -1, n_rx = 0, n_rx_idle = 0;
  bit rx_is_idle = 0, checking = 0, arm = 0;
  int exp_lag = 2, n_realign = 0;
  always @(posedge rclk) if (align_change) n_realign++;
  int n_slip = 0;
  always @(posedge rclk) if (slip) n_slip++;
  bit lag_free = 0;   // word lag not predicted (after a slip)
  int n_wrap = 0;
  logic [1:0] prev_sel = 2'd0;
  always @(posedge rclk) begin
    if (prev_sel == 2'd3 && phase_sel == 2'd1) n_wrap++;
    prev_sel = phase_sel;
  end
  task automatic rx_check();
    // outputs loaded at the previous edge, whose cell phase is ph_e (not yet advanced)
    check(gnt_o == gnt_model, "grant output");
    if (rx_sop) begin
      if (arm) checking = 1;
      if (checking) check(ph_e == (EDGE_DATA_IN + tap + 5) % CW, "rx_sop at edge 3+CC_TAP+5");
      if (checking && !lag_free) check(int'(word_lag) == exp_lag, $sformatf("word lag %0d want %0d", word_lag, exp_lag));
      check(phase_valid, "delivery only after lock");
      rx_w = 0;
      if (checking) begin
        check(sent.size() > 0, "a cell was sent");
        if (sent.size() > 0) begin
          rx_id = sent[0].id;
          rx_is_idle = sent[0].idle;
          void'(sent.pop_front());
        end
        check(rx_idle == rx_is_idle, "idle flag");
        n_rx++;
        if (rx_is_idle) n_rx_idle++;
      end
    end
    if (checking && rx_w < CW) begin
      check(rx_valid, "rx_valid");
      if (!rx_is_idle) check(rx_word == word_of(rx_id, rx_w), $sformatf("cell %0d word %0d", rx_id, rx_w));
      rx_w++;
    end else if (rx_w >= CW) begin
      check(!rx_valid, "no rx_valid between cells");
    end
    // grant model: flip-flop loads accept_i at edge 4 + tap
    if (stb.gnt_out) gnt_model = accept_i;
  endtask

  // one process per edge, so that checking, the phase count and launching
  // happen in a fixed order
  always @(posedge rclk) if (rst_n) begin
    rx_check();
    tx_step();
  end

  task automatic run(input int t, input real d, input int cells);
    // change settings between cells, then resynchronise on the stream
    checking = 0;
    arm = 0;
    tap = t;
    delay = d;
    force_idle = 3;
    // each delay stands for another board: start from reset
    rst_n = 1'b0;
    gnt_model = 0;
    repeat (2) @(posedge rclk);
    rst_n = 1'b1;
    // word 0's control edge falls in receiver period 0, 1 or 2 of the window
    exp_lag = 2 - int'($floor((d - 2.0 * 2.7) / T));
    repeat (5 * CW) @(posedge rclk);
    // discard sent cells that will not be checked: align on the next rx_sop
    @(posedge rclk iff rx_sop);
    // the cell now being delivered was launched in this same cell period,
    // so it is the newest record: from the next rx_sop on, cells are checked
    #0.1;
    while (sent.size() > 0) void'(sent.pop_front());
    arm = 1;
    repeat (cells * CW) @(posedge rclk);
  endtask

  initial begin
    foreach (skew[i]) skew[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
    repeat (2) @(posedge rclk);
    rst_n = 1'b1;
    repeat (3) @(posedge rclk);
    check(!phase_valid, "not locked before the first idle cell");
    run(0, 8.0, 12);
    run(0, 6.5, 12);
    run(0, 12.8, 12);
    run(0, 15.0, 12);
    run(0, 21.0, 12);
    run(0, 24.0, 12);
    run(0, 29.5, 12);
    run(5, 10.0, 12);
    run(5, 18.0, 12);
    run(5, 27.0, 12);
    run(5, 6.0, 12);
    check(n_rx > 100 && n_rx_idle > 10, "cells and idle cells received");
    // slow drift across the period boundary at 13.7 ns: the deskewer follows
    // it, so cells keep coming whole and the word lag stays as learned
    run(0, 12.0, 6);
    begin
      int r0, w0;
      r0 = n_realign;
      w0 = n_wrap;
      repeat (150) begin
        delay = delay + 0.02;
        @(posedge rclk);
      end
      repeat (6 * CW) @(posedge rclk);
      check(n_realign == r0, "no re-alignment during drift");
      check(n_wrap > w0, "phase followed the drift across a clock period");
      check(int'(word_lag) == 2, "word lag kept during drift");
    end
    // drift far beyond the deskewer's range: it slips, the word position is
    // re-learned from an idle cell, and cells come whole again, with no reset
    run(0, 6.0, 4);
    begin
      int s0, r0, c0;
      s0 = n_slip;
      r0 = n_realign;
      checking = 0;
      arm = 0;
      lag_free = 1;
      // 0.04 ns per cell: slow enough that even a long run of real cells
      // leaves the drift between two idle cells well below one phase spacing
      repeat (1600) begin
        delay = delay + 0.01;
        repeat (4) @(posedge rclk);
      end
      repeat (5 * CW) @(posedge rclk);
      @(posedge rclk iff rx_sop);
      #0.1;
      while (sent.size() > 0) void'(sent.pop_front());
      c0 = n_rx;
      arm = 1;
      repeat (12 * CW) @(posedge rclk);
      check(n_slip > s0, "slip beyond the tracking range");
      check(n_realign > r0, "word position re-learned after the slip");
      check(n_rx - c0 >= 10, "cells delivered whole after the slip");
      checking = 0;
    end
    $display("cells %0d idle %0d", n_rx, n_rx_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
