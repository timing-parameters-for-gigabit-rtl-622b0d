// Testbench for cell_realigner.
//
// Cells of 16 words, each starting with the start-of-cell bit set, arrive at
// random offsets (random gaps between cells); about one in four is idle (busy
// bit clear). rd_start comes every 16 clocks at a fixed phase. A reference
// model, independent of the RTL, keeps the busy cells in arrival order with
// the clock edge at which each became complete, and the number of cell
// buffers in use, and predicts
//  * which cell each rd_start reads (the oldest one complete before it),
//  * the 16 output words one to sixteen clocks after rd_start,
//  * which arriving cells are dropped for want of a buffer (overflow), which
//    is provoked by withholding rd_start for a while,
//  * one parity-error pulse for each word sent with a wrong parity bit,
//  * one short_cell pulse for each cell cut off by the next start-of-cell
//    while it was being written; the cut cell is never delivered.
`timescale 1ns / 1ps
module tb_cell_realigner;
  localparam int CW = 16;
  localparam int NB = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_en = 1'b0, in_soc = 1'b0, in_par = 1'b0, rd_start = 1'b0;
  logic [31:0] in_word = '0;
  logic out_valid, out_sop, par_err, overflow, short_cell;
  logic [31:0] out_word;

  cell_realigner dut (.clk(clk), .rst_n(rst_n), .in_en(in_en), .in_soc(in_soc),
                      .in_word(in_word), .in_par(in_par), .rd_start(rd_start),
                      .out_valid(out_valid), .out_sop(out_sop), .out_word(out_word),
                      .par_err(par_err), .overflow(overflow), .short_cell(short_cell));

  always #4.1665 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  function automatic logic [31:0] word_of(int cid, int w, bit busy);
    logic [31:0] v;
    v = 32'(cid * 1000003 + w * 7919 + 17);
    if (w == 0) v[31] = busy;
    return v;
  endfunction

  // ---------------- reference model ----------------
  typedef struct { int id; int done_edge; } ref_cell_t;
  ref_cell_t rq[$];
  int  edge_no = 0;
  int  read_edge = -100;     // edge at which the last read started
  int  cur_id = -1, cur_w = CW - 1; bit cur_busy = 0, cur_drop = 0;
  int  exp_short = 0, got_short = 0;
  int  exp_id = -1, exp_w = 16;
  int  exp_overflow = 0, got_overflow = 0, exp_par = 0, got_par = 0;
  int  reads = 0, drops = 0;

  function automatic int queued_at(int e);
    int n = 0;
    foreach (rq[i]) if (rq[i].done_edge < e) n++;
    return n;
  endfunction

  // stimulus written by the driver, sampled by the model at the same edge
  bit  d_soc, d_bad_par, d_rd;
  int  d_cell, d_w; bit d_busy;

  always @(posedge clk) if (rst_n) begin
    edge_no++;
    // outputs registered at the previous edge
    if (exp_w < CW) begin
      check(out_valid, "out_valid during a read");
      check(out_sop == (exp_w == 0), "out_sop on word 0 only");
      check(out_word == word_of(exp_id, exp_w, 1'b1), $sformatf("cell %0d word %0d", exp_id, exp_w));
      exp_w++;
    end else begin
      check(!out_valid, "no output without a read");
    end
    if (overflow) got_overflow++;
    if (par_err) got_par++;
    if (short_cell) got_short++;
    // inputs sampled at this edge
    if (in_en && d_soc) begin
      int used; bit cut;
      used = queued_at(edge_no) + ((edge_no > read_edge && edge_no <= read_edge + 15) ? 1 : 0);
      // a cell still being written is cut; the new one reuses its buffer
      cut = (cur_id >= 0) && (cur_w < CW - 1) && !cur_drop;
      if (cut) exp_short++;
      cur_id = d_cell; cur_w = 0; cur_busy = d_busy;
      cur_drop = !cut && (used >= NB);
      if (cur_drop) begin
        exp_overflow++;
        drops++;
      end
    end
    if (in_en && d_w >= 0 && cur_id == d_cell) begin
      cur_w = d_w;
      if (d_bad_par && !cur_drop) exp_par++;
      if (d_w == CW - 1 && cur_busy && !cur_drop) rq.push_back('{d_cell, edge_no});
    end
    if (d_rd && rq.size() > 0 && rq[0].done_edge < edge_no) begin
      exp_id = rq[0].id;
      exp_w = 0;
      read_edge = edge_no;
      rq.pop_front();
      reads++;
    end
  end

  // ---------------- driver ----------------
  int rd_hold_from = 1 << 30, rd_hold_to = 0;
  int cyc = 0;
  // All stimulus changes on the falling edge, so that the model and the
  // block sample the same values at the rising edge.
  always @(negedge clk) begin
    cyc = cyc + 1;
    d_rd = (cyc % CW == 5) && !(cyc >= rd_hold_from && cyc < rd_hold_to);
    rd_start = d_rd;
  end

  task automatic send_cell(input int id, input bit busy, input int bad_word);
    send_part(id, busy, bad_word, CW);
  endtask

  // the first n words of a cell only
  task automatic send_part(input int id, input bit busy, input int bad_word, input int n);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      d_soc = (w == 0); d_cell = id; d_w = w; d_busy = busy;
      d_bad_par = (w == bad_word);
      in_en   = 1'b1;
      in_soc  = (w == 0);
      in_word = word_of(id, w, busy);
      in_par  = (^word_of(id, w, busy)) ^ (w == bad_word);
    end
  endtask

  task automatic gap(input int n);
    repeat (n) begin
      @(negedge clk);
      d_soc = 0; d_w = -1; d_bad_par = 0;
      in_soc  = 1'b0;
      in_word = 32'hdead_beef;
      in_par  = 1'b0;
    end
  endtask

  initial begin
    d_soc = 0; d_w = -1; d_cell = -2; d_busy = 0; d_bad_par = 0; d_rd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    gap(7);
    for (int c = 0; c < 60; c++) begin
      if (c == 30) begin
        rd_hold_from = cyc + 4;
        rd_hold_to   = cyc + 4 + 6 * CW;
      end
      send_cell(c, ($urandom_range(0, 3) != 0) || c >= 30, (c % 17 == 3) ? 5 : -1);
      gap($urandom_range(0, 6));
    end
    // cells cut short by the next start-of-cell (as after a deskewer slip)
    for (int c = 60; c < 72; c++) begin
      if (c % 2 == 0) send_part(c, 1'b1, -1, $urandom_range(2, CW - 1));
      else begin
        send_cell(c, 1'b1, -1);
        gap($urandom_range(0, 2 * CW));
      end
    end
    gap(5 * CW);
    check(got_short == exp_short && exp_short > 0, $sformatf("short cells %0d want %0d", got_short, exp_short));
    check(reads > 20, "cells were read out");
    check(drops > 0, "overflow provoked");
    check(got_overflow == exp_overflow, $sformatf("overflow pulses %0d want %0d", got_overflow, exp_overflow));
    check(got_par == exp_par && exp_par > 0, $sformatf("parity errors %0d want %0d", got_par, exp_par));
    check(rq.size() == 0, "all cells delivered");
    $display("reads %0d drops %0d parity errors %0d short cells %0d", reads, drops, got_par, got_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
