// Testbench for tx_port.
//
// The cell-timer strobes come from a counter in the testbench (CC_TAP = 3):
// data_out in the cycle ending with edge 1+3, gnt_in in the one ending with
// edge 8+3. Cells arrive as word streams with random gaps, sometimes faster
// than they can leave; the grant input is random per cell period. A reference
// model (cell queue with the edges at which cells complete and leave, and the
// grant register) predicts, edge by edge, the control and data outputs:
// a granted waiting cell, or an idle cell (control high in word 0 only, data
// zero); and the drop and stall pulses.
`timescale 1ns / 1ps
module tb_tx_port;
  import gbs_timing_pkg::*;
  localparam int CW  = 16;
  localparam int TAP = 3;
  localparam int NF  = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  cell_strobes_t stb = '0;
  logic in_valid = 1'b0, in_sop = 1'b0, gnt_i = 1'b0;
  logic [31:0] in_word = '0;
  logic ctl_o, gnt_q, sent_real, sent_idle, stall, drop;
  logic [31:0] d_o;

  tx_port dut (.clk(clk), .rst_n(rst_n), .stb(stb), .in_valid(in_valid), .in_sop(in_sop),
               .in_word(in_word), .gnt_i(gnt_i), .ctl_o(ctl_o), .d_o(d_o), .gnt_q(gnt_q),
               .sent_real(sent_real), .sent_idle(sent_idle), .stall(stall), .drop(drop));

  always #4.1665 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  function automatic logic [31:0] word_of(int cid, int w);
    return 32'(cid * 2654435 + w * 40503 + 99);
  endfunction

  // ---------------- strobes and stimulus (change on falling edges) --------
  int cyc = 0;           // counts falling edges after reset
  always @(negedge clk) if (rst_n) begin
    cyc = cyc + 1;
    stb.data_out = (cyc % CW) == ((EDGE_DATA_OUT - 1 + TAP) % CW);
    stb.gnt_in   = (cyc % CW) == ((EDGE_GNT_IN - 1 + TAP) % CW);
    if (stb.gnt_in) gnt_i = ($urandom_range(0, 3) != 0);
  end

  // ---------------- reference model ----------------
  typedef struct { int id; int done_edge; int leave_edge; } rc_t;
  rc_t q[$];
  int e = 0;
  bit gq = 0;
  int cur = -1, cur_w = 0; bit cur_take = 0;
  int tx_id = -2, tx_w = 16;   // -1 = idle cell
  int n_real = 0, n_idle = 0, n_stall = 0, n_drop = 0;
  bit exp_drop = 0, exp_stall = 0, exp_real = 0, exp_idle = 0;
  int d_cell = -1, d_w = -1;

  function automatic int occ_at(int ee);
    int n = 0;
    foreach (q[i]) if (q[i].done_edge < ee && (q[i].leave_edge < 0 || q[i].leave_edge >= ee)) n++;
    return n;
  endfunction

  always @(posedge clk) if (rst_n) begin
    e++;
    // outputs loaded at the previous edge
    check(drop == exp_drop, "drop pulse");
    check(stall == exp_stall, "stall pulse");
    check(sent_real == exp_real && sent_idle == exp_idle, "sent pulses");
    if (tx_w < CW) begin
      if (tx_id < 0) begin
        check(ctl_o == (tx_w == 0) && d_o == '0, $sformatf("idle word %0d", tx_w));
      end else begin
        check(!ctl_o && d_o == word_of(tx_id, tx_w), $sformatf("cell %0d word %0d", tx_id, tx_w));
      end
      tx_w++;
    end else begin
      check(!ctl_o && d_o == '0, "quiet between cells");
    end
    exp_drop = 0; exp_stall = 0; exp_real = 0; exp_idle = 0;
    // inputs sampled at this edge
    if (in_valid && in_sop) begin
      int used;
      used = occ_at(e);
      cur = d_cell; cur_w = 0;
      cur_take = used < NF;
      if (!cur_take) begin exp_drop = 1; n_drop++; end
    end
    if (in_valid && cur_take && d_w == CW - 1 && d_cell == cur)
      q.push_back('{cur, e, -1});
    if (stb.data_out) begin
      int head;
      head = -1;
      foreach (q[i]) if (head < 0 && q[i].leave_edge < 0 && q[i].done_edge < e) head = i;
      exp_stall = !gq && (occ_at(e) > 0);
      if (exp_stall) n_stall++;
      if (gq && head >= 0) begin
        rc_t tmp;
        tmp = q[head];
        tmp.leave_edge = e + 15;
        q[head] = tmp;
        tx_id = tmp.id; exp_real = 1; n_real++;
      end else begin
        tx_id = -1; exp_idle = 1; n_idle++;
      end
      tx_w = 0;
    end
    if (stb.gnt_in) gq = gnt_i;
    // forget cells that have left
    while (q.size() > 0 && q[0].leave_edge >= 0 && q[0].leave_edge < e) void'(q.pop_front());
  end

  task automatic send_cell(input int id);
    for (int w = 0; w < CW; w++) begin
      @(negedge clk);
      d_cell = id; d_w = w;
      in_valid = 1'b1; in_sop = (w == 0); in_word = word_of(id, w);
    end
  endtask
  task automatic gap(input int n);
    repeat (n) begin
      @(negedge clk);
      d_w = -1;
      in_valid = 1'b0; in_sop = 1'b0; in_word = 32'h0bad_0bad;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gap(20);
    for (int c = 0; c < 80; c++) begin
      send_cell(c);
      gap((c % 20 < 10) ? $urandom_range(0, 3) : $urandom_range(8, 30));
    end
    gap(8 * CW);
    check(n_real > 20 && n_idle > 5, "real and idle cells sent");
    check(n_stall > 0, "a waiting cell stalled for want of a grant");
    check(n_drop > 0, "a cell dropped on a full buffer");
    $display("real %0d idle %0d stall %0d drop %0d", n_real, n_idle, n_stall, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
