// Testbench for opp_ipp_tx. Strobes come from a testbench counter
// (CC_TAP = 2); a source model offers a cell in random cell periods and hands
// out its words one per src_rd. Checked edge by edge: SOC high in word 0 of
// every cell period and only there; real cells carry the source's words with
// the busy bit set in word 0; idle cells are all zero; the parity bit always
// makes the 33 bits even; exactly 16 words are read per real cell.
`timescale 1ns / 1ps
module tb_opp_ipp_tx;
  import gbs_timing_pkg::*;
  localparam int CW  = 16;
  localparam int TAP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  cell_strobes_t stb = '0;
  logic src_valid = 1'b0, src_rd, soc_o, par_o, sent_real, sent_idle;
  logic [31:0] src_word, d_o;

  opp_ipp_tx dut (.clk(clk), .rst_n(rst_n), .stb(stb), .src_valid(src_valid),
                  .src_word(src_word), .src_rd(src_rd), .soc_o(soc_o), .d_o(d_o),
                  .par_o(par_o), .sent_real(sent_real), .sent_idle(sent_idle));

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
    return 32'(cid * 977 + w * 65537 + 5) | 32'h8000_0000;
  endfunction

  // source model
  int src_cell = 0, src_idx = 0;
  assign src_word = word_of(src_cell, src_idx) & ((src_idx == 0) ? 32'h7fff_ffff : 32'hffff_ffff);

  int cyc = 0;
  always @(negedge clk) if (rst_n) begin
    cyc = cyc + 1;
    stb.data_out = (cyc % CW) == ((EDGE_DATA_OUT - 1 + TAP) % CW);
    if (stb.data_out) src_valid = ($urandom_range(0, 2) != 0);
  end

  int exp_cell = -2, exp_w = CW, reads = 0, n_real = 0, n_idle = 0;
  always @(posedge clk) if (rst_n) begin
    logic [31:0] want;
    if (exp_w < CW) begin
      want = (exp_cell >= 0) ? word_of(exp_cell, exp_w) : 32'h0;
      check(soc_o == (exp_w == 0), "SOC in word 0 only");
      check(d_o == want, $sformatf("cell %0d word %0d", exp_cell, exp_w));
      check(par_o == ^d_o, "even parity");
      exp_w++;
    end else begin
      check(!soc_o, "no SOC outside a cell");
    end
    if (src_rd) begin
      reads++;
      src_idx = src_idx + 1;
      if (src_idx == CW) begin src_idx = 0; src_cell = src_cell + 1; end
    end
    if (stb.data_out) begin
      exp_w = 0;
      if (src_valid) begin exp_cell = src_cell; n_real++; end
      else begin exp_cell = -1; n_idle++; end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40 * CW) @(negedge clk);
    check(n_real > 5 && n_idle > 5, "real and idle cells");
    check(reads == 16 * n_real || reads == 16 * n_real - 16 + src_idx, "16 reads per real cell");
    $display("real %0d idle %0d reads %0d", n_real, n_idle, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
