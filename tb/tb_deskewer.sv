// Testbench for the deskewer.
//
// A transmitter clock of the same 8.333 ns period as the receiver clock, at an
// offset, launches a word every period. The control signal rises every
// SYNC_EVERY words; each data bit reaches the receiver with its own skew of up
// to +/-1.0 ns around the control signal. For a sweep of arrival times the
// testbench checks
//  * the chosen phase against the one worked out from the arrival time of the
//    control edge relative to the receiver's three sample times,
//  * that, once locked, the output reproduces the transmitted word stream
//    without gaps or repeats; right after a reset the latency is 3 clocks
//    after the sampling period (2..4 clocks after launch, depending on the
//    arrival time), and it may move by one clock either way while drifting,
//  * that a slow drift of the arrival time is followed (phase_change), also
//    over a whole clock period later and back again, with every
//    word delivered once and no slip,
//  * that drifting well beyond that range flags slip, and that each slip
//    repeats (arrival later) or skips (arrival earlier) exactly one word while
//    the stream otherwise stays in order.
`timescale 1ns / 1ps
module tb_deskewer;
  localparam real T     = 8.333;
  localparam real TPH   = 2.7;
  localparam int  W     = 16;
  localparam int  SYNC_EVERY = 4;

  logic rclk = 1'b0, rst_n = 1'b0;
  logic [2:0] ph;
  logic ctl_in = 1'b0;
  logic [W-1:0] data_in = '0;
  logic ctl_out, phase_valid, phase_change, slip;
  logic [W-1:0] data_out;
  logic [1:0] phase_sel;

  int checks = 0, failures = 0;
  int changes = 0, slips = 0;

  phase_gen #(.TPH_NS(TPH)) u_phg (.clk(rclk), .ph_clk(ph));
  deskewer #(.W(W)) dut (.ph_clk(ph), .rst_n(rst_n), .ctl_in(ctl_in), .data_in(data_in),
                         .ctl_out(ctl_out), .data_out(data_out), .phase_sel(phase_sel),
                         .phase_valid(phase_valid), .phase_change(phase_change), .slip(slip));

  always #(T / 2.0) rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  // ---------------- transmitter ----------------
  // Word n is launched at time n*T + delay; its value is a function of n so
  // that the receiver side can recompute it.
  real delay = 3.0;                 // arrival offset of the control signal
  real skew[W];
  int  n_tx = 0;

  function automatic logic [W-1:0] word_of(int n);
    return W'(n * 40503 + 12345);
  endfunction
  function automatic logic ctl_of(int n);
    return (n % SYNC_EVERY) == 0;
  endfunction

  initial begin
    foreach (skew[i]) skew[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
    forever begin
      @(posedge rclk);
      fork
        begin
          automatic int n = n_tx;
          automatic real d = delay;
          #(d);
          ctl_in = ctl_of(n);
        end
        begin
          automatic int n = n_tx;
          automatic real d = delay;
          for (int b = 0; b < W; b++) begin
            automatic int bb = b;
            fork
              begin
                #(d + skew[bb]);
                data_in[bb] = word_of(n)[bb];
              end
            join_none
          end
        end
      join_none
      n_tx++;
    end
  end

  // ---------------- expected phase ----------------
  function automatic int expected_sel(real d);
    real x;
    x = d;
    while (x >= T) x = x - T;
    if (x > 0.0 && x <= TPH) return 2;
    if (x > TPH && x <= 2.0 * TPH) return 3;
    return 1;
  endfunction

  // ---------------- receiver check ----------------
  // Find the transmitted index of the first output word after lock, then
  // require consecutive indices.
  int expect_n = -1;
  bit tracking = 0;
  always @(posedge rclk) begin
    if (phase_change) changes++;
    if (slip) slips++;
  end

  task automatic run_at(input real d, input int words);
    delay = d;
    tracking = 0;
    repeat (SYNC_EVERY * 3) @(posedge rclk);  // let the new phase settle
    #0.1;
    check(phase_valid, "phase valid");
    check(int'(phase_sel) == expected_sel(d), $sformatf("phase for delay %0.2f", d));
    // locate the latency: output word equals word_of(n) for a unique n
    begin
      int found = -1;
      for (int k = n_tx - 8; k <= n_tx; k++) if (word_of(k) == data_out) found = k;
      check(found >= 0, "output word is a transmitted word");
      expect_n = found;
    end
    repeat (words) begin
      @(posedge rclk);
      #0.1;
      expect_n++;
      check(data_out == word_of(expect_n), $sformatf("word %0d at delay %0.2f", expect_n, d));
      check(ctl_out == ctl_of(expect_n), "control bit");
      check(n_tx - expect_n >= 2 && n_tx - expect_n <= 4, "latency 2..4 clocks");
    end
  endtask

  task automatic drift_check(input real from, input real to, input real step);
    real d;
    d = from;
    while ((step > 0.0) ? (d < to) : (d > to)) begin
      d = d + step;
      delay = d;
      @(posedge rclk);
      #0.1;
      expect_n++;
      check(data_out == word_of(expect_n), $sformatf("drift: word %0d at delay %0.2f", expect_n, d));
      check(ctl_out == ctl_of(expect_n), "drift: control bit");
      check(n_tx - expect_n >= 1 && n_tx - expect_n <= 5, "drift: latency 1..5 clocks");
    end
  endtask

  // Drift beyond the tracking range: every output word must still be the next
  // transmitted word, except that each slip may repeat or skip exactly one.
  int n_rep = 0, n_skip = 0;
  task automatic drift_slip(input real from, input real to, input real step);
    real d;
    d = from;
    while ((step > 0.0) ? (d < to) : (d > to)) begin
      d = d + step;
      delay = d;
      @(posedge rclk);
      #0.1;
      expect_n++;
      if (data_out == word_of(expect_n - 1)) begin
        n_rep++;
        expect_n--;
      end else if (data_out == word_of(expect_n + 1)) begin
        n_skip++;
        expect_n++;
      end else begin
        check(data_out == word_of(expect_n), $sformatf("beyond range: word %0d at delay %0.2f", expect_n, d));
      end
      check(ctl_out == ctl_of(expect_n), "beyond range: control bit");
    end
  endtask

  initial begin
    repeat (3) @(posedge rclk);
    rst_n = 1'b1;
    // arrival times spread over one period, away from sample instants
    run_at(1.35, 40);
    run_at(4.05, 40);
    run_at(6.9, 40);
    run_at(9.7, 40);   // more than one period late
    run_at(12.3, 40);
    // slow drift across a phase boundary within one period
    begin
      int c0;
      c0 = changes;
      for (real d = 1.2; d < 4.5; d = d + 0.05) begin
        delay = d;
        repeat (2) @(posedge rclk);
      end
      repeat (SYNC_EVERY * 3) @(posedge rclk);
      check(changes > c0, "drift followed by a phase change");
      run_at(4.5, 40);
    end
    // slow drift over more than a clock period, both ways: every word must
    // come out once, in order, with no slip
    begin
      int s0;
      // start from reset so that the first lock leaves the full tracking
      // range (about one clock period) on either side
      rst_n = 1'b0;
      repeat (2) @(posedge rclk);
      rst_n = 1'b1;
      run_at(2.5, 8);
      s0 = slips;
      drift_check(2.5, 10.4, 0.02);
      drift_check(10.4, 1.0, -0.02);
      check(slips == s0, "no slip while drifting over a clock period");
    end
    // drift past the range: a slip must be flagged, each one costing exactly
    // one repeated (arrival later) word, and the stream stays in order
    begin
      int s0;
      rst_n = 1'b0;
      repeat (2) @(posedge rclk);
      rst_n = 1'b1;
      run_at(1.0, 8);
      s0 = slips;
      drift_slip(1.0, 24.0, 0.02);
      repeat (SYNC_EVERY * 3) @(posedge rclk);
      check(slips > s0, "slip flagged beyond the tracking range");
      check(n_rep == slips - s0 && n_skip == 0, $sformatf("one repeated word per slip (slips %0d, repeats %0d, skips %0d)", slips - s0, n_rep, n_skip));
    end
    // the same towards earlier arrival: each slip skips exactly one word
    begin
      int s0;
      rst_n = 1'b0;
      repeat (2) @(posedge rclk);
      rst_n = 1'b1;
      // lock at a late arrival; the latency from launch is then about three
      // clocks longer, so only the word position is located here
      delay = 24.0;
      repeat (SYNC_EVERY * 3) @(posedge rclk);
      #0.1;
      check(phase_valid, "phase valid at a late arrival");
      begin
        int found = -1;
        for (int k = n_tx - 12; k <= n_tx; k++) if (word_of(k) == data_out) found = k;
        check(found >= 0, "output word is a transmitted word (late arrival)");
        expect_n = found;
      end
      s0 = slips;
      n_rep = 0;
      drift_slip(24.0, 1.0, -0.02);
      repeat (SYNC_EVERY * 3) @(posedge rclk);
      check(slips > s0, "slip flagged beyond the tracking range (earlier)");
      check(n_skip == slips - s0 && n_rep == 0, $sformatf("one skipped word per slip (slips %0d, repeats %0d, skips %0d)", slips - s0, n_rep, n_skip));
    end
    $display("phase changes %0d, slips %0d", changes, slips);
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
