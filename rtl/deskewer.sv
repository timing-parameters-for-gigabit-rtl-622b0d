// Deskewer for one signal group (one control signal plus W data signals).
//
// The group is sampled three times per clock period by flip-flops on the three
// phase clocks ph_clk[2:0] (phase 0 is the receiver clock, phases 1 and 2 are
// delayed copies). The samples are retimed into the receiver clock domain and
// kept for three periods, so that at every clock the logic sees a history of
// ten samples X[-1..8] (X[0..2] the oldest period, X[6..8] the newest). The
// output word of each clock is the sample X[pos], where pos is a position in
// this history, 2..8.
//
// Choosing pos: a rising edge of the control signal, first seen at sample
// X[e] (X[e-1] still low), means the group changes just before that sample;
// the deskewer then takes X[e+1], one phase later. Because the data may change
// at most one phase spacing (1.3 ns minimum) before or after the control
// signal, that sample is always at least one spacing away from any data
// transition. Only edges at e = pos-2, pos-1 or pos are used; as the history
// moves by three samples per clock, every edge passes through exactly one of
// these three places once. So each edge moves pos by at most one sample, to
// the sample nearest the old choice: slow drift (temperature, supply) is
// followed sample by sample, across clock-period boundaries, without
// repeating or skipping a word. Only when drift would carry pos beyond 2..8
// (more than about one clock period from where it started) does pos jump by
// three, which repeats or skips one word; that is flagged as slip. Without a
// rising edge (the control signal need not toggle every period) pos is kept.
// Tracking assumes the arrival moves by less than one phase spacing between
// two rising edges; a larger move may be taken as one in the other direction,
// repeating or skipping a word without a slip flag.
// Before the first edge pos acts as 5, so the first lock picks pos 4..6, which
// leaves room to follow drift either way.
//
// Interface/timing: data_out/ctl_out are registered. At pos 4..6 a word leaves
// DSK_LAT = 3 receiver clocks after the sampling period in which its control
// edge was seen; pos 2..3 adds one clock, pos 7..8 takes one away, as drift
// requires. phase_sel (1..3) is the chosen phase within the period, i.e.
// (pos - 1) mod 3 + 1. phase_valid rises with the first control edge seen at
// least four clocks after reset; phase_change pulses whenever an edge moves
// pos, slip when pos had to jump.
// The three-samples-per-period scheme and the rule of choosing by the control
// signal's positive transition are the switch's; the sample history, the
// "one phase after the edge" and "nearest to the old choice" rules and the
// slip flag are this design's.
`timescale 1ns / 1ps
module deskewer #(
  parameter int unsigned W = 32
) (
  input  logic [2:0]   ph_clk,       // three sample clocks, ph_clk[0] = receiver clock
  input  logic         rst_n,
  input  logic         ctl_in,
  input  logic [W-1:0] data_in,
  output logic         ctl_out,
  output logic [W-1:0] data_out,
  output logic [1:0]   phase_sel,
  output logic         phase_valid,
  output logic         phase_change,
  output logic         slip
);
  typedef struct packed {
    logic         ctl;
    logic [W-1:0] data;
  } grp_t;

  localparam int unsigned POS_MIN  = 2;
  localparam int unsigned POS_MAX  = 8;
  localparam int unsigned POS_INIT = 5;

  logic clk;
  assign clk = ph_clk[0];

  grp_t s0, s1, s2;  // samples, each in its own phase-clock domain
  grp_t g0[3];       // retimed to clk: newest complete period
  grp_t g1[3];       // one period older
  grp_t g2[3];       // two periods older
  logic g3_ctl;      // control bit of the last sample before g2

  always_ff @(posedge ph_clk[0]) s0 <= '{ctl: ctl_in, data: data_in};
  always_ff @(posedge ph_clk[1]) s1 <= '{ctl: ctl_in, data: data_in};
  always_ff @(posedge ph_clk[2]) s2 <= '{ctl: ctl_in, data: data_in};

  always_ff @(posedge clk) begin
    g0     <= '{s0, s1, s2};
    g1     <= g0;
    g2     <= g1;
    g3_ctl <= g2[2].ctl;
  end

  // history X[0..8], oldest first; X[-1] is g3_ctl
  grp_t x[9];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      x[i]     = g2[i];
      x[3 + i] = g1[i];
      x[6 + i] = g0[i];
    end
  end

  function automatic logic ctl_at(input int i, input grp_t h[9], input logic c_m1);
    return (i < 0) ? c_m1 : h[i].ctl;
  endfunction

  // The sample pipeline is not reset; edges are ignored until it holds only
  // samples taken after reset was released.
  logic [2:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              fill <= '0;
    else if (fill != 3'd4)   fill <= fill + 3'd1;
  end

  logic [3:0] pos;         // chosen position, POS_MIN..POS_MAX
  logic [3:0] pos_ref;     // centre of the edge search
  assign pos_ref = phase_valid ? pos : 4'(POS_INIT);

  // Rising control edge first seen at e = pos_ref-2 .. pos_ref: new position.
  logic       found;
  logic [3:0] pos_new;     // e + 1, before range limiting
  always_comb begin
    found   = 1'b0;
    pos_new = pos_ref;
    if (fill == 3'd4)
      for (int d = 0; d < 3; d++) begin
        automatic int e = int'(pos_ref) - 2 + d;
        if (!ctl_at(e - 1, x, g3_ctl) && ctl_at(e, x, g3_ctl)) begin
          found   = 1'b1;
          pos_new = 4'(e + 1);
        end
      end
  end

  // keep the position inside the history; a jump of three is a slip
  logic [3:0] pos_lim;
  logic       jump;
  always_comb begin
    pos_lim = pos_new;
    jump    = 1'b0;
    if (pos_new < 4'(POS_MIN)) begin
      pos_lim = pos_new + 4'd3;
      jump    = 1'b1;
    end else if (pos_new > 4'(POS_MAX)) begin
      pos_lim = pos_new - 4'd3;
      jump    = 1'b1;
    end
  end

  logic [3:0] pos_eff;
  assign pos_eff = found ? pos_lim : pos;

  grp_t pick;
  always_comb begin
    pick = x[POS_INIT];
    for (int i = POS_MIN; i <= POS_MAX; i++)
      if (pos_eff == 4'(i)) pick = x[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos          <= 4'(POS_INIT);
      phase_valid  <= 1'b0;
      phase_change <= 1'b0;
      slip         <= 1'b0;
      ctl_out      <= 1'b0;
      data_out     <= '0;
    end else begin
      phase_change <= 1'b0;
      slip         <= 1'b0;
      if (found) begin
        pos          <= pos_lim;
        phase_valid  <= 1'b1;
        phase_change <= phase_valid && (pos_lim != pos);
        slip         <= phase_valid && jump;
      end
      ctl_out  <= pick.ctl;
      data_out <= pick.data;
    end
  end

  // phase within the clock period, 1..3
  always_comb begin
    unique case (pos)
      4'd2, 4'd5, 4'd8: phase_sel = 2'd2;
      4'd3, 4'd6:       phase_sel = 2'd3;
      default:          phase_sel = 2'd1;
    endcase
  end
endmodule
