# Cell timing and deskewing for a gigabit ATM switch chip set

A switch built from many chips, such as input port processors (IPP), switch elements (SE) and output port processors (OPP), moves 16-word cells from chip to chip. All chips run from one 120 MHz clock, and all of them start each cell on the same system-wide CELL_CLK pulse. Balancing the clock tree across a whole board so that every chip-to-chip link meets ordinary setup and hold times is expensive.

This RTL takes the other approach. Each chip may receive its clock at any fixed phase. A receiver samples each incoming signal group three times per clock period. It then picks the safe sample by looking at where the group's control signal changed. Only CELL_CLK and the once-per-cell grant signal go through ordinary flip-flops, and the grant has 16 clocks of slack.

The repository contains:
- the cell timer that every chip uses;
- the three-phase deskewer;
- the OPP-to-IPP link with its cell re-aligner;
- the IPP-to-SE link with its grant return path;
- a top level that joins an OPP, an IPP and an SE.

The switching functions of the chips themselves are not part of it.

## The cell schedule

In every chip, the rising clock edge that samples CELL_CLK high is edge 0 of a 16-clock cell period. All cell-level events happen at fixed edges after it:

| edge | event | where |
|---|---|---|
| 1 | first word of an outgoing cell loads into the output flip-flops | `tx_port`, `opp_ipp_tx` |
| 3 | first word of an incoming cell is due at the input flip-flops | `rx_port` (plus the deskewer pipeline) |
| 4 | the grant output flip-flop loads | `rx_port` |
| 8 | the grant input flip-flop loads | `tx_port` |

`cell_timer` turns these into one-cycle clock enables (`cell_strobes_t`). A strobe is high in the cycle that ends with its edge, so a flip-flop enabled by it loads exactly on that edge.

Each chip also has a 4-bit CC_TAP input. It moves all four events later by CC_TAP clocks, modulo 16. A board designer can use CC_TAP to shift a rank of chips by whole clock periods, for example to absorb pad-to-pad delays that are not a whole number of clocks.

`cell_timer` also reports whether it has seen a CELL_CLK (`locked`). It raises `cell_clk_err` when a pulse arrives at any count other than 15. All strobes stay low until the first pulse.

`cell_clk_gen` makes CELL_CLK: one clock period high, once every 16 clocks.

## The deskewer

This is the part that needs the most care. See `rtl/deskewer.sv`.

### Sampling

Three flip-flops sample the control line and the data lines of a group:
- phase 0 is the receiver clock;
- phases 1 and 2 are that clock delayed by TPH and 2·TPH.

TPH is at least 1.3 ns. Ideally it is a third of the period, about 2.7 ns. In silicon the phases come from gate delays; here `phase_gen` is a behavioural model made of transport delays.

The three samples are retimed into the receiver clock and kept for three clock periods. In each clock the logic therefore sees nine samples in time order, numbered 0 (oldest) to 8 (newest), plus the sample just before 0. Samples 0..2 belong to the oldest period, 3..5 to the middle one, 6..8 to the newest.

### Choosing the sample

The output is always one of those nine, sample `pos`, with `pos` between 2 and 8. After reset it is 5, the last sample of the middle period.

When the control line has a rising edge, the logic asks which of samples `pos`-2, `pos`-1 and `pos` was the first to see the new level. If that is sample e, the new choice is e+1. The rule is "one phase after the first sample that saw the new level". The data lines of a group may change up to about one phase spacing before or after the control line. The chosen sample is at least one spacing after the edge and at least one spacing before the next change. This is why the skew inside a group must stay below the minimum phase spacing.

The choice is kept until the next rising control edge. The control line need not toggle every cell. On the IPP-to-SE link it rises only in idle (synchronisation) cells, and in between the deskewer runs on its last choice.

Each new edge re-chooses the sample, so slow drift is followed:
- `phase_change` pulses when the choice moves;
- `phase_sel` gives the chosen sample clock: 1 and 2 for the delayed phases, 3 for phase 0 of the following period;
- `phase_valid` goes high with the first edge after reset. Edges are ignored for four clocks after reset, while the history fills.

Because the search only looks up to two samples back from the current choice, the choice moves by at most one sample per edge. As a result it can walk across a clock-period boundary. For example, going from 6 to 5 changes the sample clock from phase 0 to phase 2 of the period before, and no word is lost or repeated. The latency changes instead. At `pos` 4..6 the output appears 3 receiver clocks after the sampling period (`DSK_LAT` in `rx_port`), at 2..3 one clock later, and at 7..8 one clock earlier.

### Slips

The range 2..8 allows drift of about one clock period either way from where the first edge was found. At the default 2.7 ns spacing that is at least 5.4 ns each way. If drift goes further, the choice jumps by three samples (one whole period) back towards the middle, so one word is repeated or skipped, and the `slip` output pulses.

- **IPP-to-SE link.** Slips can happen only at an idle cell, because only idle cells raise the control line. `rx_port` re-learns its word position from that same idle cell. When a word is skipped, the last word of the cell before the idle cell can be wrong.
- **OPP-to-IPP link.** Cells carry their own start marker, so the re-aligner resynchronises at once. The cell that was in flight is cut: it is flagged by `short_cell` and lost.

Tracking also needs the drift between two rising control edges to stay below one phase spacing. This is the switch's own condition that idle cells come often enough for the drift budget, for example 0.1 ns per 1000 cells. If the arrival moves further than that between edges, the deskewer can read the move as one in the other direction. It then repeats or skips a word without pulsing `slip`. On the IPP-to-SE link, `rx_port` still re-learns the word position at that idle cell.

The switch's own description mentions "range limits" of the deskewer without giving them. The deskewer testbench drives the drift beyond the range in both directions. It checks that each slip repeats (arrival later) or skips (arrival earlier) exactly one word. The re-aligner testbench separately checks cells cut short by an early start-of-cell. On the IPP-to-SE link, `tb_rx_port` drives a slip and checks that whole cells follow it. On the OPP-to-IPP link, a slip is not simulated from deskewer to cell output.

### Arrival window and word alignment

The deskewer alone only decides *where within a clock period* a word arrives. `rx_port` adds *which* period.

The deskewed stream passes a two-stage delay line, and the cell is captured 2 clocks after the deskewer's nominal 3-clock latency would allow. Word 0 may therefore sit in any of the three taps. Real cells keep the control line low, so any raised control bit at the capture moment marks word 0 of an idle cell. The tap holding it becomes the word lag, which real cells then reuse. `word_lag` and `align_change` show this lag.

Measure the total delay from the sender's edge 1 to the receiver's own edge 1, including clock offset, output delay and board trace. With equal CC_TAP, this delay may lie anywhere from 2·TPH to three periods plus 2·TPH. With TPH = 2.7 ns, that is 5.4 ns to 30.4 ns, a window of 25 ns.

The switch's rule for these deskewers is "about 2.5 clock periods, about 21 ns", which this covers. The data setup and hold equations that go with them imply a narrower span of about 9.5 ns. The wider figure was followed.

The price is latency: cells appear 5 clocks after the edge 3 + CC_TAP. On the OPP-to-IPP link no word alignment is needed, because every cell carries SOC.

## The OPP-to-IPP link

The OPP drives SOC_OPP, D_OPP<31..0> and PARI_OPP (`opp_ipp_tx`):
- It sends a cell every cell period. SOC is high in word 0, so the IPP's deskewer sees a control edge on every cell.
- If the OPP core offers a cell, its words are read through `src_rd`, and bit 31 of word 0 is set as a "busy" marker. Otherwise an all-zero idle cell goes out.
- PARI_OPP makes parity even over the 33 lines.

At the IPP, the word stream may have any timing relative to the IPP's clock and cell clock. The IPP deskews it with a 33-bit deskewer (data plus parity), using SOC as the control line. `cell_realigner` then:
- writes each cell into one of three 16-word buffers, starting at the word with SOC high;
- keeps complete cells with the busy bit;
- throws away idle cells;
- hands out the oldest kept cell at the IPP's own edge-3 strobe, so the cell now follows the IPP's cell period.

It flags:
- `par_err` for every word with bad parity;
- `overflow` when a cell finds no free buffer;
- `short_cell` when a new SOC arrives before 16 words. The write then restarts in the same buffer.

## The IPP-to-SE link and the grant

`tx_port` (in the IPP) and `rx_port` (in the SE) form a link with flow control.

**The SE side (`rx_port`):**
- It loads its core's decision (`accept_i`) into the grant output flip-flop once per cell, at edge 4 + CC_TAP.
- It delivers one cell per period, with `rx_idle` marking idle cells. Delivery starts once its deskewer has locked and an idle cell has set the word lag.

**The IPP side (`tx_port`):**
- It samples the grant at edge 8 + CC_TAP.
- If the grant was high and a complete cell is buffered (up to two cells), the cell starts at the next edge 1 + CC_TAP. Otherwise an idle cell is sent.
- An idle cell has the control line high in word 0 only, and all-zero data. Real cells keep the control line low.
- After reset the grant register is low, so the link starts with idle cells, which lock the SE's deskewer.
- Status pulses: `sent_real`, `sent_idle`, `stall` (a cell is waiting without a grant) and `drop` (a cell arrived at a full buffer).

The grant leaves the SE at edge 4 and is needed at the IPP at edge 8. That gives four clocks, about 33 ns, for clock offset, pad delay and trace. The grant changes only once per cell, so hold time is never at risk.

## The top level

`gbs_timing_top` instantiates the following:

| Chip | Modules |
|---|---|
| shared | `cell_clk_gen`, which feeds every chip's `cell_timer` |
| OPP | `cell_timer`, `opp_ipp_tx` |
| IPP | `cell_timer`, `phase_gen`, `deskewer` (33 bits), `cell_realigner`, `tx_port` |
| SE | `cell_timer`, `phase_gen`, `rx_port` |

Each chip has its own clock port (`clk_opp`, `clk_ipp`, `clk_se`, plus `clk_sys` for the cell clock generator). These may have any fixed offset from a common source.

The wires between chips are ports, so the board model lies outside. Connect them as follows:
- `opp_soc_o`/`opp_d_o`/`opp_par_o` to `ipp_opp_*_i`;
- `ipp_ctl_o`/`ipp_d_o` to `se_ctl_i`/`se_d_i`;
- `se_gnt_o` to `ipp_gnt_i`.

The chip cores sit on `opp_src_*` (cells into the OPP), `se_rx_*` (cells out of the SE) and `se_accept_i` (the SE's grant decision). Status outputs report lock, phase changes, slips, parity errors, overflows, stalls, drops and CELL_CLK errors.

Outside this RTL are:
- clock generation and distribution;
- the pad drivers;
- the open-drain reset/error pins;
- the IPP's external link input, which has its own wider-range deskewer.

## What follows the switch design and what is this design's own

**Taken from the switch's timing rules:**
- 16 clocks per cell, and CELL_CLK as the cell marker;
- the edge numbers 1, 3, 4 and 8;
- CC_TAP modulo 16;
- three samples per clock period, with TPH between 1.3 ns and about 2.7 ns;
- choosing the sample by the rising edge of the control line, and keeping the choice between edges;
- a control edge on every OPP-to-IPP cell, with that link accepting any timing;
- idle cells as the synchronisation source on the other links;
- a grant sampled once per cell;
- the OPP output signal names.

**CC_TAP direction.** The written description says CC_TAP should be *decreased* to compensate for extra delay. The setup, hold and grant equations instead imply that a larger CC_TAP makes that chip's cell events later. The RTL follows the equations: every event moves later by CC_TAP.

**Choices made here:**
- the deskewer's three-period sample history and its 3-clock nominal latency;
- "one phase after the edge" as the selection rule, with the new choice at most one sample from the old;
- the tracking range and the slip flag;
- learning the word position from idle cells, with its three-period window and 5-clock latency;
- the idle-cell encoding;
- bit 31 of word 0 as the busy marker on the OPP link;
- even parity;
- the meaning of the grant (one cell in the next period);
- buffer sizes (two cells in `tx_port`, three in `cell_realigner`);
- the lock and CELL_CLK-error logic;
- reset values.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` at the end and stops itself after a fixed time. The testbenches use delays, so they need Verilator's timing support. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
    rtl/gbs_timing_pkg.sv tb/tb_gbs_timing_top.sv --top-module tb_gbs_timing_top
./obj_dir/Vtb_gbs_timing_top
```

| testbench | what it checks |
|---|---|
| `tb_cell_clk_gen` | pulse period and width |
| `tb_cell_timer` | all four strobes for all 16 CC_TAP values; lock; an early CELL_CLK |
| `tb_phase_gen` | phase delays at 2.7 ns and 1.3 ns spacing |
| `tb_deskewer` | chosen phase and recovered word stream at several delays with ±1 ns line-to-line skew; a slow drift over a whole clock period later and back, with every word delivered once and no slip; drifts far beyond the range both ways, where each flagged slip must repeat or skip exactly one word |
| `tb_cell_realigner` | cell order, idle cells discarded, overflow, parity errors and cells cut short by an early start-of-cell, against a reference model |
| `tb_tx_port` | grant handling, idle cells, stall and drop against a reference queue |
| `tb_rx_port` | cell capture and learned word lag at CC_TAP 0 and 5, with delays from 6 to 29.5 ns across all three periods of the window; a drift across a period boundary without re-alignment; a drift far beyond the range, after which the word position is re-learned and whole cells follow without a reset; grant output |
| `tb_opp_ipp_tx` | SOC, busy bit, parity, idle cells |
| `tb_gbs_timing_top` | the end-to-end run at default parameters |

The end-to-end run uses different clock offsets per chip and non-zero CC_TAP. It models board traces of 17 ns (OPP to IPP), 21 ns (IPP to SE, in the second period of the window) and 6 ns (grant) with up to ±0.8 ns skew per line. Both trace delays drift slowly during the run, the IPP-to-SE one far enough to move the SE's chosen sample across a clock-period boundary. One parity bit is corrupted. The run checks that:
- every OPP cell either reaches the SE whole and in order or is counted as dropped;
- the SE delivers a cell every 16 clocks;
- there is no slip, no cut cell and no SE word re-alignment.

It counts each mechanism and fails if one never happened: lock, phase change on both links, the SE phase crossing a period boundary, idle and real cells, stalls, drops and the parity error. It runs in well under a second.

The same run also passes with the clock period raised to 9.7 ns (worst-case commercial timing), and with the grant trace raised to 21.2 ns. Change `T` or `d_gnt` in the testbench to repeat this. At 9.7 ns, the "phase crosses a period boundary" count can stay at zero, because the drift in the run is sized for 8.333 ns.

To change the phase spacing, set `TPH_NS` on the top or on `phase_gen`. It must stay below half a clock period.
