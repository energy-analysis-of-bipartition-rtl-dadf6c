// Clock control of the bipartition stage: the two latches and two AND gates that
// turn the partition variable SEL into the gated clocks of the input registers R1
// and R2 and into the select of the output multiplexer.
//
// How it works: a gating latch, transparent while clk is low (it has an inverted
// enable), samples SEL during the low phase and holds it while clk is high. Its output enables exactly one AND gate:
// clk1 = clk & ~sel_gate pulses on a rising edge where SEL was 0, clk2 = clk &
// sel_gate where SEL was 1. Because the enable only changes while clk is low, the
// gated clocks are free of glitches. A second latch, transparent while clk is high,
// takes the gating latch's output and holds it through the following low phase, so
// mux_sel equals the SEL value sampled at the most recent rising edge of clk for
// the whole cycle in which the selected subcircuit evaluates. Together the two
// latches behave as a master-slave flip-flop on SEL.
//
// Interface: clk, sel in; clk1, clk2 (gated clocks for R1, R2) and mux_sel out.
// Timing: sel must be stable before the rising edge of clk (same setup as the data
// inputs of R1 and R2). mux_sel changes just after the rising edge.
//
// The two latches and the AND gates follow the architecture; which latch feeds the
// mux select, and the clock phase of the second latch, are this design's reading.
// The gating latch is intended (lint reports it as a latch): it is what keeps the
// gated clocks glitch free. The select latch is written as a rising-edge element.
// Its input, the gating latch's output, is constant for the whole time the latch
// would be open (clk high), so a rising-edge element produces the same waveform; in
// a zero-delay simulation it also removes the race between the select opening at
// the rising edge and R0 sampling the mux output at that same edge.
module bp_clock_ctrl (
  input  logic clk,
  input  logic sel,
  output logic clk1,
  output logic clk2,
  output logic mux_sel
);

  logic sel_gate;  // gating latch, open while clk is low

  always_latch begin
    if (!clk) sel_gate = sel;
  end

  // Select latch, open while clk is high (see above).
  always_ff @(posedge clk) begin
    mux_sel <= sel_gate;
  end

  assign clk1 = clk & ~sel_gate;
  assign clk2 = clk &  sel_gate;

endmodule
