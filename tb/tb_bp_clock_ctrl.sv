// Test of the bipartition clock control (gating latch, AND gates, select latch).
//
// SEL is driven at random, sometimes changing in the low phase of the clock (its
// normal timing) and sometimes also toggling in the middle of the high phase. For
// every rising edge of clk exactly one gated clock must pulse: clk1 if SEL was 0 at
// the edge, clk2 if it was 1. Neither gated clock may rise or fall while clk is high
// (no glitch from a late SEL change) or be high while clk is low. mux_sel must hold
// the SEL sampled at the last rising edge for the whole following cycle.
`timescale 1ns/1ps
module tb_bp_clock_ctrl;

  logic clk = 1'b0;
  logic sel = 1'b0;
  logic clk1, clk2, mux_sel;

  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n_late = 0;
  logic exp_sel;

  bp_clock_ctrl dut (.clk(clk), .sel(sel), .clk1(clk1), .clk2(clk2), .mux_sel(mux_sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime last_clk_edge = -1.0;

  always @(posedge clk1) n1++;
  always @(posedge clk2) n2++;

  // A gated clock edge while clk is steady is a glitch.
  always @(clk1 or clk2) begin
    if ($time > 0 && clk === 1'b1 && $realtime != last_clk_edge) begin
      failures++;
      $display("%0t gated clock changed while clk high: clk1=%b clk2=%b", $time, clk1, clk2);
    end
  end

  initial begin
    logic late;
    // Settle the latches.
    sel = 1'b0;
    #3 last_clk_edge = $realtime;
      clk = 1'b1;
    #5 clk = 1'b0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // Low phase: new SEL value.
      #2 sel = 1'($urandom);
      #3;
      n1 = 0;
      n2 = 0;
      exp_sel = sel;
      last_clk_edge = $realtime;
      clk = 1'b1;
      #1;
      checks++;
      if (n1 != (exp_sel ? 0 : 1) || n2 != (exp_sel ? 1 : 0) || clk1 !== ~exp_sel || clk2 !== exp_sel) begin
        failures++;
        $display("%0t edge with sel=%b: clk1 pulses %0d clk2 pulses %0d", $time, exp_sel, n1, n2);
      end
      checks++;
      if (mux_sel !== exp_sel) begin
        failures++;
        $display("%0t mux_sel=%b expected %b after edge", $time, mux_sel, exp_sel);
      end
      // Sometimes disturb SEL while clk is high.
      late = ($urandom % 3) == 0;
      if (late) begin
        n_late++;
        #1 sel = ~sel;
        #2;
      end else
        #3;
      checks++;
      if (clk1 !== ~exp_sel || clk2 !== exp_sel || mux_sel !== exp_sel) begin
        failures++;
        $display("%0t high phase disturbed: clk1=%b clk2=%b mux_sel=%b sel@edge=%b", $time, clk1, clk2, mux_sel, exp_sel);
      end
      #1 last_clk_edge = $realtime;
      clk = 1'b0;
      #1;
      checks++;
      if (clk1 !== 1'b0 || clk2 !== 1'b0 || mux_sel !== exp_sel) begin
        failures++;
        $display("%0t low phase: clk1=%b clk2=%b mux_sel=%b expected %b", $time, clk1, clk2, mux_sel, exp_sel);
      end
    end
    checks++;
    if (n_late == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
