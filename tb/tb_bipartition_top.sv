// End-to-end test of the bipartition stage at its default parameters: the
// three-input, two-output example function partitioned on input a.
//
// The expected outputs come from the example's truth table, written out below as
// a constant, independently of the RTL's function. Inputs change on the falling
// edge; the value applied before rising edge k must appear on out_data after
// rising edge k+1 (two-edge latency, one result per cycle).
//
// Phases: random inputs; the alternating 000/111 sequence of the worked example,
// during which the input registers R1 and R2 must stop toggling while an
// ungated input register would flip all three bits every cycle; long runs of one
// SEL value to gate one register for many cycles. The test counts how often R1
// and R2 were loaded and held, how often each subcircuit was selected and how
// often SEL changed between cycles, and fails if any of these never happened.
module tb_bipartition_top;
  import bp_pkg::*;

  // Truth table of the example, index {a,b,c}, value {f1,f2}.
  localparam logic [1:0] TT [8] = '{2'b00, 2'b10, 2'b00, 2'b11, 2'b00, 2'b01, 2'b11, 2'b11};

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] in_data;
  logic [1:0] out_data;

  int checks = 0, failures = 0;
  int n_r1_load = 0, n_r2_load = 0, n_r1_hold = 0, n_r2_hold = 0;
  int n_sub1 = 0, n_sub2 = 0, n_sel_change = 0;
  int cycles = 0;

  bipartition_top dut (.clk(clk), .rst_n(rst_n), .in_data(in_data), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference pipeline: inputs sampled at rising edges.
  logic [2:0] smp [$];
  logic       started = 1'b0;
  logic [1:0] r1_prev, r2_prev;
  logic       sel_prev;
  int         ungated_toggles = 0, gated_toggles = 0;
  logic       count_toggles = 1'b0;
  logic [2:0] in_prev;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      sel_prev <= in_data[2];
      if (started && (sel_prev != in_data[2])) n_sel_change++;
      if (in_data[2]) begin n_r2_load++; n_r1_hold++; end
      else            begin n_r1_load++; n_r2_hold++; end
      smp.push_back(in_data);
      started <= 1'b1;
    end
  end

  // Check after each rising edge settles: R1/R2 contents, held register unchanged,
  // mux select and output.
  logic [2:0] exp_in;
  logic [1:0] exp_out;
  always @(negedge clk) begin
    if (!rst_n) begin
      r1_prev = dut.u_r1.q;
      r2_prev = dut.u_r2.q;
      in_prev = '0;
    end
    if (rst_n && started) begin
      // The last sampled input must be in the register its SEL selects, the other
      // register must be unchanged.
      exp_in = smp[$];
      checks++;
      if (exp_in[2]) begin
        if (dut.u_r2.q !== exp_in[1:0] || dut.u_r1.q !== r1_prev) begin
          failures++;
          $display("%0t R2 load wrong: in=%b r1=%b(prev %b) r2=%b", $time, exp_in, dut.u_r1.q, r1_prev, dut.u_r2.q);
        end
      end else begin
        if (dut.u_r1.q !== exp_in[1:0] || dut.u_r2.q !== r2_prev) begin
          failures++;
          $display("%0t R1 load wrong: in=%b r1=%b r2=%b(prev %b)", $time, exp_in, dut.u_r1.q, dut.u_r2.q, r2_prev);
        end
      end
      if (dut.mux_sel) n_sub2++; else n_sub1++;
      if (count_toggles) begin
        gated_toggles   += $countones(dut.u_r1.q ^ r1_prev) + $countones(dut.u_r2.q ^ r2_prev);
        ungated_toggles += $countones(exp_in ^ in_prev);
      end
      r1_prev = dut.u_r1.q;
      r2_prev = dut.u_r2.q;
      in_prev = exp_in;
      if (smp.size() == 2) begin
        exp_out = TT[smp.pop_front()];
        checks++;
        if (out_data !== exp_out) begin
          failures++;
          $display("%0t out=%b expected %b", $time, out_data, exp_out);
        end
      end
    end
  end

  task automatic drive(input logic [2:0] v);
    @(negedge clk);
    in_data = v;
  endtask

  initial begin
    // Start with reset inactive so that asserting it is an edge.
    rst_n   = 1'b1;
    in_data = 3'b000;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (out_data !== 2'b00 || dut.u_r1.q !== 2'b00 || dut.u_r2.q !== 2'b00) begin
      failures++;
      $display("reset state wrong");
    end

    // Exhaustive sweep, then random inputs.
    for (int i = 0; i < 8; i++) drive(3'(i));
    for (int i = 0; i < 8; i++) drive(3'(7 - i));
    repeat (400) drive(3'($urandom));

    // Worked example: 000 <-> 111. Allow one cycle to settle both registers.
    drive(3'b000);
    drive(3'b111);
    drive(3'b000);
    @(posedge clk);
    count_toggles = 1'b1;
    for (int i = 0; i < 200; i++) drive(i[0] ? 3'b000 : 3'b111);
    @(negedge clk);
    count_toggles = 1'b0;
    checks++;
    if (gated_toggles != 0 || ungated_toggles < 3 * 199) begin
      failures++;
      $display("000/111 sequence: gated toggles %0d (expected 0), ungated %0d", gated_toggles, ungated_toggles);
    end else
      $display("000/111 sequence: R1/R2 toggles %0d, ungated input register toggles %0d", gated_toggles, ungated_toggles);

    // Long runs of one SEL value.
    repeat (30) drive({1'b1, 2'($urandom)});
    repeat (30) drive({1'b0, 2'($urandom)});
    repeat (3) drive(3'($urandom));
    repeat (3) @(negedge clk);

    $display("cycles=%0d R1 loads=%0d holds=%0d, R2 loads=%0d holds=%0d, Sub1 sel=%0d Sub2 sel=%0d, SEL changes=%0d",
             cycles, n_r1_load, n_r1_hold, n_r2_load, n_r2_hold, n_sub1, n_sub2, n_sel_change);
    checks++;
    if (n_r1_load == 0 || n_r2_load == 0 || n_r1_hold == 0 || n_r2_hold == 0 ||
        n_sub1 == 0 || n_sub2 == 0 || n_sel_change == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
