// Test of the pipeline register: asynchronous reset, capture on each rising edge,
// hold while the clock is stopped (as it is for R1 or R2 when gated off).
`timescale 1ns/1ps
module tb_bp_pipe_reg;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         run = 1'b1;
  logic         rst_n = 1'b1;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  bp_pipe_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("%0t %s: q=%h expected %h", $time, what, q, model);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    model = '0;
    check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      d   = W'($urandom);
      run = ($urandom % 4) != 0;   // clock stopped a quarter of the time
      #4;
      if (run) begin
        clk = 1'b1;
        model = d;
      end
      #1;
      check(run ? "capture" : "hold");
      // Input changes while the clock is high must not pass through.
      d = W'($urandom);
      #4 clk = 1'b0;
      #1 check("after fall");
      if (i == 1000) begin
        rst_n = 1'b0;
        #1 model = '0;
        check("async reset");
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
