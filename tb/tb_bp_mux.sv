// Exhaustive-by-sampling test of the 2:1 output multiplexer.
module tb_bp_mux;

  localparam int unsigned W = 4;

  logic         sel;
  logic [W-1:0] d0, d1, y;
  int checks = 0, failures = 0;

  bp_mux #(.W(W)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          sel = 1'(s);
          d0  = W'(a);
          d1  = W'(b);
          #1;
          checks++;
          if (y !== (s == 1 ? W'(b) : W'(a))) begin
            failures++;
            $display("sel=%0d d0=%h d1=%h y=%h", s, a, b, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
