// Test of the cofactor subcircuits.
//
// For the example function partitioned on a, the expected outputs are the two
// partitioned truth tables of the worked example, written out here as constants:
// a = 0 gives f1 = c, f2 = bc; a = 1 gives f1 = b, f2 = b + c. For the benchmark
// functions the cofactors are compared with ones-count, parity and symmetric-function
// models computed in the testbench, for a partition variable in the middle of the
// input vector so that the gap-closing of the remaining inputs is exercised.
module tb_bp_subcircuit;
  import bp_pkg::*;

  // Index {b,c}, value {f1,f2}.
  localparam logic [1:0] TT_A0 [4] = '{2'b00, 2'b10, 2'b00, 2'b11};
  localparam logic [1:0] TT_A1 [4] = '{2'b00, 2'b01, 2'b11, 2'b11};

  int checks = 0, failures = 0;

  logic [1:0] ex_x;
  logic [1:0] ex_y0, ex_y1;
  bp_subcircuit #(.BENCH(BENCH_EXAMPLE), .SEL_IDX(2), .SEL_VAL(1'b0)) u_ex0 (.x(ex_x), .y(ex_y0));
  bp_subcircuit #(.BENCH(BENCH_EXAMPLE), .SEL_IDX(2), .SEL_VAL(1'b1)) u_ex1 (.x(ex_x), .y(ex_y1));

  // Example partitioned on c (bit 0): remaining inputs {a,b}.
  logic [1:0] exc_y0, exc_y1;
  bp_subcircuit #(.BENCH(BENCH_EXAMPLE), .SEL_IDX(0), .SEL_VAL(1'b0)) u_exc0 (.x(ex_x), .y(exc_y0));
  bp_subcircuit #(.BENCH(BENCH_EXAMPLE), .SEL_IDX(0), .SEL_VAL(1'b1)) u_exc1 (.x(ex_x), .y(exc_y1));
  localparam logic [1:0] TT [8] = '{2'b00, 2'b10, 2'b00, 2'b11, 2'b00, 2'b01, 2'b11, 2'b11};

  logic [3:0] rd_x;
  logic [2:0] rd_y1;
  bp_subcircuit #(.BENCH(BENCH_RD53), .SEL_IDX(2), .SEL_VAL(1'b1)) u_rd53 (.x(rd_x), .y(rd_y1));

  logic [7:0] s9_x;
  logic [0:0] s9_y0;
  bp_subcircuit #(.BENCH(BENCH_SYM9), .SEL_IDX(4), .SEL_VAL(1'b0)) u_sym9 (.x(s9_x), .y(s9_y0));

  logic [3:0] xr_x;
  logic [0:0] xr_y1;
  bp_subcircuit #(.BENCH(BENCH_XOR5), .SEL_IDX(0), .SEL_VAL(1'b1)) u_xor5 (.x(xr_x), .y(xr_y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int k;
    for (int i = 0; i < 4; i++) begin
      ex_x = 2'(i);
      #1;
      expect_eq($sformatf("example a=0 bc=%b", ex_x), ex_y0, TT_A0[i]);
      expect_eq($sformatf("example a=1 bc=%b", ex_x), ex_y1, TT_A1[i]);
      // ex_x = {a,b} here: full index {a,b,c}.
      expect_eq($sformatf("example c=0 ab=%b", ex_x), exc_y0, TT[{ex_x, 1'b0}]);
      expect_eq($sformatf("example c=1 ab=%b", ex_x), exc_y1, TT[{ex_x, 1'b1}]);
    end
    for (int i = 0; i < 16; i++) begin
      rd_x = 4'(i);
      #1;
      expect_eq($sformatf("rd53 x=%b", rd_x), rd_y1, $countones(rd_x) + 1);
    end
    for (int i = 0; i < 256; i++) begin
      s9_x = 8'(i);
      #1;
      k = $countones(s9_x);
      expect_eq($sformatf("9sym x=%b", s9_x), s9_y0, (k >= 3 && k <= 6) ? 1 : 0);
    end
    for (int i = 0; i < 16; i++) begin
      xr_x = 4'(i);
      #1;
      expect_eq($sformatf("xor5 x=%b", xr_x), xr_y1, ($countones(xr_x) + 1) % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
