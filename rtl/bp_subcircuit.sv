// One cofactor subcircuit of the bipartition stage.
//
// The stage's combinational function f (chosen by BENCH, see bp_pkg) is split by
// Shannon expansion on the input at position SEL_IDX:
//   f = SEL' * f|SEL=0 + SEL * f|SEL=1.
// This module computes one of the two cofactors, f|SEL=SEL_VAL, from the remaining
// N_IN-1 inputs. SEL_VAL = 0 gives Subcircuit1 (fed by R1), SEL_VAL = 1 gives
// Subcircuit2 (fed by R2). The cofactor is the original function with the partition
// variable tied to a constant, so synthesis simplifies it to the smaller logic the
// architecture relies on; for the example function with SEL = a this is
// f1 = c, f2 = bc (SEL_VAL = 0) and f1 = b, f2 = b + c (SEL_VAL = 1).
//
// Interface: x holds the inputs other than the partition variable, in their original
// order with the gap closed (x[i] = input i for i < SEL_IDX, input i+1 otherwise).
// y is the N_OUT-bit function value. Purely combinational.
module bp_subcircuit
  import bp_pkg::*;
#(
  parameter bench_e      BENCH   = BENCH_EXAMPLE,
  parameter int unsigned SEL_IDX = 2,
  parameter bit          SEL_VAL = 1'b0,
  localparam int unsigned N_IN   = bench_n_in(BENCH),
  localparam int unsigned N_OUT  = bench_n_out(BENCH)
) (
  input  logic [N_IN-2:0]  x,
  output logic [N_OUT-1:0] y
);

  logic [MAX_IN-2:0] rest;
  out_vec_t          full;

  always_comb begin
    rest = '0;
    rest[N_IN-2:0] = x;
    full = bench_eval(BENCH, insert_bit(rest, SEL_IDX, SEL_VAL));
    y    = full[N_OUT-1:0];
  end

endmodule
