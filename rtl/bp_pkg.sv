// Shared types and functions of the bipartition pipeline stage.
//
// A bipartition stage computes a fixed combinational function Y = f(X) between two
// clock edges. This package holds the functions that can be placed in such a stage,
// chosen at elaboration time through the bench_e enum, together with helpers that
// build the Shannon cofactors f|SEL=0 and f|SEL=1 out of them.
//
// The EXAMPLE function is the three-input, two-output function worked through in the
// description of the architecture; its truth table is reproduced by bench_eval below.
// The RD53, RD73, XOR5 and SYM9 functions are four of the benchmark circuits the
// architecture was evaluated on. Their definitions (ones-count, parity and the 9-input
// symmetric function) are the well-known behaviour of those benchmarks and are not
// spelled out by the architecture description itself.
//
// Everything here is pure combinational logic; nothing is clocked.
package bp_pkg;

  // Widest input and output over all functions listed below.
  localparam int unsigned MAX_IN  = 9;
  localparam int unsigned MAX_OUT = 3;

  typedef enum logic [2:0] {
    BENCH_EXAMPLE = 3'd0,  // f1 = a'c + ab, f2 = ab + bc + ac (inputs a,b,c; a is the MSB)
    BENCH_RD53    = 3'd1,  // 5 inputs, 3 outputs: number of ones
    BENCH_RD73    = 3'd2,  // 7 inputs, 3 outputs: number of ones
    BENCH_XOR5    = 3'd3,  // 5 inputs, 1 output: parity
    BENCH_SYM9    = 3'd4   // 9 inputs, 1 output: 1 when 3 to 6 inputs are one
  } bench_e;

  typedef logic [MAX_IN-1:0]  in_vec_t;
  typedef logic [MAX_OUT-1:0] out_vec_t;

  function automatic int unsigned bench_n_in(bench_e b);
    case (b)
      BENCH_EXAMPLE: return 3;
      BENCH_RD53:    return 5;
      BENCH_RD73:    return 7;
      BENCH_XOR5:    return 5;
      BENCH_SYM9:    return 9;
      default:       return 3;
    endcase
  endfunction

  function automatic int unsigned bench_n_out(bench_e b);
    case (b)
      BENCH_EXAMPLE: return 2;
      BENCH_RD53:    return 3;
      BENCH_RD73:    return 3;
      BENCH_XOR5:    return 1;
      BENCH_SYM9:    return 1;
      default:       return 2;
    endcase
  endfunction

  // Number of ones among the low n bits of x.
  function automatic logic [3:0] ones(in_vec_t x, int unsigned n);
    logic [3:0] c;
    c = '0;
    for (int unsigned i = 0; i < MAX_IN; i++)
      if (i < n) c = c + 4'(x[i]);
    return c;
  endfunction

  // The full (unpartitioned) function. Bits of x above bench_n_in(b) are ignored,
  // output bits above bench_n_out(b) are zero.
  function automatic out_vec_t bench_eval(bench_e b, in_vec_t x);
    out_vec_t   y;
    logic       a, bb, c;
    logic [3:0] k;
    y = '0;
    case (b)
      BENCH_EXAMPLE: begin
        a  = x[2];
        bb = x[1];
        c  = x[0];
        y[1] = (~a & c) | (a & bb);             // f1
        y[0] = (a & bb) | (bb & c) | (a & c);   // f2
      end
      BENCH_RD53: begin
        k = ones(x, 5);
        y = k[2:0];
      end
      BENCH_RD73: begin
        k = ones(x, 7);
        y = k[2:0];
      end
      BENCH_XOR5: y[0] = ^x[4:0];
      BENCH_SYM9: begin
        k = ones(x, 9);
        y[0] = (k >= 4'd3) && (k <= 4'd6);
      end
      default: y = '0;
    endcase
    return y;
  endfunction

  // Rebuild a full input vector from the inputs that remain after the partition
  // variable at position idx is removed, with that variable forced to val.
  // rest[idx-1:0] become x[idx-1:0]; rest[MAX_IN-2:idx] become x[MAX_IN-1:idx+1].
  function automatic in_vec_t insert_bit(logic [MAX_IN-2:0] rest, int unsigned idx, logic val);
    in_vec_t x;
    for (int unsigned i = 0; i < MAX_IN; i++) begin
      if (i < idx)       x[i] = rest[i];
      else if (i == idx) x[i] = val;
      else               x[i] = rest[i-1];
    end
    return x;
  endfunction

endpackage
