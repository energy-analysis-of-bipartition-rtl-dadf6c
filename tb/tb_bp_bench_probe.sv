// Testbench helper: one bipartition stage for a given function and partition
// variable, with its own reference model and switching counters.
//
// The stage's output is compared each cycle with a reference computed here
// (ones-count, parity, symmetric function, or the example's truth table), delayed by
// the stage's two-edge latency. Counters report the bit toggles of R1 and R2 seen in
// the stage, and the toggles the selection algorithm predicts for this partition
// variable from the input sequence alone: for each register, the Hamming distance
// between consecutive input vectors (partition variable removed) routed to it.
// Inputs must change only while clk is low.
module tb_bp_bench_probe
  import bp_pkg::*;
#(
  parameter bench_e      BENCH   = BENCH_EXAMPLE,
  parameter int unsigned SEL_IDX = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [8:0] stim,
  input  logic       measure,
  output int         checks,
  output int         failures,
  output int         reg_toggles,
  output int         model_toggles,
  output int         ungated_toggles
);

  localparam int unsigned N_IN  = bench_n_in(BENCH);
  localparam int unsigned N_OUT = bench_n_out(BENCH);
  localparam logic [1:0] TT [8] = '{2'b00, 2'b10, 2'b00, 2'b11, 2'b00, 2'b01, 2'b11, 2'b11};

  logic [N_IN-1:0]  in_data;
  logic [N_OUT-1:0] out_data;

  assign in_data = stim[N_IN-1:0];

  bipartition_top #(.BENCH(BENCH), .SEL_IDX(SEL_IDX)) u_stage (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .out_data(out_data));

  function automatic int reference(logic [N_IN-1:0] x);
    int k;
    k = $countones(x);
    case (BENCH)
      BENCH_EXAMPLE: return int'(TT[x[2:0]]);
      BENCH_RD53, BENCH_RD73: return k;
      BENCH_XOR5: return k % 2;
      BENCH_SYM9: return (k >= 3 && k <= 6) ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  // Input vector with the partition variable removed.
  function automatic logic [N_IN-2:0] others(logic [N_IN-1:0] x);
    logic [N_IN-2:0] r;
    int j;
    j = 0;
    for (int i = 0; i < int'(N_IN); i++)
      if (i != int'(SEL_IDX)) begin
        r[j] = x[i];
        j++;
      end
    return r;
  endfunction

  int                exp_q [$];
  logic [N_IN-2:0]   last_to [2];
  logic [N_IN-1:0]   last_in;
  logic [N_IN-2:0]   r1_prev, r2_prev;
  logic              sel;
  logic              measure_q = 1'b0;  // measure as seen at the last rising edge

  initial begin
    checks = 0; failures = 0;
    reg_toggles = 0; model_toggles = 0; ungated_toggles = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      last_to[0] = '0;
      last_to[1] = '0;
      last_in    = '0;
      exp_q.delete();
    end else begin
      sel = in_data[SEL_IDX];
      measure_q = measure;
      if (measure_q) begin
        model_toggles   += $countones(others(in_data) ^ last_to[sel]);
        ungated_toggles += $countones(in_data ^ last_in);
      end
      last_to[sel] = others(in_data);
      last_in      = in_data;
      exp_q.push_back(reference(in_data));
    end
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      r1_prev = u_stage.r1_q;
      r2_prev = u_stage.r2_q;
    end else begin
      if (measure_q)
        reg_toggles += $countones(u_stage.r1_q ^ r1_prev) + $countones(u_stage.r2_q ^ r2_prev);
      r1_prev = u_stage.r1_q;
      r2_prev = u_stage.r2_q;
      if (exp_q.size() == 2) begin
        checks++;
        if (int'(out_data) != exp_q.pop_front()) begin
          failures++;
          $display("%m: out=%0d wrong", out_data);
        end
      end
    end
  end

endmodule
