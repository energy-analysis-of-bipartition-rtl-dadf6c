// Workload test: the example function and the benchmark functions rd53, rd73, xor5
// and 9sym, each bipartitioned on every one of its inputs in turn.
//
// All stages share one 9-bit stimulus (each uses its low N_IN bits). The stimulus
// mixes three kinds of cycles: the all-zeros / all-ones alternation of the worked
// example, uniformly random vectors, and vectors in which only the top input bit
// flips against the previous all-zeros or all-ones vector. Each stage checks its
// outputs against a reference. Then, as the partition-variable selection would do,
// the testbench ranks the partition variables of each function by the switching of
// R1 and R2: the toggles predicted from the input sequence must equal the toggles
// measured in the registers, and the best choice is reported together with the
// toggles of a conventional, ungated input register for comparison.
module tb_bp_workloads;
  import bp_pkg::*;

  localparam int NB = 5;
  localparam bench_e BENCHES [NB] = '{BENCH_EXAMPLE, BENCH_RD53, BENCH_RD73, BENCH_XOR5, BENCH_SYM9};
  localparam string  NAMES   [NB] = '{"example", "rd53", "rd73", "xor5", "9sym"};

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       measure = 1'b0;
  logic [8:0] stim = '0;

  int c  [NB][9];
  int f  [NB][9];
  int rt [NB][9];
  int mt [NB][9];
  int ut [NB][9];

  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_bench
    for (genvar s = 0; s < int'(bench_n_in(BENCHES[b])); s++) begin : g_sel
      tb_bp_bench_probe #(.BENCH(BENCHES[b]), .SEL_IDX(s)) u_probe (
        .clk(clk), .rst_n(rst_n), .stim(stim), .measure(measure),
        .checks(c[b][s]), .failures(f[b][s]), .reg_toggles(rt[b][s]),
        .model_toggles(mt[b][s]), .ungated_toggles(ut[b][s]));
    end
  end

  int checks = 0, failures = 0;

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int best, best_t, n;
    int kind;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Warm-up cycles that load both registers of every stage before measuring.
    stim = '0;
    @(negedge clk) stim = '1;
    @(negedge clk) stim = 9'h0ff;
    @(negedge clk) stim = 9'h100;
    @(negedge clk);
    measure = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      kind = $urandom % 4;
      case (kind)
        0, 1: stim = (stim == '0) ? '1 : '0;
        2:    stim = 9'($urandom);
        default: stim = (stim[7:0] == '0) ? 9'h0ff : 9'h100;
      endcase
      @(negedge clk);
    end
    measure = 1'b0;
    repeat (3) @(negedge clk);

    for (int b = 0; b < NB; b++) begin
      n = int'(bench_n_in(BENCHES[b]));
      best = 0;
      best_t = mt[b][0];
      for (int s = 0; s < n; s++) begin
        checks   += c[b][s];
        failures += f[b][s];
        checks++;
        if (rt[b][s] != mt[b][s]) begin
          failures++;
          $display("%s SEL=input %0d: registers toggled %0d times, model predicts %0d",
                   NAMES[b], s, rt[b][s], mt[b][s]);
        end
        if (mt[b][s] < best_t) begin
          best_t = mt[b][s];
          best = s;
        end
      end
      checks++;
      if (c[b][0] < 3000) begin
        failures++;
        $display("%s: too few output checks (%0d)", NAMES[b], c[b][0]);
      end
      $display("%-8s best partition variable: input %0d, R1+R2 toggles %0d vs %0d for an ungated input register (%0d%% fewer)",
               NAMES[b], best, best_t, ut[b][best], 100 - (100 * best_t) / ut[b][best]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
