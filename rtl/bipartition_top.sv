// Bipartitioned pipeline stage for low energy.
//
// A pipeline stage normally registers all of its inputs, evaluates one combinational
// block and registers the result. Here the block f is split by Shannon expansion on
// one input, the partition variable SEL (input bit SEL_IDX):
//   f = SEL' * f|SEL=0 + SEL * f|SEL=1.
// The remaining inputs are offered to two input registers. R1 is clocked only on
// edges where SEL is 0 and feeds Subcircuit1 = f|SEL=0; R2 is clocked only on edges
// where SEL is 1 and feeds Subcircuit2 = f|SEL=1. The register that is not clocked
// keeps its value, so neither it nor its subcircuit switches. A multiplexer driven
// by the latched SEL passes the active subcircuit's result to the output register
// R0, which is clocked every cycle. The gated clocks come from bp_clock_ctrl (a
// latch and two AND gates, plus a second latch that holds the mux select).
//
// The saving depends on choosing SEL well: the best partition variable is the input
// that minimises the total switching of R1 and R2 over a typical input sequence.
// That choice is made before synthesis and enters here as the parameter SEL_IDX.
//
// Parameters: BENCH picks the function (bp_pkg::bench_e, default the three-input,
// two-output example function with inputs a,b,c = in_data[2:0]); SEL_IDX is the
// partition variable (default 2, input a, as in the worked example).
// Interface: clk, rst_n (asynchronous, active low, this design's addition),
// in_data[N_IN-1:0]; out_data[N_OUT-1:0].
// Timing: in_data is sampled at a rising edge of clk and f(in_data) appears on
// out_data after the next rising edge, a latency of two edges and a throughput of
// one result per cycle, the same as the unpartitioned stage.
module bipartition_top
  import bp_pkg::*;
#(
  parameter bench_e      BENCH   = BENCH_EXAMPLE,
  parameter int unsigned SEL_IDX = 2,
  localparam int unsigned N_IN   = bench_n_in(BENCH),
  localparam int unsigned N_OUT  = bench_n_out(BENCH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_data,
  output logic [N_OUT-1:0] out_data
);

  logic              sel;
  logic              clk1, clk2, mux_sel;
  logic [N_IN-2:0]   rest;
  logic [N_IN-2:0]   r1_q, r2_q;
  logic [N_OUT-1:0]  sub1_y, sub2_y, mux_y;

  // Split the input bus into the partition variable and the other inputs, which
  // keep their order with the gap closed.
  always_comb begin
    sel = in_data[SEL_IDX];
    for (int unsigned i = 0; i < N_IN - 1; i++)
      rest[i] = (i < SEL_IDX) ? in_data[i] : in_data[i+1];
  end

  bp_clock_ctrl u_clock (
    .clk     (clk),
    .sel     (sel),
    .clk1    (clk1),
    .clk2    (clk2),
    .mux_sel (mux_sel)
  );

  bp_pipe_reg #(.W(N_IN-1)) u_r1 (.clk(clk1), .rst_n(rst_n), .d(rest), .q(r1_q));
  bp_pipe_reg #(.W(N_IN-1)) u_r2 (.clk(clk2), .rst_n(rst_n), .d(rest), .q(r2_q));

  bp_subcircuit #(.BENCH(BENCH), .SEL_IDX(SEL_IDX), .SEL_VAL(1'b0)) u_sub1 (.x(r1_q), .y(sub1_y));
  bp_subcircuit #(.BENCH(BENCH), .SEL_IDX(SEL_IDX), .SEL_VAL(1'b1)) u_sub2 (.x(r2_q), .y(sub2_y));

  bp_mux #(.W(N_OUT)) u_mux (.sel(mux_sel), .d0(sub1_y), .d1(sub2_y), .y(mux_y));

  bp_pipe_reg #(.W(N_OUT)) u_r0 (.clk(clk), .rst_n(rst_n), .d(mux_y), .q(out_data));

  initial begin
    assert (SEL_IDX < N_IN)
      else $fatal(1, "SEL_IDX %0d out of range for a %0d-input function", SEL_IDX, N_IN);
  end

endmodule
