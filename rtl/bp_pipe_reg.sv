// Pipeline register of the bipartition stage, used for the input registers R1 and
// R2 (clocked by the gated clocks clk1 and clk2) and for the output register R0
// (clocked by the free-running clock).
//
// A W-bit bank of rising-edge flip-flops. When its clock is gated off the register
// keeps its contents, so neither its flip-flops nor the subcircuit behind it toggle.
// The asynchronous active-low reset is this design's addition; the architecture
// does not describe a reset. It keeps every bit defined before the first clock edge
// that reaches the register, which for a gated register may come late.
//
// Interface: clk, rst_n, d[W-1:0] in; q[W-1:0] out. Timing: q takes d one rising
// edge of clk later.
module bp_pipe_reg #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
