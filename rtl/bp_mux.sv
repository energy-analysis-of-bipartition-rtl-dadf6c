// Output multiplexer of the bipartition stage: passes the result of the active
// subcircuit to the output register R0.
//
// sel = 0 selects d0 (Subcircuit1, fed by R1), sel = 1 selects d1 (Subcircuit2, fed
// by R2). sel comes from the select latch of bp_clock_ctrl, so it names the register
// that was loaded at the last clock edge. Purely combinational, W bits wide.
module bp_mux #(
  parameter int unsigned W = 2
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
