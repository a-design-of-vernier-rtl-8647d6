`timescale 1ps/1fs
// sel_generator: coarse thermometer code to stage index (Sel).
//
// The coarse vernier line inverts the order of START and STOP at stage n+1
// when the input interval lies between n and n+1 steps; then CQ[0..n] are 1
// and the rest 0.  Sel = n = (number of ones) - 1 selects the last stage that
// still has START ahead, whose residue is below one step.  With no ones at
// all (STOP already ahead at stage 0, a negative or zero interval) Sel = 0
// and the negative fine lines measure the residue.  The function is the
// published one; counting ones (so a bubble shifts Sel by at most one) is
// this design's.  The same module serves as the 5-bit coarse encoder.
//
// Purely combinational; Sel only grows while the coarse flops fill up.
module sel_generator #(
  parameter int unsigned N = 31,
  parameter int unsigned W = 5
) (
  input  logic [N-1:0] cq_i,
  output logic [W-1:0] sel_o
);
  logic [W-1:0] ones;

  therm_count #(.N(N), .W(W)) u_count (
    .therm_i (cq_i),
    .count_o (ones)
  );

  assign sel_o = (ones == '0) ? '0 : ones - W'(1);
endmodule
