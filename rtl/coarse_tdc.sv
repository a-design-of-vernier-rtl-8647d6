`timescale 1ps/1fs
// coarse_tdc: 5-bit vernier coarse time-to-digital converter.
//
// Behavioural model (contains the analog delay-line model); the flip-flop
// bank is synthesizable RTL.  START runs down the slow chain and STOP down
// the fast chain of a 31-stage vernier line with a 10 ps step.  Flip-flop k
// (k = 0..30) is clocked by STOP[k] and samples START[k], so CQ[k] = 1 while
// START is still ahead at stage k: for an interval between n and n+1 steps
// CQ[0..n] are 1 and the rest 0.  All 32 tap pairs (tap 31 is the line
// output) go on to the signal selector, which picks the pair around the
// point where the order flips.  The stage count, the step and the flop per
// stage are the published design; the buffer delays are this model's.
//
// Timing: CQ[k] settles when STOP[k] rises, at most 31 * DLY_FAST_PS after
// STOP.  clr_i (high) empties the flops; apply it while START and STOP are
// low.
module coarse_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned STAGES      = COARSE_FF,
  parameter real         DLY_SLOW_PS = 60.0,
  parameter real         DLY_FAST_PS = 50.0
) (
  input  logic            start_i,
  input  logic            stop_i,
  input  logic            clr_i,
  output logic [STAGES-1:0] cq_o,
  output logic [STAGES:0] start_tap_o,
  output logic [STAGES:0] stop_tap_o
);
  vernier_delay_line #(
    .STAGES      (STAGES),
    .DLY_SLOW_PS (DLY_SLOW_PS),
    .DLY_FAST_PS (DLY_FAST_PS)
  ) u_line (
    .slow_i     (start_i),
    .fast_i     (stop_i),
    .slow_tap_o (start_tap_o),
    .fast_tap_o (stop_tap_o)
  );

  vernier_sampler #(.N(STAGES)) u_ff (
    .clr_i (clr_i),
    .d_i   (start_tap_o[STAGES-1:0]),
    .ck_i  (stop_tap_o[STAGES-1:0]),
    .q_o   (cq_o)
  );
endmodule
