`timescale 1ps/1fs
// fine_tdc: vernier fine TDC with a positive and a negative line.
//
// Behavioural model (contains the analog delay-line models); the flip-flop
// banks are synthesizable RTL.  The amplified interval is up to about 40
// times the coarse residue, so the positive line has 94 stages and a 7-bit
// code: START runs down the slow chain, STOP down the fast one, and
// FQP[k] = 1 while START is still ahead after k+1 stages.  A small offset of
// the amplifier can make the interval negative, so a shorter 32-stage line
// with the roles exchanged (STOP slow, START fast, first flop at the inputs)
// sets FQN[k] = 1 while STOP is ahead at stage k.  Then
// ones(FQP) - ones(FQN) = floor(interval / step).  Line lengths, the 7-bit
// and 5-bit codes and the tap positions are the published ones; the 10 ps
// step and the buffer delays are this model's.
//
// Tap 0 (the inputs) of the positive line feeds no flop and is unused.
//
// Timing: all flops have settled 94 * DLY_SLOW_PS after the later input.
// clr_i (high) empties the flops; apply it while the inputs are low.
module fine_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned POS_FF      = FINE_POS_FF,
  parameter int unsigned NEG_FF      = FINE_NEG_FF,
  parameter real         DLY_SLOW_PS = 60.0,
  parameter real         DLY_FAST_PS = 50.0
) (
  input  logic              start_i,
  input  logic              stop_i,
  input  logic              clr_i,
  output logic [POS_FF-1:0] fqp_o,
  output logic [NEG_FF-1:0] fqn_o
);
  logic [POS_FF:0]   pos_start, pos_stop;
  logic [NEG_FF-1:0] neg_start, neg_stop;

  // Positive line: START slow, STOP fast, flops after every stage.
  vernier_delay_line #(.STAGES(POS_FF), .DLY_SLOW_PS(DLY_SLOW_PS), .DLY_FAST_PS(DLY_FAST_PS)) u_pos_line (
    .slow_i     (start_i),
    .fast_i     (stop_i),
    .slow_tap_o (pos_start),
    .fast_tap_o (pos_stop)
  );

  vernier_sampler #(.N(POS_FF)) u_pos_ff (
    .clr_i (clr_i),
    .d_i   (pos_start[POS_FF:1]),
    .ck_i  (pos_stop[POS_FF:1]),
    .q_o   (fqp_o)
  );

  // Negative line: STOP slow, START fast, first flop at the inputs.
  vernier_delay_line #(.STAGES(NEG_FF-1), .DLY_SLOW_PS(DLY_SLOW_PS), .DLY_FAST_PS(DLY_FAST_PS)) u_neg_line (
    .slow_i     (stop_i),
    .fast_i     (start_i),
    .slow_tap_o (neg_stop),
    .fast_tap_o (neg_start)
  );

  vernier_sampler #(.N(NEG_FF)) u_neg_ff (
    .clr_i (clr_i),
    .d_i   (neg_stop),
    .ck_i  (neg_start),
    .q_o   (fqn_o)
  );
endmodule
