`timescale 1ps/1fs
// two_stage_ta: behavioural model of the 2-stage vernier time amplifier.
//
// Behavioural model of an analog part; not synthesizable.  A single stage
// with a gain above 32 is too nonlinear, so two stages are cascaded: Type-I
// with a large gain (about 20) and a small input range, then Type-II with a
// small gain (about 2) and a larger range, about 40 in total.  Type-I's AO
// drives Type-II's A and its BO drives B; Type-II's AO is START2 and its BO
// is STOP2.  Structure, gains and wiring are the published ones; the
// ranges, delays and the input offset OFFSET_PS (of Type-I) are this
// model's.  The fine TDC after it measures the
// residual gain error, so the gains may be set away from the nominal values.
//
// Timing: START2 rises 2 * T0_PS + GAIN1 * (STOP - START) after the later
// input (Type-II waits for the later of Type-I's outputs); STOP2 follows
// GAIN1 * GAIN2 * (STOP - START) later.
module two_stage_ta #(
  parameter real GAIN1     = 20.0,
  parameter real GAIN2     = 2.0,
  parameter real RANGE1_PS = 20.0,
  parameter real RANGE2_PS = 400.0,
  parameter real T0_PS     = 100.0,
  parameter real OFFSET_PS = 0.0
) (
  input  logic start_i,
  input  logic stop_i,
  output logic start2_o,
  output logic stop2_o
);
  logic ao1, bo1;

  vernier_ta #(.GAIN(GAIN1), .RANGE_PS(RANGE1_PS), .T0_PS(T0_PS), .OFFSET_PS(OFFSET_PS)) u_type1 (
    .a_i  (start_i),
    .b_i  (stop_i),
    .ao_o (ao1),
    .bo_o (bo1)
  );

  vernier_ta #(.GAIN(GAIN2), .RANGE_PS(RANGE2_PS), .T0_PS(T0_PS)) u_type2 (
    .a_i  (ao1),
    .b_i  (bo1),
    .ao_o (start2_o),
    .bo_o (stop2_o)
  );
endmodule
