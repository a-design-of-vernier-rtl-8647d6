`timescale 1ps/1fs
// vernier_tdc_top: 10-bit vernier coarse-fine TDC with one amplifier chain.
//
// Behavioural model of the complete converter: the delay lines and time
// amplifiers are analog models, the flip-flop banks, Sel generator,
// multiplexers, encoders and compensator are synthesizable RTL
// (tdc_readout is the digital back end on its own).
//
// START and STOP enter a 31-stage, 10 ps vernier coarse TDC.  From its
// flip-flops the selector finds the stage n at which START is last ahead and
// routes tap pair n (residue r) and tap pair n+1 (10 ps - r, exchanged) to
// two 2-stage time amplifiers of gain about 40.  Fine TDC 1 and fine TDC 2
// convert the amplified intervals; the compensator scales FOUT1 by
// 32 / (FOUT1 + FOUT2), which removes the amplifier's gain error, and
// subtracts a calibrated offset.  code_o = n * 32 + fine, 10 bits,
// nominally 10 ps / 32 = 0.3125 ps per code over 0..320 ps.
// The chain is the published one; the control (clr_i, sample_i, cal_i) and
// the analog model values are this design's.  GAIN1 and GAIN2 set both
// amplifier chains' models (nominal 20 and 2); OFFSET_A_PS and OFFSET_B_PS
// are the input offsets of the residue chain and the complement chain
// (nominal 0).  An offset in the complement chain also enters FSUM, which
// the published correction does not remove.
//
// Operation: with START, STOP low, pulse clr_i.  Raise START, then STOP
// after the interval.  When all edges have passed (about 8 ns: 1.9 ns
// coarse line, 1 ns delay stage, amplifier, 5.7 ns fine line) pulse
// sample_i for one clk_i cycle; code_o is valid with valid_o two cycles
// later.  sel_o shows the selector's stage index live.  With cal_i high
// during sample_i and START = STOP, the fine offset is stored instead.
// Drop START and STOP before the next clr_i.
module vernier_tdc_top
  import tdc_pkg::*;
#(
  parameter real GAIN1 = 20.0,
  parameter real GAIN2 = 2.0,
  parameter real OFFSET_A_PS = 0.0,
  parameter real OFFSET_B_PS = 0.0
) (
  input  logic              start_i,
  input  logic              stop_i,
  input  logic              clr_i,
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              sample_i,
  input  logic              cal_i,
  output logic [COARSE_W-1:0] sel_o,
  output logic [CODE_W-1:0] code_o,
  output logic              valid_o,
  output logic              sat_o,
  output logic              clip_o
);
  logic [COARSE_FF-1:0]   cq;
  logic [COARSE_FF:0]     start_tap, stop_tap;
  logic                   a_lead, a_lag, b_lead, b_lag;
  logic                   start2_a, stop2_a, start2_b, stop2_b;
  logic [FINE_POS_FF-1:0] fqp1, fqp2;
  logic [FINE_NEG_FF-1:0] fqn1, fqn2;

  coarse_tdc u_coarse (
    .start_i     (start_i),
    .stop_i      (stop_i),
    .clr_i       (clr_i),
    .cq_o        (cq),
    .start_tap_o (start_tap),
    .stop_tap_o  (stop_tap)
  );

  signal_selector u_select (
    .cq_i     (cq),
    .start_i  (start_tap),
    .stop_i   (stop_tap),
    .sel_o    (sel_o),
    .a_lead_o (a_lead),
    .a_lag_o  (a_lag),
    .b_lead_o (b_lead),
    .b_lag_o  (b_lag)
  );

  two_stage_ta #(.GAIN1(GAIN1), .GAIN2(GAIN2), .OFFSET_PS(OFFSET_A_PS)) u_ta_a (
    .start_i  (a_lead),
    .stop_i   (a_lag),
    .start2_o (start2_a),
    .stop2_o  (stop2_a)
  );

  two_stage_ta #(.GAIN1(GAIN1), .GAIN2(GAIN2), .OFFSET_PS(OFFSET_B_PS)) u_ta_b (
    .start_i  (b_lead),
    .stop_i   (b_lag),
    .start2_o (start2_b),
    .stop2_o  (stop2_b)
  );

  fine_tdc u_ftdc1 (
    .start_i (start2_a),
    .stop_i  (stop2_a),
    .clr_i   (clr_i),
    .fqp_o   (fqp1),
    .fqn_o   (fqn1)
  );

  fine_tdc u_ftdc2 (
    .start_i (start2_b),
    .stop_i  (stop2_b),
    .clr_i   (clr_i),
    .fqp_o   (fqp2),
    .fqn_o   (fqn2)
  );

  tdc_readout u_readout (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .sample_i (sample_i),
    .cal_i    (cal_i),
    .cq_i     (cq),
    .fqp1_i   (fqp1),
    .fqn1_i   (fqn1),
    .fqp2_i   (fqp2),
    .fqn2_i   (fqn2),
    .code_o   (code_o),
    .valid_o  (valid_o),
    .sat_o    (sat_o),
    .clip_o   (clip_o)
  );
endmodule
