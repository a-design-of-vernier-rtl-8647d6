`timescale 1ps/1fs
// signal_selector: chooses the tap pairs that the time amplifiers see.
//
// Behavioural model (contains the delay-stage model); the Sel generator and
// the multiplexers are synthesizable RTL.  Sel = n, the last coarse stage at
// which START is still ahead, is computed from the coarse flip-flops.  The
// 32 tap pairs are delayed so that Sel is stable before they arrive.  MUX A
// passes (START[n], STOP[n]), whose interval is the coarse residue r
// (0 <= r < 10 ps); MUX B passes (STOP[n+1], START[n+1]), whose interval is
// 10 ps - r.  Only one amplifier chain per residue is needed instead of one
// per stage, which is the point of the published design.  Delay stage, Sel
// generator and two multiplexers are the published structure; what MUX B
// picks and the delay value are this design's.
//
// Timing: a_lead_o/a_lag_o and b_lead_o/b_lag_o rise DLY_PS after the
// selected taps.
module signal_selector
  import tdc_pkg::*;
#(
  parameter int unsigned N      = COARSE_TAPS,
  parameter real         DLY_PS = 1000.0
) (
  input  logic [N-2:0]         cq_i,
  input  logic [N-1:0]         start_i,
  input  logic [N-1:0]         stop_i,
  output logic [COARSE_W-1:0]  sel_o,
  output logic                 a_lead_o,
  output logic                 a_lag_o,
  output logic                 b_lead_o,
  output logic                 b_lag_o
);
  logic [N-1:0] start_d, stop_d;

  delay_stage #(.N(N), .DLY_PS(DLY_PS)) u_dly (
    .start_i (start_i),
    .stop_i  (stop_i),
    .start_o (start_d),
    .stop_o  (stop_d)
  );

  sel_generator #(.N(N-1), .W(COARSE_W)) u_sel (
    .cq_i  (cq_i),
    .sel_o (sel_o)
  );

  pair_mux #(.N(N), .W(COARSE_W), .NEXT_STAGE(1'b0)) u_mux_a (
    .start_i (start_d),
    .stop_i  (stop_d),
    .sel_i   (sel_o),
    .lead_o  (a_lead_o),
    .lag_o   (a_lag_o)
  );

  pair_mux #(.N(N), .W(COARSE_W), .NEXT_STAGE(1'b1)) u_mux_b (
    .start_i (start_d),
    .stop_i  (stop_d),
    .sel_i   (sel_o),
    .lead_o  (b_lead_o),
    .lag_o   (b_lag_o)
  );
endmodule
