`timescale 1ps/1fs
// tdc_readout: synchronous back end of the coarse-fine TDC.
//
// After a conversion the flip-flop banks of the analog front end hold a
// coarse thermometer code CQ and, for each of the two fine converters, a
// positive (FQP) and a negative (FQN) thermometer code.  A one-cycle pulse
// on sample_i captures all of them.  In the next cycle the coarse code is
// encoded to the stage index n (5 bits), the fine codes to FOUT1/FOUT2, the
// compensator corrects the gain, and code_o = n * 32 + fine is registered
// with a one-cycle valid_o pulse.  If cal_i was high at the sample pulse
// (the same edge applied to START and STOP), no code is produced; instead
// FOUT1 is stored as the offset.
//
// The encoders and the compensator, and the 10-bit result made of a 5-bit
// coarse and a 5-bit fine part, are the published design.  The capture
// registers, the strobe, the calibration control and the two-cycle latency
// are this design's.
//
// Timing: sample_i in cycle 0 -> valid_o and code_o in cycle 2.  Inputs
// must be stable when sample_i is high (the analog side has settled).
// The compensator's intermediate FSUM and DOUT are left unconnected here;
// only the final code and the sat/clip flags leave this block.
module tdc_readout
  import tdc_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   sample_i,
  input  logic                   cal_i,
  input  logic [COARSE_FF-1:0]   cq_i,
  input  logic [FINE_POS_FF-1:0] fqp1_i,
  input  logic [FINE_NEG_FF-1:0] fqn1_i,
  input  logic [FINE_POS_FF-1:0] fqp2_i,
  input  logic [FINE_NEG_FF-1:0] fqn2_i,
  output logic [CODE_W-1:0]      code_o,
  output logic                   valid_o,
  output logic                   sat_o,
  output logic                   clip_o
);
  typedef struct packed {
    logic [COARSE_FF-1:0]   cq;
    logic [FINE_POS_FF-1:0] fqp1;
    logic [FINE_NEG_FF-1:0] fqn1;
    logic [FINE_POS_FF-1:0] fqp2;
    logic [FINE_NEG_FF-1:0] fqn2;
  } raw_t;

  raw_t raw_q;
  logic cap_q, cal_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      raw_q <= '0;
      cap_q <= 1'b0;
      cal_q <= 1'b0;
    end else begin
      cap_q <= sample_i;
      if (sample_i) begin
        raw_q <= '{cq: cq_i, fqp1: fqp1_i, fqn1: fqn1_i, fqp2: fqp2_i, fqn2: fqn2_i};
        cal_q <= cal_i;
      end
    end
  end

  logic [COARSE_W-1:0]       coarse;
  logic signed [FOUT_W-1:0]  fout1, fout2;
  logic signed [FSUM_W-1:0]  fsum;
  logic [DOUT_W-1:0]         dout;
  logic [FINE_W-1:0]         fine;
  logic                      sat, clip;

  sel_generator #(.N(COARSE_FF), .W(COARSE_W)) u_coarse_enc (
    .cq_i  (raw_q.cq),
    .sel_o (coarse)
  );

  fine_encoder u_enc1 (.fqp_i(raw_q.fqp1), .fqn_i(raw_q.fqn1), .fout_o(fout1));
  fine_encoder u_enc2 (.fqp_i(raw_q.fqp2), .fqn_i(raw_q.fqn2), .fout_o(fout2));

  compensator u_comp (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .cal_load_i (cap_q & cal_q),
    .fout1_i    (fout1),
    .fout2_i    (fout2),
    .fsum_o     (fsum),
    .dout_o     (dout),
    .fine_o     (fine),
    .sat_o      (sat),
    .clip_o     (clip)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      code_o  <= '0;
      valid_o <= 1'b0;
      sat_o   <= 1'b0;
      clip_o  <= 1'b0;
    end else begin
      valid_o <= cap_q & ~cal_q;
      if (cap_q & ~cal_q) begin
        code_o <= {coarse, fine};
        sat_o  <= sat;
        clip_o <= clip;
      end
    end
  end
endmodule
