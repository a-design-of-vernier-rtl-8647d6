`timescale 1ps/1fs
// compensator: gain and offset correction of the fine conversion.
//
// The time amplifier's gain is never exactly the ideal 32.  Fine TDC 1
// measures the amplified residue (FOUT1 = G*r/step), fine TDC 2 the
// amplified complement (FOUT2 = G*(T-r)/step, T = one coarse step), so
// FSUM = FOUT1 + FOUT2 is the gain expressed in fine codes per coarse step.
// The corrected fine code is FOUT1 * 32 / FSUM:
//
//   FSUM  = FOUT1 + FOUT2                       (8-bit signed adder)
//   DOUT  = floor(32 * 2^7 / FSUM)              (7-bit, CAS array divider)
//   PROD  = FOUT1 * DOUT                        (14-bit signed multiplier)
//   RND   = (PROD >>> 7) + PROD[6]              (shifter, round off)
//   FINE  = clip(RND - OFFSET, 0, 31)           (5-bit result)
//
// OFFSET comes from an 8-bit register that captures FOUT1 while the same
// edge is applied to START and STOP (cal_load_i), and is saturated to a
// 5-bit signed value before it is subtracted.  This chain (adder, divider,
// multiplier, shifter, round off, register, shifter, subtractor) and its
// bus widths are the published ones.  This design's own choices: the
// constant numerator with FSUM as divisor (the published correction table
// fits FOUT1*32/FSUM), DOUT clamped to 127 when FSUM <= 32 (sat_o), signed
// intermediates, the final clip to 0..31 (clip_o), and an offset that is
// zero after reset.
//
// Timing: combinational from fout1_i/fout2_i to fine_o; the offset register
// loads on the rising clk_i edge when cal_load_i is high.
module compensator
  import tdc_pkg::*;
(
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      cal_load_i,
  input  logic signed [FOUT_W-1:0]  fout1_i,
  input  logic signed [FOUT_W-1:0]  fout2_i,
  output logic signed [FSUM_W-1:0]  fsum_o,
  output logic [DOUT_W-1:0]         dout_o,
  output logic [FINE_W-1:0]         fine_o,
  output logic                      sat_o,
  output logic                      clip_o
);
  localparam int unsigned RW     = FSUM_W + 2;
  localparam int signed   OFFMAX = (1 <<< (FINE_W - 1)) - 1;
  localparam int signed   OFFMIN = -(1 <<< (FINE_W - 1));
  localparam int signed   FINMAX = (1 << FINE_W) - 1;

  // Adder.
  assign fsum_o = FSUM_W'(fout1_i) + FSUM_W'(fout2_i);

  // Divider: numerator CODES_PER_COARSE * 2^DOUT_FRAC, divisor FSUM.  The
  // quotient fits DOUT_W bits only when FSUM > CODES_PER_COARSE.
  logic [DOUT_W-1:0] quot;
  logic [RW-1:0]     rem_unused;

  cas_divider #(.QW(DOUT_W), .DW(FSUM_W), .RW(RW)) u_div (
    .dividend_hi_i (FSUM_W'(CODES_PER_COARSE)),
    .dividend_lo_i ('0),
    .divisor_i     (fsum_o),
    .quot_o        (quot),
    .rem_o         (rem_unused)
  );

  assign sat_o  = (fsum_o <= $signed(FSUM_W'(CODES_PER_COARSE)));
  assign dout_o = sat_o ? '1 : quot;

  // Multiplier, shifter and round off.
  logic signed [PROD_W-1:0] prod;
  logic signed [FOUT_W:0]   shifted;
  logic signed [FOUT_W+1:0] rounded;

  assign prod    = PROD_W'(fout1_i * $signed({1'b0, dout_o}));
  assign shifted = (FOUT_W+1)'(prod >>> DOUT_FRAC);
  assign rounded = (FOUT_W+2)'(shifted) + (FOUT_W+2)'(prod[DOUT_FRAC-1]);

  // Offset register and its shifter (saturate to FINE_W signed bits).
  logic signed [OFFSET_REG_W-1:0] off_q;
  logic signed [FINE_W-1:0]       off;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)         off_q <= '0;
    else if (cal_load_i) off_q <= OFFSET_REG_W'(fout1_i);
  end

  always_comb begin
    if (off_q > OFFSET_REG_W'(OFFMAX))      off = FINE_W'(OFFMAX);
    else if (off_q < OFFSET_REG_W'(OFFMIN)) off = FINE_W'(OFFMIN);
    else                                    off = FINE_W'(off_q);
  end

  // Offset subtraction and clip to the 5-bit output range.
  logic signed [FOUT_W+2:0] corr;

  always_comb begin
    corr   = (FOUT_W+3)'(rounded) - (FOUT_W+3)'(off);
    clip_o = 1'b0;
    if (corr < 0) begin
      fine_o = '0;
      clip_o = 1'b1;
    end else if (corr > (FOUT_W+3)'(FINMAX)) begin
      fine_o = '1;
      clip_o = 1'b1;
    end else begin
      fine_o = FINE_W'(corr);
    end
  end
endmodule
