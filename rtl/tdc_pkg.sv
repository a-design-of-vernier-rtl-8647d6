`timescale 1ps/1fs
// tdc_pkg: widths and counts shared by the vernier coarse-fine TDC.
//
// The coarse converter has 31 vernier stages sampled by 31 flip-flops
// (5-bit code).  Each fine converter has a positive vernier line of 94
// flip-flops (7-bit code) and a negative line of 32 flip-flops (5-bit code).
// The compensator works on 7-bit signed fine codes, an 8-bit sum, a 7-bit
// quotient, a 14-bit product and produces a 5-bit fine result, so the full
// result is 10 bits.  All of these numbers are the published ones.  The
// divisor width (8 bits) and the remainder width (9 bits) of the array
// divider follow from dividing by the 8-bit sum and are this design's.
package tdc_pkg;
  localparam int unsigned COARSE_FF   = 31;  // CQ[30:0]
  localparam int unsigned COARSE_TAPS = 32;  // START/STOP[0..31], tap 31 is the line output
  localparam int unsigned COARSE_W    = 5;
  localparam int unsigned FINE_POS_FF = 94;  // FQP[93:0]
  localparam int unsigned FINE_NEG_FF = 32;  // FQN[31:0]
  localparam int unsigned FINE_POS_W  = 7;
  localparam int unsigned FINE_NEG_W  = 5;
  localparam int unsigned FOUT_W      = 7;   // signed fine code
  localparam int unsigned FSUM_W      = 8;   // signed FOUT1 + FOUT2
  localparam int unsigned DOUT_W      = 7;   // quotient of the CAS array
  localparam int unsigned PROD_W      = 14;  // FOUT1 x DOUT
  localparam int unsigned FINE_W      = 5;   // corrected fine result
  localparam int unsigned OFFSET_REG_W = 8;  // offset register
  localparam int unsigned CODE_W      = COARSE_W + FINE_W;
  // Ideal number of fine codes per coarse step (ideal amplifier gain).
  localparam int unsigned CODES_PER_COARSE = 32;
  // Fixed-point scale of the quotient: DOUT = CODES_PER_COARSE * 2^DOUT_FRAC / FSUM.
  localparam int unsigned DOUT_FRAC   = 7;
endpackage
