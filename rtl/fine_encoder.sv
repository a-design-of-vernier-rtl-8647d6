`timescale 1ps/1fs
// fine_encoder: encoders and subtractor of one fine TDC.
//
// The positive line's thermometer code (94 flops) is counted to 7 bits, the
// negative line's (32 flops) to 5 bits, and the negative count is subtracted
// from the positive one.  The result FOUT is the amplified interval in fine
// steps as a 7-bit two's complement number (-1 reads 1111111), saturated to
// -64..63 because a 7-bit signed bus cannot hold positive counts above 63.
// Encoders plus subtractor per fine converter, and the widths, are the
// published structure; the saturation is this design's.
//
// Purely combinational.
module fine_encoder
  import tdc_pkg::*;
#(
  parameter int unsigned POS_FF = FINE_POS_FF,
  parameter int unsigned NEG_FF = FINE_NEG_FF
) (
  input  logic [POS_FF-1:0]        fqp_i,
  input  logic [NEG_FF-1:0]        fqn_i,
  output logic signed [FOUT_W-1:0] fout_o
);
  logic [FINE_POS_W-1:0] pos;
  logic [FINE_NEG_W-1:0] neg;
  logic signed [FINE_POS_W+1:0] diff;

  therm_count #(.N(POS_FF), .W(FINE_POS_W)) u_pos (.therm_i(fqp_i), .count_o(pos));
  therm_count #(.N(NEG_FF), .W(FINE_NEG_W)) u_neg (.therm_i(fqn_i), .count_o(neg));

  localparam int signed FMAX = (1 <<< (FOUT_W - 1)) - 1;
  localparam int signed FMIN = -(1 <<< (FOUT_W - 1));

  always_comb begin
    diff = $signed({2'b00, pos}) - $signed({{(FINE_POS_W - FINE_NEG_W + 2){1'b0}}, neg});
    if (diff > (FINE_POS_W+2)'(FMAX))      fout_o = FOUT_W'(FMAX);
    else if (diff < (FINE_POS_W+2)'(FMIN)) fout_o = FOUT_W'(FMIN);
    else                                   fout_o = FOUT_W'(diff);
  end
endmodule
