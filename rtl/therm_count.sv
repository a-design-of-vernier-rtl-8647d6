`timescale 1ps/1fs
// therm_count: thermometer-to-binary encoder of a flip-flop bank.
//
// Counts the ones in therm_i and saturates at 2^W-1.  Counting ones rather
// than locating the single 1-to-0 edge makes a bubble in the code cost at
// most one step.  The encoders themselves are named in the published block
// diagrams; their insides are this design's.  The 94-flop positive fine line
// uses N=94, W=7; the 32-flop negative line uses N=32, W=5 (a full line of
// ones reads as 31).
//
// Purely combinational.
module therm_count #(
  parameter int unsigned N = 94,
  parameter int unsigned W = 7
) (
  input  logic [N-1:0] therm_i,
  output logic [W-1:0] count_o
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned MAXV = (1 << W) - 1;

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned k = 0; k < N; k++) ones = ones + CW'(therm_i[k]);
  end

  if (CW > W) begin : g_sat
    assign count_o = (ones > CW'(MAXV)) ? W'(MAXV) : ones[W-1:0];
  end else begin : g_wide
    assign count_o = W'(ones);
  end
endmodule
