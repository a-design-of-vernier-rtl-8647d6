`timescale 1ps/1fs
// pair_mux: picks one START/STOP tap pair of the coarse line (MUX A / MUX B).
//
// With NEXT_STAGE = 0 (MUX A) the outputs are lead_o = START[sel],
// lag_o = STOP[sel]: the residue of the coarse conversion, START ahead by
// less than one step.  With NEXT_STAGE = 1 (MUX B) the outputs are
// lead_o = STOP[sel+1], lag_o = START[sel+1]: one stage later STOP is ahead
// by one step minus the residue, and exchanging the pair makes that interval
// positive too.  The sum of the two amplified intervals is one coarse step
// times the amplifier gain, which the compensator uses to measure the gain.
// Two multiplexers fed from a common delay stage follow the published
// selector; what MUX B selects is this design's reading of the published
// fine-code table.
//
// Combinational: an edge on a selected tap appears at the outputs after the
// gate delay only (none in this model).  sel_i must be stable before the
// selected taps rise; the delay stage in front guarantees that.
module pair_mux #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 5,
  parameter bit          NEXT_STAGE = 1'b0
) (
  input  logic [N-1:0] start_i,
  input  logic [N-1:0] stop_i,
  input  logic [W-1:0] sel_i,
  output logic         lead_o,
  output logic         lag_o
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [W:0]    sum;
  logic [IW-1:0] idx;

  always_comb begin
    sum = {1'b0, sel_i} + (W+1)'(NEXT_STAGE);
    idx = (sum >= (W+1)'(N)) ? IW'(N - 1) : IW'(sum);
  end

  if (NEXT_STAGE) begin : g_b
    assign lead_o = stop_i[idx];
    assign lag_o  = start_i[idx];
  end else begin : g_a
    assign lead_o = start_i[idx];
    assign lag_o  = stop_i[idx];
  end
endmodule
