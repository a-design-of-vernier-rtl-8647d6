`timescale 1ps/1fs
// vernier_delay_line: behavioural model of a pair of vernier delay lines.
//
// Behavioural model of an analog part (buffer chains); not synthesizable.
// Two chains of STAGES buffers run side by side.  The buffers of the slow
// chain take DLY_SLOW_PS, those of the fast chain DLY_FAST_PS, so an edge
// entering the slow chain ahead of an edge in the fast chain loses
// (DLY_SLOW_PS - DLY_FAST_PS) of its lead at every stage; the stage where the
// order flips measures the interval.  The 10 ps difference per stage is the
// published value; the absolute buffer delays are this model's choice, and
// the buffers are ideal transport delays (no mismatch, no rise/fall
// difference).
//
// Interface: tap k of each chain is the edge after k buffers, tap 0 is the
// input.  Both inputs must return low between conversions.
module vernier_delay_line #(
  parameter int unsigned STAGES      = 31,
  parameter real         DLY_SLOW_PS = 60.0,
  parameter real         DLY_FAST_PS = 50.0
) (
  input  logic            slow_i,
  input  logic            fast_i,
  output logic [STAGES:0] slow_tap_o,
  output logic [STAGES:0] fast_tap_o
);
  assign slow_tap_o[0] = slow_i;
  assign fast_tap_o[0] = fast_i;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    assign #(DLY_SLOW_PS) slow_tap_o[k+1] = slow_tap_o[k];
    assign #(DLY_FAST_PS) fast_tap_o[k+1] = fast_tap_o[k];
  end
endmodule
