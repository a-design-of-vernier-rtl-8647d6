`timescale 1ps/1fs
// delay_stage: behavioural model of the selector's delay stage.
//
// Behavioural model of an analog part (buffer pairs); not synthesizable.
// Every START[k]/STOP[k] tap of the coarse line passes a buffer of the same
// delay DLY_PS, so the edges reach the multiplexers only after Sel, which is
// derived from the coarse flip-flops, has settled.  The delay stage is part
// of the published selector; its value is this model's: it must exceed the
// largest input interval (320 ps) plus one stage of the fast line so that
// no selected tap rises while Sel is still counting up.  1 ns is used.
//
// Interface: N tap pairs in, the same pairs delayed out.
module delay_stage #(
  parameter int unsigned N      = 32,
  parameter real         DLY_PS = 1000.0
) (
  input  logic [N-1:0] start_i,
  input  logic [N-1:0] stop_i,
  output logic [N-1:0] start_o,
  output logic [N-1:0] stop_o
);
  for (genvar k = 0; k < N; k++) begin : g_buf
    assign #(DLY_PS) start_o[k] = start_i[k];
    assign #(DLY_PS) stop_o[k]  = stop_i[k];
  end
endmodule
