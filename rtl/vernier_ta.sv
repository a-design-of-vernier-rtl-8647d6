`timescale 1ps/1fs
// vernier_ta: behavioural model of one vernier time amplifier stage.
//
// Behavioural model of an analog part; not synthesizable.  When both inputs
// have risen, the model waits T0_PS after the later one and then raises the
// output that belongs to the earlier input; the other output follows
// GAIN * (input interval) later.  The input interval is clipped to
// +-RANGE_PS first, which stands for the limited input range of a real
// amplifier.  OFFSET_PS is added to the input interval and stands for the
// amplifier's offset, which the compensator calibrates out.
// Both outputs fall T0_PS after both inputs are low again.
// If one input rises and falls again before the other rises, that edge is
// dropped and the model waits for a new pair.
// A Type-I stage (gain about 20, small range) and a Type-II stage (gain
// about 2, larger range) are the published amplifiers; the linear transfer
// with clipping, the base delay and the polarity (AO follows A) are this
// model's.
//
// Interface: a_i/b_i rising edges in, ao_o/bo_o rising edges out.  Inputs
// must return low between conversions.
module vernier_ta #(
  parameter real GAIN     = 20.0,
  parameter real RANGE_PS = 20.0,
  parameter real T0_PS    = 100.0,
  parameter real OFFSET_PS = 0.0
) (
  input  logic a_i,
  input  logic b_i,
  output logic ao_o,
  output logic bo_o
);
  realtime t_a, t_b;
  real     d_in, d_out;
  logic    a_first;

  initial begin
    ao_o = 1'b0;
    bo_o = 1'b0;
    forever begin
      wait (!a_i && !b_i);
      @(posedge a_i or posedge b_i);
      t_a = $realtime;
      t_b = $realtime;
      if (!(a_i && b_i)) begin
        // Wait for the second edge; re-arm if the first input drops first.
        a_first = a_i;
        wait ((a_i && b_i) || (!a_i && !b_i));
        if (!(a_i && b_i)) continue;
        if (a_first) t_b = $realtime;
        else         t_a = $realtime;
      end
      d_in = t_b - t_a + OFFSET_PS;           // > 0: A came first
      if (d_in >  RANGE_PS) d_in =  RANGE_PS;
      if (d_in < -RANGE_PS) d_in = -RANGE_PS;
      d_out = GAIN * d_in;
      #(T0_PS);
      // A zero interval raises both outputs at once: no #0 delay is used.
      if (d_out > 0.0) begin
        ao_o = 1'b1;
        #(d_out) bo_o = 1'b1;
      end else if (d_out < 0.0) begin
        bo_o = 1'b1;
        #(-d_out) ao_o = 1'b1;
      end else begin
        ao_o = 1'b1;
        bo_o = 1'b1;
      end
      wait (!a_i && !b_i);
      #(T0_PS);
      ao_o = 1'b0;
      bo_o = 1'b0;
    end
  end
endmodule
