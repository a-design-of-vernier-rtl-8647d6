`timescale 1ps/1fs
// vernier_sampler: the flip-flop bank of a vernier delay line.
//
// One flip-flop per tap pair.  Flop k is clocked by tap k of the line that
// carries the lagging edge and samples tap k of the line that carries the
// leading edge, so q_o[k] = 1 means the leading edge was still ahead at that
// stage.  Along the line the ones form a thermometer code whose length is the
// measured interval in vernier steps.  Arbiter flops between the two lines
// are the published structure (coarse F/F CQ[n], fine F/F FQP[n]/FQN[n]);
// which pin is D and which is the clock, and the asynchronous clear that
// empties the bank before each conversion, are this design's choices.
//
// Timing: each bit changes only on a rising edge of its own ck_i bit, or
// goes to 0 while clr_i is high.  Every bit is a separate clock domain; the
// read-out samples q_o only after all edges have passed.
module vernier_sampler #(
  parameter int unsigned N = 31
) (
  input  logic         clr_i,
  input  logic [N-1:0] d_i,
  input  logic [N-1:0] ck_i,
  output logic [N-1:0] q_o
);
  for (genvar k = 0; k < N; k++) begin : g_ff
    logic q;
    always_ff @(posedge ck_i[k] or posedge clr_i) begin
      if (clr_i) q <= 1'b0;
      else       q <= d_i[k];
    end
    assign q_o[k] = q;
  end
endmodule
