`timescale 1ps/1fs
// tb_vernier_delay_line: self-checking test of the vernier line model.
// Launches an edge into each chain and records when every tap rises; tap k
// must rise k * 60 ps (slow) and k * 50 ps (fast) after its input, so the
// lead shrinks by 10 ps per stage.  Falling edges must propagate too.
module tb_vernier_delay_line;
  int checks = 0, failures = 0;
  localparam int S = 31;
  logic slow = 1'b0, fast = 1'b0;
  logic [S:0] st, ft;
  realtime ts [S+1], tf [S+1];
  realtime t0;

  vernier_delay_line #(.STAGES(S)) dut (.slow_i(slow), .fast_i(fast), .slow_tap_o(st), .fast_tap_o(ft));

  for (genvar k = 0; k <= S; k++) begin : g_mon
    always @(posedge st[k]) ts[k] = $realtime;
    always @(posedge ft[k]) tf[k] = $realtime;
  end

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5; t++) begin
      realtime lead;
      lead = 7.5 + 63.25 * t;
      #5000;
      t0 = $realtime;
      slow = 1'b1;
      #(lead) fast = 1'b1;
      #5000;
      for (int k = 0; k <= S; k++) begin
        checks += 3;
        if (!near(ts[k] - t0, 60.0 * k)) begin failures++; $display("FAIL slow tap %0d at %f", k, ts[k] - t0); end
        if (!near(tf[k] - t0, lead + 50.0 * k)) begin failures++; $display("FAIL fast tap %0d at %f", k, tf[k] - t0); end
        if (!near(tf[k] - ts[k], lead - 10.0 * k)) begin failures++; $display("FAIL lead at tap %0d", k); end
      end
      slow = 1'b0; fast = 1'b0;
      #5000;
      checks++;
      if (st !== '0 || ft !== '0) begin failures++; $display("FAIL lines did not return low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
