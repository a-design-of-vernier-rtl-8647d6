`timescale 1ps/1fs
// tb_two_stage_ta: self-checking test of the 2-stage amplifier model.
// START ahead of STOP by d must give START2 ahead of STOP2 by 40 * d
// (Type-I 20 x Type-II 2); beyond the Type-I range (20 ps) the output clips
// at 800 ps.  START2 must follow the later input after two base delays plus
// the Type-I output interval (Type-II waits for its later input).
module tb_two_stage_ta;
  int checks = 0, failures = 0;
  logic st = 1'b0, sp = 1'b0, st2, sp2;
  realtime t_st2, t_sp2;

  two_stage_ta dut (.start_i(st), .stop_i(sp), .start2_o(st2), .stop2_o(sp2));

  always @(posedge st2) t_st2 = $realtime;
  always @(posedge sp2) t_sp2 = $realtime;

  task automatic run(real d);
    real exp, got, el;
    realtime tl;
    #3000;
    if (d > 0.0) begin st = 1'b1; #(d) sp = 1'b1; end
    else if (d < 0.0) begin sp = 1'b1; #(-d) st = 1'b1; end
    else begin st = 1'b1; sp = 1'b1; end
    tl = $realtime;
    #4000;
    exp = 40.0 * (d > 20.0 ? 20.0 : (d < -20.0 ? -20.0 : d));
    got = t_sp2 - t_st2;
    checks++;
    if (got - exp > 0.01 || exp - got > 0.01) begin failures++; $display("FAIL d=%f got %f exp %f", d, got, exp); end
    if (d >= 0.0) begin
      checks++;
      el = 200.0 + 20.0 * (d > 20.0 ? 20.0 : d);
      if ((t_st2 - tl) - el > 0.01 || el - (t_st2 - tl) > 0.01) begin failures++; $display("FAIL latency d=%f", d); end
    end
    st = 1'b0; sp = 1'b0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0.5); run(9.625); run(-2.0); run(30.0);
    for (int t = 0; t < 100; t++) run(real'(int'($urandom % 2400) - 200) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
