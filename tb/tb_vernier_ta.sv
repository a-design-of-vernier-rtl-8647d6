`timescale 1ps/1fs
// tb_vernier_ta: self-checking test of the time amplifier stage model.
// For random input intervals of both signs the output interval must be
// GAIN times the input (clipped to the input range), with the output of the
// earlier input first, T0 after the later input; the offset instance must
// add its offset to the input interval.
module tb_vernier_ta;
  int checks = 0, failures = 0;
  logic a = 1'b0, b = 1'b0;
  logic ao, bo, ao2, bo2;
  realtime tao, tbo, tao2, tbo2;

  vernier_ta #(.GAIN(20.0), .RANGE_PS(20.0), .T0_PS(100.0)) dut (.a_i(a), .b_i(b), .ao_o(ao), .bo_o(bo));
  vernier_ta #(.GAIN(2.0), .RANGE_PS(400.0), .T0_PS(50.0), .OFFSET_PS(1.5)) dut2 (.a_i(a), .b_i(b), .ao_o(ao2), .bo_o(bo2));

  always @(posedge ao)  tao  = $realtime;
  always @(posedge bo)  tbo  = $realtime;
  always @(posedge ao2) tao2 = $realtime;
  always @(posedge bo2) tbo2 = $realtime;

  function automatic bit near(real x, real y);
    return (x - y < 0.01) && (y - x < 0.01);
  endfunction

  task automatic run(real d);                 // d > 0: a first
    realtime t_late;
    real din, exp;
    #2000;
    if (d > 0.0) begin a = 1'b1; #(d) b = 1'b1; end
    else if (d < 0.0) begin b = 1'b1; #(-d) a = 1'b1; end
    else begin a = 1'b1; b = 1'b1; end
    t_late = $realtime;
    #3000;
    din = d > 20.0 ? 20.0 : (d < -20.0 ? -20.0 : d);
    exp = 20.0 * din;
    checks += 2;
    if (!near(tbo - tao, exp)) begin failures++; $display("FAIL d=%f out %f exp %f", d, tbo - tao, exp); end
    if (!near((d >= 0.0 ? tao : tbo) - t_late, 100.0)) begin failures++; $display("FAIL base delay d=%f", d); end
    checks++;
    if (!near(tbo2 - tao2, 2.0 * (d + 1.5))) begin failures++; $display("FAIL offset d=%f", d); end
    a = 1'b0; b = 1'b0;
    #1000;
    checks++;
    if (ao || bo) begin failures++; $display("FAIL outputs did not return low"); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0.0);
    run(3.0);
    run(-3.0);
    run(25.0);
    run(-40.0);
    for (int t = 0; t < 100; t++) run(real'(int'($urandom % 4000) - 2000) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
