`timescale 1ps/1fs
// tb_fine_tdc: self-checking test of the fine TDC model.
// For an interval T (START ahead for T > 0) the positive code must hold
// floor(T / 10 ps) ones (capped at 94), the negative code ceil(-T / 10 ps)
// ones (capped at 32), and both must be thermometer codes.
module tb_fine_tdc;
  int checks = 0, failures = 0;
  logic st = 1'b0, sp = 1'b0, clr = 1'b0;
  logic [93:0] fqp;
  logic [31:0] fqn;

  fine_tdc dut (.start_i(st), .stop_i(sp), .clr_i(clr), .fqp_o(fqp), .fqn_o(fqn));

  function automatic int ones94(logic [93:0] v);
    int c = 0;
    for (int i = 0; i < 94; i++) c += int'(v[i]);
    return c;
  endfunction
  function automatic int ones32(logic [31:0] v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic run(real t);
    int ep, en;
    #2000 clr = 1'b1;
    #100 clr = 1'b0;
    #100;
    if (t >= 0.0) begin st = 1'b1; #(t) sp = 1'b1; end
    else begin sp = 1'b1; #(-t) st = 1'b1; end
    #8000;
    ep = (t > 0.0) ? int'($floor(t / 10.0)) : 0;
    en = (t < 0.0) ? int'($ceil(-t / 10.0)) : 0;
    if (ep > 94) ep = 94;
    if (en > 32) en = 32;
    checks += 4;
    if (ones94(fqp) != ep) begin failures++; $display("FAIL T=%f pos %0d exp %0d", t, ones94(fqp), ep); end
    if (ones32(fqn) != en) begin failures++; $display("FAIL T=%f neg %0d exp %0d", t, ones32(fqn), en); end
    if (fqp != 94'((128'(1) << ep) - 1)) begin failures++; $display("FAIL T=%f pos not thermometer", t); end
    if (fqn != 32'((64'(1) << en) - 1)) begin failures++; $display("FAIL T=%f neg not thermometer", t); end
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
    run(5.0); run(-5.0); run(-12.5); run(385.003); run(1000.0); run(-400.0);
    for (int t = 0; t < 80; t++) run(0.003 + real'(int'($urandom % 130000) - 30000) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
