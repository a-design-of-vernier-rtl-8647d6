`timescale 1ps/1fs
// tb_coarse_tdc: self-checking test of the 5-bit vernier coarse TDC.
// For intervals across 0..320 ps (and a few negative ones) the thermometer
// code must hold exactly ceil(T / 10 ps) ones (capped at 31, none for
// T <= 0), and the STOP tap must lag the START tap of the same stage by
// T - k * 10 ps.
module tb_coarse_tdc;
  int checks = 0, failures = 0;
  logic start = 1'b0, stop = 1'b0, clr = 1'b0;
  logic [30:0] cq;
  logic [31:0] st, sp;
  realtime ts [32], tp [32];

  coarse_tdc dut (.start_i(start), .stop_i(stop), .clr_i(clr), .cq_o(cq), .start_tap_o(st), .stop_tap_o(sp));

  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge st[k]) ts[k] = $realtime;
    always @(posedge sp[k]) tp[k] = $realtime;
  end

  function automatic int ones(logic [30:0] v);
    int c = 0;
    for (int i = 0; i < 31; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic measure(real tin);
    int exp;
    #3000 clr = 1'b1;
    #100 clr = 1'b0;
    #100;
    if (tin >= 0.0) begin
      start = 1'b1; #(tin) stop = 1'b1;
    end else begin
      stop = 1'b1; #(-tin) start = 1'b1;
    end
    #4000;
    exp = (tin <= 0.0) ? 0 : int'($ceil(tin / 10.0));
    if (exp > 31) exp = 31;
    checks++;
    if (ones(cq) != exp) begin failures++; $display("FAIL T=%f ones %0d exp %0d", tin, ones(cq), exp); end
    checks++;
    if (cq != 31'((64'(1) << exp) - 1)) begin failures++; $display("FAIL T=%f code not a thermometer %b", tin, cq); end
    for (int k = 0; k < 32; k++) begin
      real d;
      d = (tp[k] - ts[k]) - (tin - 10.0 * k);
      checks++;
      if (d > 0.001 || d < -0.001) begin failures++; $display("FAIL T=%f tap %0d", tin, k); end
    end
    start = 1'b0; stop = 1'b0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(-3.0);
    measure(0.4);
    measure(9.9);
    measure(10.1);
    measure(315.0);
    for (int t = 0; t < 60; t++) measure(0.003 + real'($urandom % 32000) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
