`timescale 1ps/1fs
// tb_signal_selector: self-checking test of the signal selector.
// A coarse TDC model provides the taps and CQ.  For an interval T with
// n = floor(T / 10 ps): Sel must be n, MUX A's pair must be START ahead by
// r = T - 10n and rise at START + 60n + 1000 ps (no early edge while Sel is
// still moving), MUX B's pair must be ahead by 10 ps - r.
module tb_signal_selector;
  int checks = 0, failures = 0;
  logic start = 1'b0, stop = 1'b0, clr = 1'b0;
  logic [30:0] cq;
  logic [31:0] st, sp;
  logic [4:0]  sel;
  logic al, ag, bl, bg;
  realtime t_al, t_ag, t_bl, t_bg;
  int n_al;

  coarse_tdc u_src (.start_i(start), .stop_i(stop), .clr_i(clr), .cq_o(cq), .start_tap_o(st), .stop_tap_o(sp));
  signal_selector dut (.cq_i(cq), .start_i(st), .stop_i(sp), .sel_o(sel),
                       .a_lead_o(al), .a_lag_o(ag), .b_lead_o(bl), .b_lag_o(bg));

  always @(posedge al) begin t_al = $realtime; n_al++; end
  always @(posedge ag) t_ag = $realtime;
  always @(posedge bl) t_bl = $realtime;
  always @(posedge bg) t_bg = $realtime;

  function automatic bit near(real x, real y);
    return (x - y < 0.001) && (y - x < 0.001);
  endfunction

  task automatic run(real t);
    int n;
    real r;
    realtime t0;
    #4000 clr = 1'b1;
    #100 clr = 1'b0;
    #100;
    n_al = 0;
    t0 = $realtime;
    start = 1'b1;
    #(t) stop = 1'b1;
    #5000;
    n = int'($floor(t / 10.0));
    if (n > 30) n = 30;
    r = t - 10.0 * n;
    checks += 5;
    if (int'(sel) != n) begin failures++; $display("FAIL T=%f sel %0d exp %0d", t, sel, n); end
    if (!near(t_ag - t_al, r)) begin failures++; $display("FAIL T=%f A interval %f exp %f", t, t_ag - t_al, r); end
    if (!near(t_bg - t_bl, 10.0 - r)) begin failures++; $display("FAIL T=%f B interval %f exp %f", t, t_bg - t_bl, 10.0 - r); end
    if (!near(t_al - t0, 60.0 * n + 1000.0)) begin failures++; $display("FAIL T=%f A edge time %f", t, t_al - t0); end
    if (n_al != 1) begin failures++; $display("FAIL T=%f A lead rose %0d times", t, n_al); end
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
    run(0.5); run(9.625); run(10.3); run(305.7); run(309.99);
    for (int t = 0; t < 60; t++) run(0.003 + real'($urandom % 31000) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
