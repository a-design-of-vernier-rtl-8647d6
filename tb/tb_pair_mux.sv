`timescale 1ps/1fs
// tb_pair_mux: self-checking test of the two selector multiplexers.
// MUX A must pass (START[sel], STOP[sel]); MUX B (STOP[sel+1], START[sel+1]).
module tb_pair_mux;
  int checks = 0, failures = 0;
  logic [31:0] st, sp;
  logic [4:0]  sel;
  logic a_lead, a_lag, b_lead, b_lag;

  pair_mux #(.N(32), .W(5), .NEXT_STAGE(1'b0)) dut_a (.start_i(st), .stop_i(sp), .sel_i(sel), .lead_o(a_lead), .lag_o(a_lag));
  pair_mux #(.N(32), .W(5), .NEXT_STAGE(1'b1)) dut_b (.start_i(st), .stop_i(sp), .sel_i(sel), .lead_o(b_lead), .lag_o(b_lag));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int s;
      s  = (t < 31) ? t : int'($urandom % 31);
      st = $urandom;
      sp = $urandom;
      sel = 5'(s);
      #1;
      checks += 4;
      if (a_lead !== st[s])   begin failures++; $display("FAIL a_lead sel %0d", s); end
      if (a_lag  !== sp[s])   begin failures++; $display("FAIL a_lag sel %0d", s); end
      if (b_lead !== sp[s+1]) begin failures++; $display("FAIL b_lead sel %0d", s); end
      if (b_lag  !== st[s+1]) begin failures++; $display("FAIL b_lag sel %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
