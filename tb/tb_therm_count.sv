`timescale 1ps/1fs
// tb_therm_count: self-checking test of the thermometer encoder.
// Two instances (94 -> 7 bits and 32 -> 5 bits, the fine line sizes) get
// clean thermometer codes of every length and random codes with bubbles;
// the expected value is the number of ones, saturated, counted here bit by bit.
module tb_therm_count;
  int checks = 0, failures = 0;

  logic [93:0] tp;  logic [6:0] cp;
  logic [31:0] tn;  logic [4:0] cn;

  therm_count #(.N(94), .W(7)) dut_p (.therm_i(tp), .count_o(cp));
  therm_count #(.N(32), .W(5)) dut_n (.therm_i(tn), .count_o(cn));

  function automatic int ones94(logic [93:0] v);
    int c = 0;
    for (int i = 0; i < 94; i++) if (v[i]) c++;
    return c;
  endfunction
  function automatic int ones32(logic [31:0] v);
    int c = 0;
    for (int i = 0; i < 32; i++) if (v[i]) c++;
    return c;
  endfunction

  task automatic check_p(int exp);
    checks++;
    if (int'(cp) != exp) begin failures++; $display("FAIL p: code %h got %0d exp %0d", tp, cp, exp); end
  endtask
  task automatic check_n(int exp);
    checks++;
    if (int'(cn) != exp) begin failures++; $display("FAIL n: code %h got %0d exp %0d", tn, cn, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int len = 0; len <= 94; len++) begin
      tp = '0;
      for (int i = 0; i < len; i++) tp[i] = 1'b1;
      #1 check_p(len);
    end
    for (int len = 0; len <= 32; len++) begin
      tn = '0;
      for (int i = 0; i < len; i++) tn[i] = 1'b1;
      #1 check_n(len > 31 ? 31 : len);
    end
    for (int t = 0; t < 300; t++) begin
      tp = {$urandom, $urandom, $urandom};
      tn = $urandom;
      #1;
      check_p(ones94(tp));
      check_n(ones32(tn) > 31 ? 31 : ones32(tn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
