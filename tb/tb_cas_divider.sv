`timescale 1ps/1fs
// tb_cas_divider: self-checking test of the non-restoring CAS array divider.
// Exhaustive over every 8-bit divisor with the constant dividend the
// compensator uses (32 * 2^7), plus random dividends whose upper part is
// below the divisor.  Expected quotient: integer division done here.
module tb_cas_divider;
  int checks = 0, failures = 0;
  logic [7:0] hi, dvs;
  logic [6:0] lo, q;
  logic [9:0] r;

  cas_divider #(.QW(7), .DW(8), .RW(10)) dut (
    .dividend_hi_i(hi), .dividend_lo_i(lo), .divisor_i(dvs), .quot_o(q), .rem_o(r));

  task automatic check(int hv, int lv, int dv);
    int x, exp;
    hi = 8'(hv); lo = 7'(lv); dvs = 8'(dv);
    #1;
    x   = hv * 128 + lv;
    exp = x / dv;
    checks++;
    if (int'(q) != exp) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d exp %0d", x, dv, q, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 33; d < 256; d++) check(32, 0, d);
    for (int t = 0; t < 3000; t++) begin
      int d, h;
      d = 1 + ($urandom % 255);
      h = $urandom % d;
      check(h, $urandom % 128, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
