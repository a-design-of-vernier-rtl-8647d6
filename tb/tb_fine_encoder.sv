`timescale 1ps/1fs
// tb_fine_encoder: self-checking test of one fine TDC's encoders and
// subtractor.  Thermometer codes of length p (0..94) and n (0..32) must give
// FOUT = p - min(n, 31), saturated to the 7-bit signed range.
module tb_fine_encoder;
  int checks = 0, failures = 0;
  logic [93:0] fqp;
  logic [31:0] fqn;
  logic signed [6:0] fout;

  fine_encoder dut (.fqp_i(fqp), .fqn_i(fqn), .fout_o(fout));

  task automatic check(int p, int n);
    int exp;
    fqp = '0; fqn = '0;
    for (int i = 0; i < p; i++) fqp[i] = 1'b1;
    for (int i = 0; i < n; i++) fqn[i] = 1'b1;
    #1;
    exp = p - (n > 31 ? 31 : n);
    if (exp > 63) exp = 63;
    if (exp < -64) exp = -64;
    checks++;
    if (int'(fout) != exp) begin
      failures++;
      $display("FAIL p %0d n %0d: got %0d exp %0d", p, n, fout, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 1);                 // zero-input code of the correction table: 1111111 = -1
    check(43, 0);
    for (int p = 0; p <= 94; p++) check(p, 0);
    for (int n = 0; n <= 32; n++) check(0, n);
    for (int t = 0; t < 300; t++) check($urandom % 95, $urandom % 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
