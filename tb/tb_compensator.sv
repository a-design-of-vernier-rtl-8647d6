`timescale 1ps/1fs
// tb_compensator: self-checking test of the gain/offset compensator.
//  1. The twelve rows of the published correction table (FOUT1, FOUT2 ->
//     5-bit output) must be met within one code.
//  2. Random FOUT1/FOUT2 against a reference written with real arithmetic:
//     round(FOUT1 * floor(4096 / FSUM) / 128) - offset, clipped to 0..31,
//     with the quotient clamped to 127 when FSUM <= 32.
//  3. Offset calibration: loading FOUT1 into the offset register shifts the
//     result, saturated to -16..15.
module tb_compensator;
  int checks = 0, failures = 0;
  int n_sat = 0, n_clip = 0;

  logic clk = 1'b0, rst_n = 1'b0, cal = 1'b0;
  logic signed [6:0] f1 = '0, f2 = '0;
  logic signed [7:0] fsum;
  logic [6:0] dout;
  logic [4:0] fine;
  logic sat, clip;

  compensator dut (.clk_i(clk), .rst_ni(rst_n), .cal_load_i(cal), .fout1_i(f1), .fout2_i(f2),
                   .fsum_o(fsum), .dout_o(dout), .fine_o(fine), .sat_o(sat), .clip_o(clip));

  always #5000 clk = ~clk;

  int offset_ref = 0;

  function automatic int ref_fine(int a, int b, int off);
    int s, q;
    real p;
    int r;
    s = a + b;
    q = (s <= 32) ? 127 : 4096 / s;
    p = real'(a * q) / 128.0;
    r = int'($floor(p + 0.5)) - off;
    if (r < 0) r = 0;
    if (r > 31) r = 31;
    return r;
  endfunction

  task automatic apply(int a, int b);
    f1 = 7'(a); f2 = 7'(b);
    #100;
    if (sat) n_sat++;
    if (clip) n_clip++;
  endtask

  task automatic check_eq(int a, int b);
    int exp;
    apply(a, b);
    exp = ref_fine(a, b, offset_ref);
    checks++;
    if (int'(fine) != exp) begin
      failures++;
      $display("FAIL f1 %0d f2 %0d off %0d: got %0d exp %0d", a, b, offset_ref, fine, exp);
    end
  endtask

  // Published table: FTDC1, FTDC2, output.
  int tab [12][3] = '{'{-1, 43, 0}, '{2, 37, 2}, '{6, 32, 5}, '{9, 28, 8}, '{12, 24, 10},
                      '{16, 20, 13}, '{19, 17, 16}, '{23, 14, 19}, '{26, 10, 22},
                      '{31, 7, 25}, '{35, 4, 28}, '{40, 1, 31}};

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000 rst_n = 1'b1;
    // 1. Published rows, offset zero after reset.
    for (int i = 0; i < 12; i++) begin
      apply(tab[i][0], tab[i][1]);
      checks++;
      if (int'(fine) < tab[i][2] - 1 || int'(fine) > tab[i][2] + 1) begin
        failures++;
        $display("FAIL table row %0d: got %0d table %0d", i, fine, tab[i][2]);
      end
      checks++;
      if (int'(fsum) != tab[i][0] + tab[i][1]) begin failures++; $display("FAIL fsum row %0d", i); end
    end
    // 2. Random codes around the nominal gain and outside it.
    for (int t = 0; t < 2000; t++) begin
      int g, a, b;
      g = 20 + ($urandom % 60);           // FSUM target
      a = -4 + int'($urandom % (g + 6));
      b = g - a;
      if (b > 63) b = 63;
      if (a > 63) a = 63;
      check_eq(a, b);
    end
    // DOUT itself for every FSUM above 32.
    for (int s = 33; s <= 126; s++) begin
      apply(s / 2, s - s / 2);
      checks++;
      if (int'(dout) != 4096 / s) begin failures++; $display("FAIL dout fsum %0d: %0d", s, dout); end
    end
    // 3. Offset calibration.
    begin
      int cal_vals [4] = '{-3, 2, 20, -30};
      foreach (cal_vals[k]) begin
        @(negedge clk);
        f1 = 7'(cal_vals[k]); f2 = 7'(40);
        cal = 1'b1;
        @(negedge clk);
        cal = 1'b0;
        offset_ref = cal_vals[k] > 15 ? 15 : (cal_vals[k] < -16 ? -16 : cal_vals[k]);
        for (int t = 0; t < 100; t++) check_eq(int'($urandom % 45) - 2, 36 + int'($urandom % 6));
      end
    end
    checks++;
    if (n_sat == 0 || n_clip == 0) begin
      failures++;
      $display("FAIL saturation/clip never seen: sat %0d clip %0d", n_sat, n_clip);
    end
    $display("saturated quotients %0d, clipped results %0d", n_sat, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
