`timescale 1ps/1fs
// tb_vernier_tdc_top: end-to-end test of the coarse-fine TDC.
//
// Four converters run side by side on the same START/STOP edges:
//   u0  nominal amplifier (gain 20 x 2 = 40, no offset)
//   u1  low gain 36 with +0.5 ps offset in the residue amplifier
//   u2  high gain 44 with -0.45 ps offset in the residue amplifier
//   u3  gain 30, below the divider's range (quotient saturates)
// Each conversion's 10-bit code is compared with the ideal code
// T / (10 ps / 32), within +-3 codes (fine-line quantisation, rounding and
// the 7-bit quotient); u3 within +-5 codes, as its gain is below the range
// the divider covers.  u1 and u2 are checked after offset calibration
// (START = STOP with cal high): the stored offset, the shift of the mean
// error and the remaining mean error (within 1.5 codes) are checked.  A negative interval must read 0 with the clip flag.
// Mechanisms counted (each must occur): coarse codes, quotient saturation,
// result clipping, calibration, negative fine codes, gain correction
// (u1/u2 within tolerance although their gain is not 32 codes per step).
module tb_vernier_tdc_top;
  int checks = 0, failures = 0;
  localparam int NI = 4;

  logic start = 1'b0, stop = 1'b0, clr = 1'b0, clk = 1'b0, rst_n = 1'b0, sample = 1'b0, cal = 1'b0;
  logic [4:0] sel   [NI];
  logic [9:0] code  [NI];
  logic       valid [NI], sat [NI], clip [NI];

  vernier_tdc_top #(.GAIN1(20.0)) u0 (.start_i(start), .stop_i(stop), .clr_i(clr), .clk_i(clk), .rst_ni(rst_n),
    .sample_i(sample), .cal_i(cal), .sel_o(sel[0]), .code_o(code[0]), .valid_o(valid[0]), .sat_o(sat[0]), .clip_o(clip[0]));
  vernier_tdc_top #(.GAIN1(18.0), .OFFSET_A_PS(0.5)) u1 (.start_i(start), .stop_i(stop), .clr_i(clr), .clk_i(clk), .rst_ni(rst_n),
    .sample_i(sample), .cal_i(cal), .sel_o(sel[1]), .code_o(code[1]), .valid_o(valid[1]), .sat_o(sat[1]), .clip_o(clip[1]));
  vernier_tdc_top #(.GAIN1(22.0), .OFFSET_A_PS(-0.45)) u2 (.start_i(start), .stop_i(stop), .clr_i(clr), .clk_i(clk), .rst_ni(rst_n),
    .sample_i(sample), .cal_i(cal), .sel_o(sel[2]), .code_o(code[2]), .valid_o(valid[2]), .sat_o(sat[2]), .clip_o(clip[2]));
  vernier_tdc_top #(.GAIN1(15.0)) u3 (.start_i(start), .stop_i(stop), .clr_i(clr), .clk_i(clk), .rst_ni(rst_n),
    .sample_i(sample), .cal_i(cal), .sel_o(sel[3]), .code_o(code[3]), .valid_o(valid[3]), .sat_o(sat[3]), .clip_o(clip[3]));

  always #5000 clk = ~clk;

  int  n_sat = 0, n_clip = 0, n_cal = 0, n_neg = 0, n_conv = 0;
  bit  coarse_seen [32];
  real err_before [NI], err_after [NI];
  int  cnt_before = 0, cnt_after = 0;

  // negative fine codes seen inside u0 (STOP ahead at the fine TDC input)
  always @(posedge clk) if (u0.u_readout.sample_i && u0.fqn1 != '0) n_neg++;

  // One conversion of interval t (ps).  is_cal: calibration sample.
  task automatic convert(real t, bit is_cal, bit check_offset_units);
    int lat;
    #2000 clr = 1'b1;
    #1000 clr = 1'b0;
    #1000;
    if (t > 0.0) begin start = 1'b1; #(t) stop = 1'b1; end
    else if (t < 0.0) begin stop = 1'b1; #(-t) start = 1'b1; end
    else begin start = 1'b1; stop = 1'b1; end
    #12000;
    @(negedge clk);
    sample = 1'b1; cal = is_cal;
    @(negedge clk);
    sample = 1'b0; cal = 1'b0;
    lat = 1;
    while (!valid[0] && lat < 5) begin @(negedge clk); lat++; end
    if (is_cal) begin
      n_cal++;
      checks++;
      if (valid[0]) begin failures++; $display("FAIL valid after calibration"); end
    end else begin
      real ideal;
      n_conv++;
      ideal = t / (10.0 / 32.0);
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      coarse_seen[code[0][9:5]] = 1'b1;
      for (int i = 0; i < NI; i++) begin
        real e;
        e = real'(code[i]) - ideal;
        if (sat[i]) n_sat++;
        if (clip[i]) n_clip++;
        if (check_offset_units) begin
          err_before[i] += e;
          if (i == 1 || i == 2) continue;
        end else begin
          err_after[i] += e;
        end
        checks++;
        if (t < 0.0) begin
          if (code[i] != 0 || !clip[i]) begin failures++; $display("FAIL u%0d negative T=%f code %0d", i, t, code[i]); end
        end else if (e > (i == 3 ? 5.0 : 3.0) || e < (i == 3 ? -5.0 : -3.0)) begin
          failures++;
          $display("FAIL u%0d T=%f code %0d ideal %f", i, t, code[i], ideal);
        end
      end
      if (check_offset_units) cnt_before++; else cnt_after++;
    end
    #1000;
    start = 1'b0; stop = 1'b0;
    #10000;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) begin err_before[i] = 0.0; err_after[i] = 0.0; end
    #20000 rst_n = 1'b1;
    // Before calibration (u1/u2 only recorded).
    for (int k = 0; k < 40; k++) convert(0.003 + real'($urandom % 30900) / 100.0, 1'b0, 1'b1);
    // Offset calibration: the same edge on START and STOP.
    convert(0.0, 1'b1, 1'b0);
    // After calibration: every coarse step once, plus random intervals.
    for (int n = 0; n < 31; n++) convert(10.0 * n + 0.003 + real'($urandom % 990) / 100.0, 1'b0, 1'b0);
    for (int k = 0; k < 40; k++) convert(0.003 + real'($urandom % 30900) / 100.0, 1'b0, 1'b0);
    convert(-2.5, 1'b0, 1'b0);
    convert(-0.4, 1'b0, 1'b0);
    // Offset calibration: the stored offset must be the zero-input fine code
    // floor(G * offset / 10 ps) (1 for u1, -2 for u2), the mean error must
    // have moved by about that amount and must end within 1.5 codes.
    for (int i = 1; i <= 2; i++) begin
      real b, a;
      int off, exp_off;
      b = err_before[i] / cnt_before;
      a = err_after[i] / cnt_after;
      off = (i == 1) ? int'(u1.u_readout.u_comp.off_q) : int'(u2.u_readout.u_comp.off_q);
      exp_off = (i == 1) ? 1 : -2;
      $display("u%0d offset %0d, mean error before calibration %f, after %f", i, off, b, a);
      checks += 3;
      if (off != exp_off) begin failures++; $display("FAIL u%0d stored offset %0d exp %0d", i, off, exp_off); end
      if ((b - a) * real'(exp_off) < 0.5 * real'(exp_off * exp_off)) begin
        failures++; $display("FAIL u%0d results not shifted by the offset", i);
      end
      if (a > 1.5 || a < -1.5) begin failures++; $display("FAIL u%0d mean error after calibration", i); end
    end
    begin
      int ncoarse = 0;
      foreach (coarse_seen[c]) if (coarse_seen[c]) ncoarse++;
      $display("conversions %0d, coarse codes seen %0d, quotient saturations %0d, clipped %0d, calibrations %0d, negative fine codes %0d",
               n_conv, ncoarse, n_sat, n_clip, n_cal, n_neg);
      checks += 5;
      if (ncoarse < 31) begin failures++; $display("FAIL not every coarse code seen"); end
      if (n_sat == 0)   begin failures++; $display("FAIL quotient saturation never happened"); end
      if (n_clip == 0)  begin failures++; $display("FAIL clipping never happened"); end
      if (n_cal == 0)   begin failures++; $display("FAIL no calibration"); end
      if (n_neg == 0)   begin failures++; $display("FAIL negative fine line never used"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
