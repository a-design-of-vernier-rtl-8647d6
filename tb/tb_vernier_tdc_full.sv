`timescale 1ps/1fs
// tb_vernier_tdc_full: the converter at its default parameters.
// One offset calibration, then the interval values of the published
// correction table (0.875 .. 9.625 ps, first coarse step) and intervals
// spread over the 320 ps range.  Each 10-bit code must be within +-3 codes
// of T / (10 ps / 32) and appear two clock cycles after the sample pulse.
module tb_vernier_tdc_full;
  int checks = 0, failures = 0;

  logic start = 1'b0, stop = 1'b0, clr = 1'b0, clk = 1'b0, rst_n = 1'b0, sample = 1'b0, cal = 1'b0;
  logic [4:0] sel;
  logic [9:0] code;
  logic valid, sat, clip;

  vernier_tdc_top dut (.start_i(start), .stop_i(stop), .clr_i(clr), .clk_i(clk), .rst_ni(rst_n),
    .sample_i(sample), .cal_i(cal), .sel_o(sel), .code_o(code), .valid_o(valid), .sat_o(sat), .clip_o(clip));

  always #5000 clk = ~clk;

  task automatic convert(real t, bit is_cal);
    int lat;
    real ideal, e;
    #2000 clr = 1'b1;
    #1000 clr = 1'b0;
    #1000;
    start = 1'b1;
    if (t > 0.0) #(t) stop = 1'b1;
    else stop = 1'b1;
    #12000;
    @(negedge clk);
    sample = 1'b1; cal = is_cal;
    @(negedge clk);
    sample = 1'b0; cal = 1'b0;
    lat = 1;
    while (!valid && lat < 5) begin @(negedge clk); lat++; end
    if (!is_cal) begin
      ideal = t / (10.0 / 32.0);
      e = real'(code) - ideal;
      $display("T = %7.3f ps  code %4d  (coarse %2d, fine %2d)  ideal %7.2f", t, code, code[9:5], code[4:0], ideal);
      checks += 2;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      if (e > 3.0 || e < -3.0) begin failures++; $display("FAIL T=%f", t); end
    end
    #1000;
    start = 1'b0; stop = 1'b0;
    #10000;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000 rst_n = 1'b1;
    convert(0.0, 1'b1);
    for (int k = 1; k < 12; k++) convert(0.875 * k, 1'b0);
    for (int k = 0; k < 16; k++) convert(3.003 + 19.7 * k, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
