`timescale 1ps/1fs
// tb_tdc_readout: self-checking test of the synchronous back end.
// Random thermometer codes are presented with a one-cycle sample pulse; the
// result must appear exactly two cycles later with valid for one cycle and
// equal {coarse, fine} from a reference written here.  A calibration sample
// (cal high) must produce no valid and shift later results by the offset.
module tb_tdc_readout;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0, cal = 1'b0;
  logic [30:0] cq = '0;
  logic [93:0] fqp1 = '0, fqp2 = '0;
  logic [31:0] fqn1 = '0, fqn2 = '0;
  logic [9:0]  code;
  logic valid, sat, clip;

  tdc_readout dut (.clk_i(clk), .rst_ni(rst_n), .sample_i(sample), .cal_i(cal), .cq_i(cq),
                   .fqp1_i(fqp1), .fqn1_i(fqn1), .fqp2_i(fqp2), .fqn2_i(fqn2),
                   .code_o(code), .valid_o(valid), .sat_o(sat), .clip_o(clip));

  always #5000 clk = ~clk;

  function automatic logic [93:0] therm94(int n);
    logic [93:0] v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction
  function automatic logic [31:0] therm32(int n);
    logic [31:0] v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction

  function automatic int fout(int p, int n);
    int d = p - (n > 31 ? 31 : n);
    return d > 63 ? 63 : (d < -64 ? -64 : d);
  endfunction

  function automatic int ref_fine(int a, int b, int off);
    int s, q, r;
    s = a + b;
    q = (s <= 32) ? 127 : 4096 / s;
    r = int'($floor(real'(a * q) / 128.0 + 0.5)) - off;
    return r < 0 ? 0 : (r > 31 ? 31 : r);
  endfunction

  int offset_ref = 0;

  // One conversion: returns after checking the result.
  task automatic convert(int c, int p1, int n1, int p2, int n2, bit is_cal);
    int exp_code, lat;
    @(negedge clk);
    cq = '0;
    for (int i = 0; i < c; i++) cq[i] = 1'b1;
    fqp1 = therm94(p1); fqn1 = therm32(n1); fqp2 = therm94(p2); fqn2 = therm32(n2);
    sample = 1'b1; cal = is_cal;
    @(negedge clk);
    sample = 1'b0; cal = 1'b0;
    // change the inputs: the captured copy must be used
    cq = '1; fqp1 = '0; fqp2 = '0;
    lat = 1;
    while (!valid && lat < 6) begin @(negedge clk); lat++; end
    if (is_cal) begin
      checks++;
      if (valid) begin failures++; $display("FAIL valid after calibration sample"); end
      offset_ref = fout(p1, n1);
      offset_ref = offset_ref > 15 ? 15 : (offset_ref < -16 ? -16 : offset_ref);
    end else begin
      exp_code = (c == 0 ? 0 : c - 1) * 32 + ref_fine(fout(p1, n1), fout(p2, n2), offset_ref);
      checks += 2;
      if (lat != 2) begin failures++; $display("FAIL latency %0d cycles", lat); end
      if (int'(code) != exp_code) begin
        failures++;
        $display("FAIL c %0d p1 %0d n1 %0d p2 %0d n2 %0d: got %0d exp %0d", c, p1, n1, p2, n2, code, exp_code);
      end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid longer than one cycle"); end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int r, g;
      r = $urandom % 44;
      g = 36 + $urandom % 8;
      convert($urandom % 32, r, 0, g - r, 0, 1'b0);
    end
    convert(5, 0, 2, 44, 0, 1'b0);          // negative fine code
    convert(0, 0, 3, 0, 0, 1'b1);           // calibrate: offset -3
    for (int t = 0; t < 100; t++) begin
      int r;
      r = $urandom % 40;
      convert($urandom % 32, r, 0, 40 - r, 0, 1'b0);
    end
    convert(0, 4, 0, 0, 0, 1'b1);           // calibrate: offset +4
    for (int t = 0; t < 100; t++) begin
      int r;
      r = $urandom % 40;
      convert($urandom % 32, r, 0, 40 - r, 0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
