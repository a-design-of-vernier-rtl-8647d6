`timescale 1ps/1fs
// tb_sel_generator: self-checking test of the Sel generator.
// Every thermometer length 0..31 must give Sel = length - 1 (0 for an empty
// code); a single bubble inside a code may move Sel by at most one.
module tb_sel_generator;
  int checks = 0, failures = 0;
  logic [30:0] cq;
  logic [4:0]  sel;

  sel_generator #(.N(31), .W(5)) dut (.cq_i(cq), .sel_o(sel));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int len = 0; len <= 31; len++) begin
      cq = '0;
      for (int i = 0; i < len; i++) cq[i] = 1'b1;
      #1;
      checks++;
      if (int'(sel) != (len == 0 ? 0 : len - 1)) begin
        failures++; $display("FAIL len %0d sel %0d", len, sel);
      end
    end
    for (int t = 0; t < 200; t++) begin
      int len, pos, exp;
      len = 2 + ($urandom % 29);
      pos = $urandom % (len - 1);
      cq = '0;
      for (int i = 0; i < len; i++) cq[i] = 1'b1;
      cq[pos] = 1'b0;                       // bubble
      exp = len - 1;
      #1;
      checks++;
      if (!(int'(sel) == exp || int'(sel) == exp - 1)) begin
        failures++; $display("FAIL bubble len %0d pos %0d sel %0d", len, pos, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
