`timescale 1ps/1fs
// tb_delay_stage: self-checking test of the selector's delay stage model.
// Random rising edges on all 64 inputs must appear 1 ns later at the
// corresponding outputs, and only there.
module tb_delay_stage;
  int checks = 0, failures = 0;
  logic [31:0] si = '0, pi = '0, so, po;
  realtime tsi [32], tpi [32], tso [32], tpo [32];

  delay_stage dut (.start_i(si), .stop_i(pi), .start_o(so), .stop_o(po));

  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge si[k]) tsi[k] = $realtime;
    always @(posedge pi[k]) tpi[k] = $realtime;
    always @(posedge so[k]) tso[k] = $realtime;
    always @(posedge po[k]) tpo[k] = $realtime;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      #3000;
      for (int s = 0; s < 64; s++) begin
        int k;
        k = $urandom % 32;
        if ($urandom % 2) si[k] = 1'b1; else pi[k] = 1'b1;
        #(1 + $urandom % 20);
      end
      si = '1; pi = '1;
      #2000;
      for (int k = 0; k < 32; k++) begin
        real a, b;
        a = tso[k] - tsi[k] - 1000.0;
        b = tpo[k] - tpi[k] - 1000.0;
        checks += 2;
        if (a > 0.001 || a < -0.001) begin failures++; $display("FAIL start %0d", k); end
        if (b > 0.001 || b < -0.001) begin failures++; $display("FAIL stop %0d", k); end
      end
      si = '0; pi = '0;
      #2000;
      checks++;
      if (so !== '0 || po !== '0) begin failures++; $display("FAIL outputs stuck high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
