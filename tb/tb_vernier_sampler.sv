`timescale 1ps/1fs
// tb_vernier_sampler: self-checking test of the flip-flop bank.
// For each flop a d edge and a ck edge are placed at random times; the
// flop must hold 1 exactly when d rose first.  clr must empty the bank,
// also while every d input is high.
module tb_vernier_sampler;
  int checks = 0, failures = 0;
  localparam int N = 8;
  logic clr = 1'b0;
  logic [N-1:0] d = '0, ck = '0, q;
  int td [N], tc [N];

  vernier_sampler #(.N(N)) dut (.clr_i(clr), .d_i(d), .ck_i(ck), .q_o(q));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      // clear with every d input high: the bank must still empty
      d = '1; ck = '0;
      #100 clr = 1'b1;
      #100;
      checks++;
      if (q !== '0) begin failures++; $display("FAIL clear"); end
      clr = 1'b0;
      #10 d = '0;
      #10;
      for (int k = 0; k < N; k++) begin
        td[k] = 1 + $urandom % 400;
        tc[k] = 1 + $urandom % 400;
        if (tc[k] == td[k]) tc[k]++;
      end
      for (int s = 0; s <= 401; s++) begin
        for (int k = 0; k < N; k++) begin
          if (td[k] == s) d[k] = 1'b1;
          if (tc[k] == s) ck[k] = 1'b1;
        end
        #1;
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (q[k] !== (td[k] < tc[k])) begin
          failures++; $display("FAIL flop %0d d@%0d ck@%0d q %b", k, td[k], tc[k], q[k]);
        end
      end
      // a later falling and re-rising d must not change q (no ck edge)
      d = '0; #5;
      checks++;
      for (int k = 0; k < N; k++) if (q[k] !== (td[k] < tc[k])) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
