// tb_rns_carry_corr: checks the carry correction unit at N = 16. For random
// operand words w, z and correction bit c the testbench forms p = w^z and
// the group pairs of every prefix [i:0] by a bit-serial loop, and expects
// digit = (w + z + c) mod 2^16 and sign_bit = its MSB.
module tb_rns_carry_corr;
  localparam int N = 16;
  logic [N-1:0] p, gg, gp, digit, w, z;
  logic         c, sign_bit;
  int checks = 0, failures = 0;

  rns_carry_corr dut (.p(p), .gg(gg), .gp(gp), .c(c), .digit(digit), .sign_bit(sign_bit));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_d;
    logic         g_acc, p_acc;
    for (int k = 0; k < 5000; k++) begin
      w = N'($urandom); z = N'($urandom); c = 1'($urandom);
      if (k % 3 == 1) z = ~w;          // c must ripple through every bit
      p = w ^ z;
      g_acc = 1'b0; p_acc = 1'b1;
      for (int i = 0; i < N; i++) begin
        g_acc = (w[i] & z[i]) | (p[i] & g_acc);
        p_acc = p_acc & p[i];
        gg[i] = g_acc;
        gp[i] = p_acc;
      end
      exp_d = w + z + N'(c);
      #1;
      checks++;
      if (digit !== exp_d || sign_bit !== exp_d[N-1]) begin
        failures++;
        if (failures < 10) $display("MISMATCH w=%h z=%h c=%0b digit=%h exp=%h", w, z, c, digit, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
