// tb_rns_preproc: checks the carry-save pre-processing at N = 16 on random
// residues (x1 < 2^17-1, x2 < 2^16-1, any x3):
//   (a_v + b_v) mod (2^16-1) == (x2 - x1) mod (2^16-1)
//   (p + 2*g)   mod 2^16     == (x3 - x1 + a_v + b_v) mod 2^16
// (p + 2g is the value of the two carry-save words, since w + z =
// (w^z) + 2(w&z)), and that g and p never overlap.
module tb_rns_preproc;
  localparam int N = 16;
  localparam longint M1 = (64'd1 << (N + 1)) - 1;
  localparam longint M2 = (64'd1 << N) - 1;
  logic [N:0]   x1;
  logic [N-1:0] x2, x3, a_v, b_v, g, p;
  int checks = 0, failures = 0;

  rns_preproc dut (.x1(x1), .x2(x2), .x3(x3), .a_v(a_v), .b_v(b_v), .g(g), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e2, got2, e3, got3;
    for (int k = 0; k < 5000; k++) begin
      x1 = (N+1)'(longint'($urandom) % M1);
      x2 = N'(longint'($urandom) % M2);
      x3 = N'($urandom);
      if (k == 0) begin x1 = (N+1)'(M1 - 1); x2 = '0; x3 = '0; end
      if (k == 1) begin x1 = '0; x2 = N'(M2 - 1); x3 = '1; end
      #1;
      e2   = ((longint'(x2) - longint'(x1)) % M2 + M2) % M2;
      got2 = (longint'(a_v) + longint'(b_v)) % M2;
      e3   = (longint'(x3) - longint'(x1) + longint'(a_v) + longint'(b_v)) & ((64'd1 << N) - 1);
      got3 = (longint'(p) + 2 * longint'(g)) & ((64'd1 << N) - 1);
      checks++;
      if (e2 != got2 || e3 != got3 || (g & p) != 0) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH x=(%0d,%0d,%0d) a2 %0d/%0d sum %0d/%0d", x1, x2, x3, got2, e2, got3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
