// tb_rns_sign_detect: end-to-end test of rns_sign_detect at its default
// width (N = 16, moduli {131071, 65535, 65536}).
// Integers X are drawn from [0, M) (random, plus the edges 0, M/2-1, M/2,
// M-1 and multiples of m1*m2 around the sign boundary), converted to
// residues with the % operator and applied; sign_bit must equal X >= M/2 and
// digit must equal X / (m1*m2). The DUT is combinational: each vector is
// held for one time unit. The test also counts how often each mechanism of
// the datapath fired (end-around carry in the first carry-save row,
// comparator correction c = 0 and 1, a late carry that reaches the sign
// bit, the non-canonical zero x2 = 2^N-1, both signs) and fails if any
// never occurred.
module tb_rns_sign_detect;
  import tb_rns_ref_pkg::*;

  localparam int N       = 16;
  localparam int NRANDOM = 200000;

  logic [N:0]   x1;
  logic [N-1:0] x2, x3;
  logic         sign_bit;
  logic [N-1:0] digit;

  int checks = 0, failures = 0;
  int n_eac = 0, n_c0 = 0, n_c1 = 0, n_late = 0, n_neg = 0, n_pos = 0, n_z2 = 0;

  rns_sign_detect dut (.x1(x1), .x2(x2), .x3(x3), .sign_bit(sign_bit), .digit(digit));

  initial begin : watchdog
    #(10 * NRANDOM);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(u128_t x, logic alt_zero);
    u128_t r2;
    x1 = (N+1)'(x % m1_of(N));
    r2 = x % m2_of(N);
    x2 = N'(r2);
    if (alt_zero && r2 == 0 && x1 != 0) begin
      x2 = '1;
      n_z2++;
    end
    x3 = N'(x % m3_of(N));
    #1;
    checks++;
    if (sign_bit !== ref_sign(N, x) || digit !== N'(ref_digit(N, x))) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH X=%0d x=(%0d,%0d,%0d) sign=%0b exp=%0b digit=%0d exp=%0d",
                 x, x1, x2, x3, sign_bit, ref_sign(N, x), digit, ref_digit(N, x));
    end
    if (dut.u_pre.c1[N-1]) n_eac++;
    if (dut.c) n_c1++; else n_c0++;
    if (dut.c && dut.gp[N-2] && !dut.gg[N-2]) n_late++;
    if (sign_bit) n_neg++; else n_pos++;
  endtask

  initial begin
    u128_t m, w, x;
    m = range_of(N);
    w = m1_of(N) * m2_of(N);
    apply(0, 0);
    apply(m - 1, 0);
    apply((m >> 1) - 1, 0);
    apply(m >> 1, 0);
    for (int k = 0; k < 64; k++) begin
      apply(w * (m3_of(N) / 2 - 32 + k), 0);
      apply(w * (m3_of(N) / 2 - 32 + k) - 1, 0);
    end
    // Multiples of m2: x2 = 0, which is also offered in its all-ones form.
    for (int k = 0; k < 2000; k++) begin
      x = m2_of(N) * ((u128_t'($urandom) << 16 | u128_t'($urandom)) % (m1_of(N) * m3_of(N)));
      apply(x, 1);
    end
    for (int k = 0; k < NRANDOM; k++) apply(rand_x(N), (k % 7) == 0);

    if (n_eac  == 0) begin failures++; $display("never: end-around carry"); end
    if (n_c0   == 0) begin failures++; $display("never: comparator c=0"); end
    if (n_c1   == 0) begin failures++; $display("never: comparator c=1"); end
    if (n_late == 0) begin failures++; $display("never: late carry to sign bit"); end
    if (n_neg  == 0) begin failures++; $display("never: negative"); end
    if (n_pos  == 0) begin failures++; $display("never: positive"); end
    if (n_z2   == 0) begin failures++; $display("never: x2 = 2^N-1"); end
    $display("events: eac=%0d c0=%0d c1=%0d late=%0d neg=%0d pos=%0d x2alt=%0d",
             n_eac, n_c0, n_c1, n_late, n_neg, n_pos, n_z2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
