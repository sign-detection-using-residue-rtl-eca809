// rns_sign_detect: fast sign detection for the residue number system with
// moduli set {2^(N+1)-1, 2^N-1, 2^N}, dynamic range M = (2^(N+1)-1)(2^N-1)2^N.
// The upper half [M/2, M) stands for the negative numbers X - M. The sign is
// the MSB of the last mixed-radix digit a3 = |x3 - x1 + |x2 - x1|_(2^N-1)|_2^N,
// obtained without any modulo reduction other than end-around carries:
//   rns_preproc     three carry-save rows -> A, B (a2 = A+B mod 2^N-1) and
//                   generate/propagate bits of A + B + T (T = x3 - x1)
//   prefix_tree     carry generation: group carries of A + B + T
//   rns_comparator  c = (A + B >= 2^N-1), the reduction carry of a2
//   rns_carry_corr  applies c as late carry-in, forms a3 and its MSB
// The comparator tree and the carry-generation tree run in parallel, so
// the delay is 3 full adders + one log2(N) prefix tree + one AND-OR + XOR.
// Inputs must be residues: x1 <= 2^(N+1)-2 and x2 <= 2^N-2 (2^N-1 is also
// accepted for x2 as the second form of zero unless x1 = 0).
// Purely combinational, no clock. The digit output exposes a3 itself.
module rns_sign_detect #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]   x1,        // residue mod 2^(N+1)-1
  input  logic [N-1:0] x2,        // residue mod 2^N-1
  input  logic [N-1:0] x3,        // residue mod 2^N
  output logic         sign_bit,  // 1: X in [M/2, M), a negative number
  output logic [N-1:0] digit      // most significant mixed-radix digit a3
);

  logic [N-1:0] a_v, b_v, g, p, gg, gp;
  logic         c;

  rns_preproc #(.N(N)) u_pre (
    .x1(x1), .x2(x2), .x3(x3), .a_v(a_v), .b_v(b_v), .g(g), .p(p)
  );

  prefix_tree #(.W(N)) u_cgen (.g(g), .p(p), .gg(gg), .gp(gp));

  rns_comparator #(.N(N)) u_cmp (.a_v(a_v), .b_v(b_v), .ge(c));

  rns_carry_corr #(.N(N)) u_corr (
    .p(p), .gg(gg), .gp(gp), .c(c), .digit(digit), .sign_bit(sign_bit)
  );

endmodule
