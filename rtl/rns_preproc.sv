// rns_preproc: carry-save pre-processing of the sign detector for the RNS
// moduli set {m1, m2, m3} = {2^(N+1)-1, 2^N-1, 2^N}.
//
// The integer X held by residues (x1, x2, x3) is written in mixed radix as
//   X = a1 + a2*m1 + a3*m1*m2,  a1 = x1,
//   a2 = |x2 - x1|_m2           (|m1^-1|_m2 = 1, since m1 = 1 mod m2)
//   a3 = |x3 - x1 + a2|_2^N      (m1 = -1 and m1*m2 = 1 mod 2^N)
// and the sign is the MSB of a3. No carry-propagate adder is spent on a2:
//  * row 1 (end-around carry, modulo 2^N-1) adds x2, ~x1[N-1:0] and
//    {1..1, ~x1[N]}; the last two are -x1 mod 2^N-1 in one's complement
//    (x1 = x1[N]*2^N + x1[N-1:0] and 2^N = 1 mod 2^N-1). Its sum and rotated
//    carry give A, B with A + B = a2 (mod 2^N-1).
//  * rows 2 and 3 (modulo 2^N, top carries dropped) add x3, ~x1[N-1:0], +1
//    (placed in the free LSB of the shifted carry) and then A and B, so
//    that W + Z = x3 - x1 + A + B (mod 2^N), i.e. T + A + B with T = x3 - x1.
// The bitwise pairs g = W & Z, p = W ^ Z go to the prefix network. The
// remaining term (the end-around correction c of A+B, decided by the
// comparator) is added later as a carry-in.
// Purely combinational: three full-adder delays plus one AND/XOR.
module rns_preproc #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]   x1,   // residue mod 2^(N+1)-1
  input  logic [N-1:0] x2,   // residue mod 2^N-1
  input  logic [N-1:0] x3,   // residue mod 2^N
  output logic [N-1:0] a_v,  // A: A+B = x2 - x1 (mod 2^N-1)
  output logic [N-1:0] b_v,  // B
  output logic [N-1:0] g,    // generate bits of W + Z
  output logic [N-1:0] p     // propagate bits of W + Z
);

  logic [N-1:0] nx1;                  // ~x1[N-1:0]
  logic [N-1:0] negmsb;               // -x1[N]*2^N mod 2^N-1
  logic [N-1:0] s1, c1, s2, c2, s3, c3;
  logic [N-1:0] v2, z3;

  assign nx1    = ~x1[N-1:0];
  assign negmsb = {{(N-1){1'b1}}, ~x1[N]};

  // Row 1: modulo 2^N-1, end-around carry.
  csa #(.W(N)) u_row1 (.a(x2), .b(nx1), .cin(negmsb), .s(s1), .cout(c1));
  assign a_v = s1;
  if (N > 1) begin : g_rot
    assign b_v = {c1[N-2:0], c1[N-1]};
  end else begin : g_rot1
    assign b_v = c1;
  end

  // Row 2: x3 + ~x1 (+1 in the carry LSB) = x3 - x1 mod 2^N, plus A.
  csa #(.W(N)) u_row2 (.a(x3), .b(nx1), .cin(a_v), .s(s2), .cout(c2));
  if (N > 1) begin : g_sh2
    assign v2 = {c2[N-2:0], 1'b1};
  end else begin : g_sh21
    assign v2 = 1'b1;
  end

  // Row 3: fold in B.
  csa #(.W(N)) u_row3 (.a(s2), .b(v2), .cin(b_v), .s(s3), .cout(c3));
  if (N > 1) begin : g_sh3
    assign z3 = {c3[N-2:0], 1'b0};
  end else begin : g_sh31
    assign z3 = 1'b0;
  end

  assign g = s3 & z3;
  assign p = s3 ^ z3;

endmodule
