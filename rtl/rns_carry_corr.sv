// rns_carry_corr: carry correction unit of the sign detector.
// The prefix tree gives, for each bit i of W + Z (A + B + T), the group pair
// (gg[i], gp[i]) of span [i:0] with no carry-in. The comparator's bit c is
// the carry-in that turns A + B into the reduced digit a2; this unit applies
// it late, as the carry into bit i: cy[i] = gg[i-1] | (gp[i-1] & c), cy[0] = c.
// The corrected sum bits digit[i] = p[i] ^ cy[i] form the most significant
// mixed-radix digit a3 = |W + Z + c|_2^N, and sign_bit = digit[N-1] is 1
// when X lies in [M/2, M). Both sums (c = 0 and c = 1) are thus available
// after the tree and only one AND-OR level depends on the comparator.
// gg[N-1] and gp[N-1] are not read: the carry out of the top bit is worth
// 2^N, which is 0 modulo 2^N.
// Purely combinational.
module rns_carry_corr #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] p,       // bitwise propagate of W + Z
  input  logic [N-1:0] gg,      // group generate of [i:0]
  input  logic [N-1:0] gp,      // group propagate of [i:0]
  input  logic         c,       // comparator: end-around correction
  output logic [N-1:0] digit,   // a3, most significant mixed-radix digit
  output logic         sign_bit
);

  logic [N-1:0] cy;

  assign cy[0] = c;
  for (genvar i = 1; i < N; i++) begin : g_cy
    assign cy[i] = gg[i-1] | (gp[i-1] & c);
  end

  assign digit    = p ^ cy;
  assign sign_bit = digit[N-1];

endmodule
