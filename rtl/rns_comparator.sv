// rns_comparator: comparator unit of the sign detector.
// A and B (from rns_preproc) satisfy A + B = a2 (mod 2^N-1) with A + B in
// [0, 2^(N+1)-2]. The fully reduced digit is a2 = (A + B + c) mod 2^N with
//   c = 1  iff  A + B >= 2^N - 1  iff  A >= ~B,
// which keeps the single representation of zero that the mixed-radix digit
// needs (an all-ones result would read as 2^N-1, not 0). c is the carry out
// of A + B + 1, i.e. group generate OR group propagate of the whole word,
// taken from a parallel-prefix tree (log2 N levels). Purely combinational.
module rns_comparator #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a_v,
  input  logic [N-1:0] b_v,
  output logic         ge     // A + B >= 2^N - 1
);

  logic [N-1:0] gg, gp;

  prefix_tree #(.W(N)) u_tree (
    .g (a_v & b_v),
    .p (a_v ^ b_v),
    .gg(gg),
    .gp(gp)
  );

  assign ge = gg[N-1] | gp[N-1];

endmodule
