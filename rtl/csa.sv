// csa: W-bit carry-save adder, a row of W independent full adders.
// It reduces three operands to a sum vector s and a carry vector cout with
//   a + b + cin = s + 2*cout          (EAC = 0, plain binary)
// cout[i] is the carry leaving bit i, still unshifted; the caller places it
// one position higher. For a row used modulo 2^W-1 a carry out of bit W-1 is
// worth 2^W = 1, so the caller rotates cout left by one (end-around carry);
// for a row used modulo 2^W the caller shifts it and drops cout[W-1].
// Purely combinational; delay is one full adder regardless of W.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] cin,
  output logic [W-1:0] s,
  output logic [W-1:0] cout
);

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .c   (cin[i]),
      .s   (s[i]),
      .cout(cout[i])
    );
  end

endmodule
