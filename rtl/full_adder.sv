// full_adder: one-bit full adder, the cell of the carry-save rows.
// s = a ^ b ^ c, cout = majority(a, b, c). Purely combinational.
// Port names follow the full-adder waveform of the design (a, b, c, s, cout).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ c;
    cout = (a & b) | (a & c) | (b & c);
  end

endmodule
