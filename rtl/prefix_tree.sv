// prefix_tree: Kogge-Stone parallel-prefix carry network (carry generation).
// From the bitwise generate g[i] = a[i]&b[i] and propagate p[i] = a[i]^b[i]
// of an addition it forms, for every bit i, the group pair of span [i:0]:
//   gg[i] = a carry leaves bit i when the carry into bit 0 is 0
//   gp[i] = a carry entering bit 0 would travel through bit i
// so the carry out of bit i for a carry-in cin is gg[i] | (gp[i] & cin).
// The carry-in is deliberately left out: the sign detector decides it late
// (rns_comparator) and applies it in rns_carry_corr. Which prefix structure
// is used is free; Kogge-Stone is chosen here for its log2(W) depth.
// Purely combinational, ceil(log2 W) levels of gp_dot cells.
module prefix_tree
  import rns_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg,
  output logic [W-1:0] gp
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // Level l merges each span with the one 2^l bits below it.
  always_comb begin
    gp_t cur [W];
    gp_t nxt [W];
    for (int i = 0; i < W; i++) cur[i] = '{g: g[i], p: p[i]};
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) nxt[i] = gp_dot(cur[i], cur[i - (1 << l)]);
        else               nxt[i] = cur[i];
      end
      cur = nxt;
    end
    for (int i = 0; i < W; i++) begin
      gg[i] = cur[i].g;
      gp[i] = cur[i].p;
    end
  end

endmodule
