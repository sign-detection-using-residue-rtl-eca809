// tb_rns_sign_detect_widths: rns_sign_detect at the other widths the design
// is shown at, n = 8 (moduli {511, 255, 256}) and n = 32 (moduli
// {2^33-1, 2^32-1, 2^32}), plus n = 4 checked exhaustively over all
// M = 7440 integers. Reference values come from 128-bit integer arithmetic
// (residues by %, sign = X >= M/2, digit = X / (m1*m2)). Combinational DUTs,
// one vector per time unit.
module tb_rns_sign_detect_widths;
  import tb_rns_ref_pkg::*;

  localparam int NRANDOM = 100000;

  logic [4:0]  a1;  logic [3:0]  a2, a3, ad;  logic as;
  logic [8:0]  b1;  logic [7:0]  b2, b3, bd;  logic bs;
  logic [32:0] c1;  logic [31:0] c2, c3, cd;  logic cs;

  int checks = 0, failures = 0;
  int neg4 = 0, neg8 = 0, neg32 = 0;

  rns_sign_detect #(.N(4))  dut4  (.x1(a1), .x2(a2), .x3(a3), .sign_bit(as), .digit(ad));
  rns_sign_detect #(.N(8))  dut8  (.x1(b1), .x2(b2), .x3(b3), .sign_bit(bs), .digit(bd));
  rns_sign_detect #(.N(32)) dut32 (.x1(c1), .x2(c2), .x3(c3), .sign_bit(cs), .digit(cd));

  initial begin : watchdog
    #(10 * (2 * NRANDOM + 10000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, u128_t x, logic s, u128_t d);
    checks++;
    if (s !== ref_sign(n, x) || d !== ref_digit(n, x)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH n=%0d X=%0d sign=%0b exp=%0b digit=%0d exp=%0d",
                 n, x, s, ref_sign(n, x), d, ref_digit(n, x));
    end
  endtask

  initial begin
    u128_t x;
    for (int k = 0; k < int'(range_of(4)); k++) begin
      x = u128_t'(k);
      a1 = 5'(x % m1_of(4)); a2 = 4'(x % m2_of(4)); a3 = 4'(x % m3_of(4));
      #1;
      check(4, x, as, u128_t'(ad));
      if (as) neg4++;
    end
    for (int k = 0; k < NRANDOM; k++) begin
      x = rand_x(8);
      b1 = 9'(x % m1_of(8)); b2 = 8'(x % m2_of(8)); b3 = 8'(x % m3_of(8));
      #1;
      check(8, x, bs, u128_t'(bd));
      if (bs) neg8++;
      x = (k == 0) ? range_of(32) - 1 : (k == 1) ? range_of(32) >> 1 : rand_x(32);
      c1 = 33'(x % m1_of(32)); c2 = 32'(x % m2_of(32)); c3 = 32'(x % m3_of(32));
      #1;
      check(32, x, cs, u128_t'(cd));
      if (cs) neg32++;
    end
    if (neg4 == 0 || neg8 == 0 || neg32 == 0) begin
      failures++;
      $display("a width never saw a negative number");
    end
    $display("negatives: n4=%0d n8=%0d n32=%0d", neg4, neg8, neg32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
