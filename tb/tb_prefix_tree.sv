// tb_prefix_tree: checks the 16-bit Kogge-Stone network. For random
// operands a, b it feeds g = a&b, p = a^b and compares, for every bit i,
// gg[i] with the carry out of bit i of a + b (cin = 0) and gp[i] with
// "a[i:0] ^ b[i:0] is all ones", both computed with integer arithmetic.
module tb_prefix_tree;
  localparam int W = 16;
  logic [W-1:0] a, b, gg, gp;
  int checks = 0, failures = 0;

  prefix_tree dut (.g(a & b), .p(a ^ b), .gg(gg), .gp(gp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0]   sum;
    logic [W-1:0] eg, ep, mask;
    for (int k = 0; k < 5000; k++) begin
      a = W'($urandom); b = W'($urandom);
      if (k % 4 == 1) b = ~a;           // long propagate chains
      if (k % 4 == 2) b = ~a ^ W'(1 << $urandom_range(0, W - 1));
      #1;
      for (int i = 0; i < W; i++) begin
        mask  = W'((33'(1) << (i + 1)) - 1);
        sum   = {1'b0, a & mask} + {1'b0, b & mask};
        eg[i] = sum[i+1];
        ep[i] = (((a ^ b) & mask) == mask);
      end
      checks++;
      if (gg !== eg || gp !== ep) begin
        failures++;
        if (failures < 10) $display("MISMATCH a=%h b=%h gg=%h/%h gp=%h/%h", a, b, gg, eg, gp, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
