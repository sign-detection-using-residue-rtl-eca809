// tb_csa: checks the 16-bit carry-save row on random and corner operands
// against a + b + cin = s + 2*cout (18-bit integer arithmetic).
module tb_csa;
  localparam int W = 16;
  logic [W-1:0] a, b, cin, s, cout;
  int checks = 0, failures = 0;

  csa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      a = W'($urandom); b = W'($urandom); cin = W'($urandom);
      if (k == 0) begin a = '1; b = '1; cin = '1; end
      if (k == 1) begin a = '0; b = '0; cin = '0; end
      #1;
      checks++;
      if ({2'b0, s} + {1'b0, cout, 1'b0} !== {2'b0, a} + {2'b0, b} + {2'b0, cin}) begin
        failures++;
        if (failures < 10) $display("MISMATCH a=%h b=%h cin=%h s=%h cout=%h", a, b, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
