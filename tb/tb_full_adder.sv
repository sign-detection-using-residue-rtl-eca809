// tb_full_adder: exhaustive check of full_adder over all 8 input
// combinations against the integer sum a + b + c = 2*cout + s.
module tb_full_adder;
  logic a, b, c, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, c} = 3'(k);
      #1;
      checks++;
      if ({cout, s} !== 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("MISMATCH a=%0b b=%0b c=%0b -> s=%0b cout=%0b", a, b, c, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
