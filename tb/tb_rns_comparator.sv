// tb_rns_comparator: checks ge == (A + B >= 2^16 - 1) for random words and
// for the boundary pairs A + B = 2^16-2, 2^16-1, 2^16 and 2^17-2.
module tb_rns_comparator;
  localparam int N = 16;
  logic [N-1:0] a_v, b_v;
  logic         ge;
  int checks = 0, failures = 0, n_ge = 0;

  rns_comparator dut (.a_v(a_v), .b_v(b_v), .ge(ge));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (ge !== (int'(a_v) + int'(b_v) >= (1 << N) - 1)) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h ge=%0b", a_v, b_v, ge);
    end
    if (ge) n_ge++;
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      a_v = N'($urandom);
      case (k % 5)
        0: b_v = N'($urandom);
        1: b_v = ~a_v;                 // sum 2^N-1
        2: b_v = ~a_v - N'(a_v != '1); // sum 2^N-2
        3: b_v = ~a_v + N'(a_v != 0);  // sum 2^N
        default: begin a_v = '1; b_v = N'($urandom); end
      endcase
      check();
    end
    a_v = '1; b_v = '1; check();
    a_v = '0; b_v = '0; check();
    if (n_ge == 0 || n_ge == checks) begin failures++; $display("one outcome never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
