// tb_adder_22: exhaustive self-checking test of the 2.2 block, a half adder
// with an active-low carry. Sum must be a^b, p_n the inverse of a&b.
module tb_adder_22;
  logic a, b, s, p_n;
  int checks = 0, failures = 0;

  adder_22 dut (.a(a), .b(b), .s(s), .p_n(p_n));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (s !== (v == 1 || v == 2)) begin failures++; $display("FAIL a=%b b=%b s=%b", a, b, s); end
      if (p_n !== (v != 3))         begin failures++; $display("FAIL a=%b b=%b p_n=%b", a, b, p_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
