// tb_mod_full_adder: exhaustive self-checking test of the XNOR/multiplexer
// full adder. For all eight inputs the sum must be the parity of a, b, c and
// the carry their majority, both counted here from the number of ones.
module tb_mod_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  mod_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks += 2;
      if (sum !== ones[0])        begin failures++; $display("FAIL abc=%b%b%b sum=%b", a, b, c, sum); end
      if (carry !== (ones >= 2))  begin failures++; $display("FAIL abc=%b%b%b carry=%b", a, b, c, carry); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
