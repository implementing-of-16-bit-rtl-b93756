// tb_adder_21: exhaustive self-checking test of the 2.1 half-adder block.
// All four input pairs are applied; sum must be a^b and carry a&b, both
// worked out here from the half-adder truth table.
module tb_adder_21;
  logic a, b, s, p;
  int checks = 0, failures = 0;

  adder_21 dut (.a(a), .b(b), .s(s), .p(p));

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
      if (p !== (v == 3))           begin failures++; $display("FAIL a=%b b=%b p=%b", a, b, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
