// tb_carry_inverter_23: self-checking test of the 2.3 block at its default
// width (16 rows). Applies all-high (no carry), every one-hot-low pattern
// (carry from exactly one row, the only case a pyramid produces), and random
// patterns. Expected: s_n is high exactly when some p_n bit is low.
module tb_carry_inverter_23;
  localparam int unsigned ROWS = pyramid_pkg::PYR_WIDTH;
  logic [ROWS-1:0] p_n;
  logic            s_n;
  int checks = 0, failures = 0;

  carry_inverter_23 dut (.p_n(p_n), .s_n(s_n));

  task automatic check(input logic [ROWS-1:0] v);
    logic expected;
    p_n = v;
    #1;
    expected = 1'b0;
    for (int i = 0; i < int'(ROWS); i++) if (!v[i]) expected = 1'b1;
    checks++;
    if (s_n !== expected) begin
      failures++;
      $display("FAIL p_n=%b s_n=%b expected=%b", v, s_n, expected);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1);
    for (int i = 0; i < int'(ROWS); i++) check(~(ROWS'(1) << i));
    check('0);
    for (int i = 0; i < 200; i++) check(ROWS'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
