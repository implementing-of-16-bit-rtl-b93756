// tb_pyramidal_adder_top: end-to-end test of the top level at its default
// parameters (16-bit pyramid), also used as the full-size test.
//
// The pyramid is driven with corner cases and 50000 random operand pairs and
// compared with the integer sum. Besides the result, the test watches the
// pyramid's inner mechanisms and counts how often each happened:
//   * a carry-out produced by each of the 16 rows (through its 2.2 block and
//     the 2.3 block); the rule that at most one row overflows is checked on
//     every vector;
//   * an addition with no carry-out;
//   * a carry that ripples through all 16 columns of the bottom row.
// The XNOR/multiplexer full adder is driven through all eight inputs, and
// both multiplexer selections (b and c equal, b and c different) are counted.
// A mechanism that never happened counts as a failure.
module tb_pyramidal_adder_top;
  localparam int unsigned N = pyramid_pkg::PYR_WIDTH;

  logic [N-1:0] a, b, sum;
  logic         cout;
  logic         fa_a, fa_b, fa_c, fa_sum, fa_carry;
  int checks = 0, failures = 0;

  int row_carry_seen [N];
  int no_carry_seen = 0;
  int full_ripple_seen = 0;
  int mux_pass_b_seen = 0;
  int mux_pass_a_seen = 0;

  pyramidal_adder_top dut (
    .a(a), .b(b), .sum(sum), .cout(cout),
    .fa_a(fa_a), .fa_b(fa_b), .fa_c(fa_c), .fa_sum(fa_sum), .fa_carry(fa_carry)
  );

  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0]   expected;
    logic [N-1:0] carry_rows;
    int           low_count;
    a = x; b = y;
    #1;
    expected = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h got=%h expected=%h", x, y, {cout, sum}, expected);
    end
    // Which rows overflowed the most significant column.
    carry_rows = ~dut.u_pyr.carry_n;
    low_count = 0;
    for (int k = 0; k < int'(N); k++) begin
      if (carry_rows[k]) begin
        low_count++;
        row_carry_seen[k]++;
      end
    end
    checks++;
    if (low_count > 1) begin
      failures++;
      $display("FAIL a=%h b=%h: %0d rows produced a carry-out", x, y, low_count);
    end
    if (!expected[N]) no_carry_seen++;
    // Bottom row (pair 0) carry reaching the last column: every column of
    // the partial sum above it is one and pair 0 generates.
    if (x[0] & y[0] && ((x[N-1:1] + y[N-1:1]) & ((N-1)'('1))) == (N-1)'('1)) full_ripple_seen++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(N); k++) row_carry_seen[k] = 0;
    fa_a = 0; fa_b = 0; fa_c = 0;

    add('0, '0);
    add('1, '1);
    add('1, N'(1));
    add('1, '0);
    for (int i = 0; i < int'(N); i++) begin
      add(N'(1) << i, '1);
      add(N'(1) << i, N'(1) << i);
      add(~(N'(1) << i), N'(1) << i);
    end
    for (int i = 0; i < 50000; i++) add(N'($urandom), N'($urandom));

    for (int v = 0; v < 8; v++) begin
      int ones;
      {fa_a, fa_b, fa_c} = 3'(v);
      #1;
      ones = int'(fa_a) + int'(fa_b) + int'(fa_c);
      checks += 2;
      if (fa_sum !== ones[0])       begin failures++; $display("FAIL fa abc=%03b sum=%b", v[2:0], fa_sum); end
      if (fa_carry !== (ones >= 2)) begin failures++; $display("FAIL fa abc=%03b carry=%b", v[2:0], fa_carry); end
      if (fa_b == fa_c) mux_pass_b_seen++; else mux_pass_a_seen++;
    end

    for (int k = 0; k < int'(N); k++) begin
      $display("carry-out from row %0d (pair %0d): %0d times", k, N - 1 - k, row_carry_seen[k]);
      checks++;
      if (row_carry_seen[k] == 0) failures++;
    end
    $display("no carry-out: %0d, full-row ripple: %0d, mux passes b: %0d, mux passes a: %0d",
             no_carry_seen, full_ripple_seen, mux_pass_b_seen, mux_pass_a_seen);
    checks += 4;
    if (no_carry_seen == 0)    failures++;
    if (full_ripple_seen == 0) failures++;
    if (mux_pass_b_seen == 0)  failures++;
    if (mux_pass_a_seen == 0)  failures++;
    $display("pyramid of %0d bits: %0d half-adder blocks", N, pyramid_pkg::pyr_block_count(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
