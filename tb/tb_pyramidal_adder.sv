// tb_pyramidal_adder: self-checking test of the pyramidal adder.
//
// Two instances: a 4-bit pyramid checked exhaustively (all 256 operand
// pairs), and the default 16-bit pyramid checked on corner cases (zero,
// all-ones, carries that ripple through a whole row, a carry out of every
// row) and 20000 random pairs. The reference is the integer sum a + b.
module tb_pyramidal_adder;
  localparam int unsigned NS = 4;
  localparam int unsigned NL = pyramid_pkg::PYR_WIDTH;

  logic [NS-1:0] as_, bs_, sums;
  logic          couts;
  logic [NL-1:0] al, bl, suml;
  logic          coutl;
  int checks = 0, failures = 0;

  pyramidal_adder #(.N(NS)) dut_s (.a(as_), .b(bs_), .sum(sums), .cout(couts));
  pyramidal_adder           dut_l (.a(al),  .b(bl),  .sum(suml), .cout(coutl));

  task automatic check_l(input logic [NL-1:0] x, input logic [NL-1:0] y);
    logic [NL:0] expected;
    al = x; bl = y;
    #1;
    expected = {1'b0, x} + {1'b0, y};
    checks++;
    if ({coutl, suml} !== expected) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h got=%h expected=%h", NL, x, y, {coutl, suml}, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive, 4 bits.
    for (int x = 0; x < (1 << NS); x++) begin
      for (int y = 0; y < (1 << NS); y++) begin
        as_ = NS'(x); bs_ = NS'(y);
        #1;
        checks++;
        if ({couts, sums} !== (NS + 1)'(x + y)) begin
          failures++;
          $display("FAIL N=%0d a=%0d b=%0d got=%0d", NS, x, y, {couts, sums});
        end
      end
    end
    // Corners, 16 bits.
    check_l('0, '0);
    check_l('1, '1);
    check_l('1, NL'(1));
    check_l(NL'(1), '1);
    check_l('1, '0);
    for (int i = 0; i < int'(NL); i++) begin
      check_l(NL'(1) << i, '1);             // carry out produced in the row of pair i
      check_l(NL'(1) << i, NL'(1) << i);    // a single generate
      check_l(~(NL'(1) << i), NL'(1) << i); // propagate everywhere, no carry
    end
    // Random, 16 bits.
    for (int i = 0; i < 20000; i++) check_l(NL'($urandom), NL'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
