// carry_inverter_23: the "2.3" block of the pyramidal adder, which turns the
// active-low carries of the most significant column into the carry-out bit.
//
// Each of the ROWS rows of the pyramid ends in a 2.2 block whose inverted
// carry p_n[k] is low when that row overflows the top column. In the design
// these outputs share one line that feeds an inverter; here that junction is
// written out as the AND of the active-low carries, so the output
// s_n = ~(p_n[0] & ... & p_n[ROWS-1]) is high when any row produced a carry.
// At most one row can do so for any pair of operands (the sum of two N-bit
// numbers needs only N+1 bits), so this equals the true carry-out.
// Purely combinational, no clock.
module carry_inverter_23 #(
  parameter int unsigned ROWS = pyramid_pkg::PYR_WIDTH
) (
  input  logic [ROWS-1:0] p_n,  // active-low carries of the 2.2 column, one per row
  output logic            s_n   // carry-out of the adder (sum bit N)
);

  always_comb s_n = ~(&p_n);

endmodule
