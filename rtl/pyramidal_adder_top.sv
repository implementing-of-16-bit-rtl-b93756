// pyramidal_adder_top: top level holding the two arithmetic units of the
// design side by side.
//
//  * u_pyr  - the N-bit pyramidal adder (N = 16 by default): a, b in,
//             sum (N bits) and cout out, built from 2.1, 2.2 and 2.3 blocks.
//  * u_fa   - the XNOR/multiplexer full adder: fa_a, fa_b, fa_c in,
//             fa_sum and fa_carry out.
//
// The two units share no signals; each has its own ports. The triangle is
// made of half adders only, so the full adder has no place inside it and is
// kept beside it as a cell of its own (a choice of this design). Both units
// are purely combinational: outputs follow the inputs after the gate delays,
// with no clock or reset.
module pyramidal_adder_top #(
  parameter int unsigned N = pyramid_pkg::PYR_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  input  logic         fa_a,
  input  logic         fa_b,
  input  logic         fa_c,
  output logic         fa_sum,
  output logic         fa_carry
);

  pyramidal_adder #(.N(N)) u_pyr (
    .a    (a),
    .b    (b),
    .sum  (sum),
    .cout (cout)
  );

  mod_full_adder u_fa (
    .a     (fa_a),
    .b     (fa_b),
    .c     (fa_c),
    .sum   (fa_sum),
    .carry (fa_carry)
  );

endmodule
