// adder_21: the "2.1" block of the pyramidal adder, a half adder that
// passes its carry on in true (non-inverted) form.
//
// Two single-bit inputs a and b give a sum s and a carry p. The sum is formed
// as the AND of the inverted AND term and the OR term, s = (a.b)'.(a+b),
// which equals a XOR b without an XOR gate; the carry is the AND term itself,
// p = a.b. Both equations follow the block description of the design; the
// same gate arrangement (AND, inverter, OR, AND) is the "modified half
// adder" of the 16-bit implementation. Purely combinational, no clock.
module adder_21 (
  input  logic a,
  input  logic b,
  output logic s,   // sum bit, goes down to the next row
  output logic p    // carry, goes left to the next more significant column
);

  logic and_ab;
  logic nand_ab;
  logic or_ab;

  always_comb begin
    and_ab  = a & b;
    nand_ab = ~and_ab;
    or_ab   = a | b;
    s       = nand_ab & or_ab;
    p       = and_ab;
  end

endmodule
