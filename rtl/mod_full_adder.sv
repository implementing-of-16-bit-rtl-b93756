// mod_full_adder: full adder built from two XNOR gates and a 2:1 multiplexer.
//
// The first XNOR compares b and c: x = (b XNOR c). The second gives the sum,
// sum = x XNOR a, which equals a XOR b XOR c. The multiplexer produces the
// carry: when b and c agree (x = 1) they alone decide the carry, so it passes
// b; when they differ the carry equals a. That is the selection
// carry = x.b + x'.a, the same function as ab + ac + bc. Sum and carry
// equations are the design's; which multiplexer input is chosen by which
// value of x is this RTL's reading of the carry equation. Purely
// combinational, no clock.
module mod_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic x;  // b XNOR c, also the multiplexer select

  always_comb begin
    x     = ~(b ^ c);
    sum   = ~(x ^ a);
    carry = x ? b : a;
  end

endmodule
