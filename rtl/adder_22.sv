// adder_22: the "2.2" block of the pyramidal adder, a half adder whose carry
// output is inverted.
//
// It sits in the most significant column of every row. Its sum
// s = (a.b)'.(a+b) = a XOR b is formed like that of the 2.1 block, but the
// carry leaves as p_n = (a.b)', the inverted AND term, which the block already
// has as an inner node. All p_n outputs of the column meet in the 2.3 block,
// which inverts them back into the carry-out. Following the design, the block
// delivers the carry in inverted form; the single-node realisation is this
// RTL's reading of it. Purely combinational, no clock.
module adder_22 (
  input  logic a,
  input  logic b,
  output logic s,     // sum bit, goes down the most significant column
  output logic p_n    // carry, active low, goes to the 2.3 block
);

  logic nand_ab;
  logic or_ab;

  always_comb begin
    nand_ab = ~(a & b);
    or_ab   = a | b;
    s       = nand_ab & or_ab;
    p_n     = nand_ab;
  end

endmodule
