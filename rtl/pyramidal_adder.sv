// pyramidal_adder: N-bit two-operand adder built as a triangle of half adders.
//
// Idea: the operands are consumed one bit pair at a time, most significant
// pair first. Row 0 holds one block, which half-adds a[N-1] and b[N-1].
// Row k (k = 1 .. N-1) brings in the pair j = N-1-k: its rightmost block
// half-adds a[j] and b[j], keeps the sum bit in column j and sends the carry
// left. Every further block of the row, in columns j+1 .. N-1, half-adds the
// carry arriving from its right with the sum bit coming down from the row
// above. A row is therefore an incrementer that adds the new pair's carry
// into the partial sum of the more significant bits. After the last row
// (pair 0) the bottom blocks hold sum bits 0 .. N-1.
//
// Blocks in columns 0 .. N-2 are 2.1 blocks (carry out in true form). The
// block in column N-1 of each row is a 2.2 block, whose carry leaves inverted
// and goes to the 2.3 block instead of to a further column; the 2.3 block
// turns the N inverted carries into the carry-out. Only one row can overflow
// column N-1 for a given pair of operands, so combining them is exact.
//
// The triangle of N(N+1)/2 blocks, the split into 2.1, 2.2 and 2.3 blocks and
// the order in which bit pairs enter follow the design. The operands are
// numbered from 0 here, and the adder is purely combinational: there is no
// clock, reset or handshake; sum and cout settle after the longest ripple,
// which runs through N blocks (row N-1, from column 0 to column N-1) after
// the sum bits from the rows above have settled.
module pyramidal_adder #(
  parameter int unsigned N = pyramid_pkg::PYR_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  // row_s[k][c]: sum of the block in row k, column c (goes down to row k+1)
  // row_p[k][c]: true carry of the 2.1 block in row k, column c (goes left)
  // carry_n[k] : inverted carry of the 2.2 block ending row k
  logic [N-1:0] row_s [N];
  logic [N-1:0] row_p [N];
  logic [N-1:0] carry_n;

  for (genvar k = 0; k < N; k++) begin : g_row
    localparam int unsigned J = N - 1 - k;  // column where this row's pair enters

    for (genvar c = 0; c < N; c++) begin : g_col
      if (c < J) begin : g_empty
        // No block here: the triangle has not reached this column yet.
        assign row_s[k][c] = 1'b0;
        assign row_p[k][c] = 1'b0;
      end else begin : g_blk
        logic in_a, in_b;
        if (c == J) begin : g_entry
          // The row's own operand pair enters in its rightmost block.
          assign in_a = a[c];
          assign in_b = b[c];
        end else begin : g_ripple
          // Sum bit from the row above, carry from the block on the right.
          assign in_a = row_s[k-1][c];
          assign in_b = row_p[k][c-1];
        end

        if (c == N - 1) begin : g_b22
          adder_22 u_b22 (.a(in_a), .b(in_b), .s(row_s[k][c]), .p_n(carry_n[k]));
          assign row_p[k][c] = 1'b0;  // the carry of this column leaves via carry_n
        end else begin : g_b21
          adder_21 u_b21 (.a(in_a), .b(in_b), .s(row_s[k][c]), .p(row_p[k][c]));
        end
      end
    end
  end

  assign sum = row_s[N-1];

  carry_inverter_23 #(.ROWS(N)) u_b23 (.p_n(carry_n), .s_n(cout));

endmodule
