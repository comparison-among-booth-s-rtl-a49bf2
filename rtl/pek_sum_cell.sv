// pek_sum_cell: one bit of the operand sum S = X + Y used by the Pekmestzi
// multiplexer-based multipliers.
//
// When both current bits x_j and y_j are 1, row j of the array needs
// Z_j = X_j + Y_j, the sum of the j low bits of both operands. Rather than
// adding those prefixes again in every row, the sum S = X + Y is formed once
// by a ripple chain of these cells: cell i adds x_i, y_i and the incoming
// carry c_i and yields the sum bit s_i and the carry c_(i+1). The prefix sum
// S_j is then {c_j, s_(j-1) ... s_0}, read straight off the chain.
//
// Interface: single-bit inputs x, y, c_in; outputs s (sum) and c_out (carry).
// Combinational, one full-adder delay.
//
// That the sum is computed once and its prefixes reused follows the published
// algorithm; building it as a plain ripple-carry chain of full adders is this
// design's choice.
module pek_sum_cell (
  input  logic x,      // operand bit x_i
  input  logic y,      // operand bit y_i
  input  logic c_in,   // carry c_i from the cell below
  output logic s,      // sum bit s_i
  output logic c_out   // carry c_(i+1)
);

  assign s     = x ^ y ^ c_in;
  assign c_out = (x & y) | (x & c_in) | (y & c_in);

endmodule
