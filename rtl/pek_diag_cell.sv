// pek_diag_cell: the left boundary cell of row j of the Pekmestzi array, at
// product weights 2^(2j) and 2^(2j+1).
//
// Row j adds 2^j * (x_j y_j 2^j + Z_j). The low j bits of Z_j come from the
// multiplexer cells; what is left for this cell is the top bit of Z_j (the
// carry c_j of S_j, present only when x_j = y_j = 1) together with the square
// term x_j y_j. With x_j = y_j = 1 these two make x_j y_j (1 + c_j) at weight
// 2^(2j), i.e. the two-bit value {c_j, ~c_j}; otherwise they make 0. The cell
// adds that value to the carry arriving from the multiplexer cell at weight
// 2^(2j-1). The partial product of the rows above is X_j * Y_j < 2^(2j), so
// both bits of the row above are zero at these weights and the result always
// fits in two bits: the cell produces no carry.
//
// For the last row of the two's complement multiplier (LAST_SIGNED = 1) the
// top bit of Z_(n-1) is subtracted, not added: the cell adds its complement,
// the square term x y at weight 2^(2n-2) and the constant one at weight
// 2^(2n-1) that completes the two's complement of Z_(n-1); the sum is taken
// modulo 4, which is the product's width.
//
// Interface: xj, yj, cj (carry c_j of the operand sum), c_in; output
// sum_out[1:0] (bit 0 at 2^(2j)). Combinational.
//
// The terms this cell adds are those of the published product formulas; the
// way they are grouped into one boundary cell is this design's own choice.
module pek_diag_cell #(
  parameter bit LAST_SIGNED = 1'b0  // 1: last row of the two's complement array
) (
  input  logic       xj,      // x_j
  input  logic       yj,      // y_j
  input  logic       cj,      // carry c_j out of bit j-1 of X + Y
  input  logic       c_in,    // carry from the multiplexer cell at 2^(2j-1)
  output logic [1:0] sum_out  // bits 2j and 2j+1 of the new partial product
);

  logic       both;   // x_j = y_j = 1
  logic       top_n;  // complement of the top bit of Z_j
  logic [1:0] term;   // value this cell adds besides c_in

  assign both  = xj & yj;
  assign top_n = ~(both & cj);

  always_comb begin
    if (LAST_SIGNED)
      // ~(both & cj) + both + 2, modulo 4
      term = {1'b0, top_n} + {1'b0, both} + 2'd2;
    else
      term = both ? {cj, ~cj} : 2'b00;
  end

  assign sum_out = term + {1'b0, c_in};

endmodule
