// pek_mux_cell: the ordinary cell of the Pekmestzi multiplexer-based array:
// a 4-to-1 multiplexer feeding a full adder.
//
// Cell (j, i) sits in row j at product weight 2^(j+i), i < j. Its multiplexer
// picks bit i of the row term Z_j according to the row's control bits
// (x_j, y_j): 00 gives 0, 01 gives x_i (Z_j = X_j), 10 gives y_i (Z_j = Y_j)
// and 11 gives s_i, bit i of the precomputed sum X + Y (Z_j = S_j). The full
// adder then adds the selected bit to the partial-product bit arriving from
// the row above and to the carry from its right-hand neighbour.
//
// Parameter INVERT complements the selected bit before the adder. It is set in
// the last row of the two's complement multiplier, where Z_(n-1) has to be
// subtracted instead of added; the rest of the subtraction is a pair of
// constant ones injected elsewhere in that array.
//
// Interface: xj, yj (row select), xi, yi, si (data), sum_in, c_in; outputs
// sum_out, c_out. Combinational: one multiplexer plus one full-adder delay.
//
// The selection table is the published one; merging multiplexer and adder into
// one cell and the exact ports are this design's choices.
module pek_mux_cell #(
  parameter bit INVERT = 1'b0   // 1: add the complement of the selected bit
) (
  input  logic xj,       // row control bit x_j
  input  logic yj,       // row control bit y_j
  input  logic xi,       // data bit x_i
  input  logic yi,       // data bit y_i
  input  logic si,       // data bit s_i of S = X + Y
  input  logic sum_in,   // partial product bit from the previous row
  input  logic c_in,     // carry from the cell of weight 2^(j+i-1)
  output logic sum_out,  // partial product bit to the next row
  output logic c_out     // carry to the cell of weight 2^(j+i+1)
);

  logic z;       // selected bit of Z_j
  logic z_add;   // bit actually added

  always_comb begin
    unique case ({xj, yj})
      2'b00: z = 1'b0;
      2'b01: z = xi;
      2'b10: z = yi;
      2'b11: z = si;
    endcase
  end

  assign z_add   = z ^ INVERT;
  assign sum_out = sum_in ^ z_add ^ c_in;
  assign c_out   = (sum_in & z_add) | (sum_in & c_in) | (z_add & c_in);

endmodule
