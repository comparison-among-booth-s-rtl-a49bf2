// pek_mult_unsigned: combinational N x N unsigned multiplier on Pekmestzi's
// multiplexer-based array principle.
//
// Writing X_j and Y_j for the numbers formed by the j low bits of X and Y, the
// product is the sum over rows j of 2^j * (x_j y_j 2^j + Z_j), where
// Z_j = x_j Y_j + y_j X_j. Z_j takes only four values, picked by the bit pair
// (x_j, y_j): 0, X_j, Y_j or X_j + Y_j. The last one is a prefix of the sum
// S = X + Y, which is computed once (a row of pek_sum_cell). Row j of the array
// therefore needs no partial-product AND gates: j multiplexer cells
// (pek_mux_cell) select bit i of Z_j and add it, with a ripple carry, into the
// partial product at weight 2^(j+i); one boundary cell (pek_diag_cell) adds
// the top bit of Z_j and the square term x_j y_j at weights 2^(2j), 2^(2j+1).
// Row 0 is the single AND x_0 y_0. After row j the partial product equals
// X_(j+1) * Y_(j+1), so it never carries beyond weight 2^(2j+1). Because
// the algorithm treats both operands alike, X and Y may be interchanged.
//
// Interface: x, y are N-bit unsigned operands; p is the full 2N-bit product.
// Timing: purely combinational, zero cycles of latency; the critical path runs
// through the X + Y chain and then along the rows' carry chains.
//
// The recurrence, the selection table and the reuse of one X + Y follow the
// published algorithm. The cell placement inside each row and the ripple
// carries along rows are this design's choices.
module pek_mult_unsigned #(
  parameter int unsigned N = mult_pkg::WIDTH
) (
  input  logic [N-1:0]   x,  // multiplicand X
  input  logic [N-1:0]   y,  // multiplier Y
  output logic [2*N-1:0] p   // product X * Y
);

  // Operand sum S = X + Y: s[i] is bit i, c[i] the carry into bit i
  logic [N-2:0] s;
  logic [N-1:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < N - 1; i++) begin : g_sum
    pek_sum_cell u_sum (
      .x    (x[i]),
      .y    (y[i]),
      .c_in (c[i]),
      .s    (s[i]),
      .c_out(c[i+1])
    );
  end

  // part[j] is the partial product after rows 0 .. j, i.e. X_(j+1) * Y_(j+1)
  logic [2*N-1:0] part [N];

  assign part[0] = {{(2*N-1){1'b0}}, x[0] & y[0]};

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [j:0]     cy;     // cy[i] is the carry into the cell at weight 2^(j+i)
    logic [2*N-1:0] row;    // partial product leaving this row

    assign cy[0] = 1'b0;

    for (genvar i = 0; i < j; i++) begin : g_cell
      pek_mux_cell #(.INVERT(1'b0)) u_cell (
        .xj     (x[j]),
        .yj     (y[j]),
        .xi     (x[i]),
        .yi     (y[i]),
        .si     (s[i]),
        .sum_in (part[j-1][j+i]),
        .c_in   (cy[i]),
        .sum_out(row[j+i]),
        .c_out  (cy[i+1])
      );
    end

    pek_diag_cell #(.LAST_SIGNED(1'b0)) u_diag (
      .xj     (x[j]),
      .yj     (y[j]),
      .cj     (c[j]),
      .c_in   (cy[j]),
      .sum_out(row[2*j+1:2*j])
    );

    // Bits below weight 2^j are final and pass straight down
    assign row[j-1:0] = part[j-1][j-1:0];
    // Weights above 2^(2j+1) stay zero until later rows
    if (2 * j + 2 < 2 * N) begin : g_upper
      assign row[2*N-1:2*j+2] = '0;
    end

    assign part[j] = row;
  end

  assign p = part[N-1];

endmodule
