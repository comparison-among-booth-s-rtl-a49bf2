// pek_mult_signed: combinational N x N two's complement multiplier on
// Pekmestzi's multiplexer-based array principle.
//
// With X = -2^(N-1) x_(N-1) + X_(N-1) (and likewise Y), the product differs
// from the unsigned one only in the sign of the last row's term:
//   P = sum_j x_j y_j 2^(2j) + sum_(j=1..N-2) Z_j 2^j - Z_(N-1) 2^(N-1),
// with Z_j = x_j Y_j + y_j X_j selected by (x_j, y_j) among 0, X_j, Y_j and
// X_j + Y_j exactly as in the unsigned array. Rows 0 .. N-2 are therefore the
// unsigned array's rows. In row N-1 the multiplexer cells add the complement of
// the selected bit (INVERT = 1) and the boundary cell adds the complement of
// the top bit of Z_(N-1); the two's complement is completed by two constant
// ones, one as the carry into the row's first cell (weight 2^(N-1)) and one
// at weight 2^(2N-1) inside the boundary cell, which also adds the square term
// x_(N-1) y_(N-1) 2^(2N-2). All arithmetic is modulo 2^(2N).
//
// Interface: x, y are N-bit two's complement operands; p is the 2N-bit two's
// complement product. Timing: purely combinational, zero cycles of latency.
//
// Subtracting Z_(N-1) by inverting the outputs of the last row's cells and
// adding constant ones follows the published construction; where exactly the
// two constants enter the array is this design's choice.
module pek_mult_signed #(
  parameter int unsigned N = mult_pkg::WIDTH
) (
  input  logic [N-1:0]   x,  // multiplicand X, two's complement
  input  logic [N-1:0]   y,  // multiplier Y, two's complement
  output logic [2*N-1:0] p   // product X * Y, two's complement
);

  // Operand sum S = X + Y of the N-1 low bits: s[i] is bit i, c[i] the carry into bit i
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

  // part[j] is the partial product after rows 0 .. j
  logic [2*N-1:0] part [N];

  assign part[0] = {{(2*N-1){1'b0}}, x[0] & y[0]};

  for (genvar j = 1; j < N; j++) begin : g_row
    localparam bit LAST = (j == N - 1);

    logic [j:0]     cy;     // cy[i] is the carry into the cell at weight 2^(j+i)
    logic [2*N-1:0] row;    // partial product leaving this row

    // Constant one at weight 2^(N-1) of the last row: part of -Z_(N-1)
    assign cy[0] = LAST;

    for (genvar i = 0; i < j; i++) begin : g_cell
      pek_mux_cell #(.INVERT(LAST)) u_cell (
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

    pek_diag_cell #(.LAST_SIGNED(LAST)) u_diag (
      .xj     (x[j]),
      .yj     (y[j]),
      .cj     (c[j]),
      .c_in   (cy[j]),
      .sum_out(row[2*j+1:2*j])
    );

    assign row[j-1:0] = part[j-1][j-1:0];
    if (2 * j + 2 < 2 * N) begin : g_upper
      assign row[2*N-1:2*j+2] = '0;
    end

    assign part[j] = row;
  end

  assign p = part[N-1];

endmodule
