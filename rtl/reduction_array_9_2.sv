// reduction_array_9_2: partial-product reduction array of the (9,2) counter
// family.
//
// COLS identical column slices (column_9_2) abut side by side; column c takes
// bit c of every one of the 27 input rows. Each column passes one
// col92_link_t bundle to its left neighbour; column 0 receives zeros and the
// bundle leaving the last column is dropped (it carries weight 2^COLS, which
// vanishes modulo 2^COLS). The array reduces 27 rows to two, row_sum and
// row_carry, whose sum modulo 2^COLS equals the sum of the input rows. The
// height is fixed at 27 = 3 x 9 inputs per column; unused rows are tied low.
// Depth: one (9,2) stage (4) plus one (6,2) stage (3) = 7 (3,2) stage delays.
// The 106-column array follows the source design; the handling of the two
// edge columns is this design's choice.
// Combinational.
module reduction_array_9_2
  import mult_pkg::*;
#(
  parameter int unsigned COLS = PROD_WIDTH
) (
  input  logic [PP_HEIGHT-1:0][COLS-1:0] pp,
  output logic [COLS-1:0]                row_sum,
  output logic [COLS-1:0]                row_carry
);
  col92_link_t [COLS:0] link;  // link[c] enters column c
  logic        [COLS-1:0] carry;

  assign link[0] = '0;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [PP_HEIGHT-1:0] col_bits;
    for (genvar r = 0; r < PP_HEIGHT; r++) begin : g_bit
      assign col_bits[r] = pp[r][c];
    end
    column_9_2 u_col (
      .pp        (col_bits),
      .from_right(link[c]),
      .to_left   (link[c+1]),
      .sum       (row_sum[c]),
      .carry     (carry[c])
    );
  end

  // Carry of column c has weight 2^(c+1); the top column's carry is dropped.
  assign row_carry = {carry[COLS-2:0], 1'b0};
endmodule
