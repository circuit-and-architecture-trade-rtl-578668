// column_9_2: one column slice of the (9,2)-family reduction array.
//
// The column's 27 partial-product bits enter three (9,2) counters (bits 0-8,
// 9-17, 18-26). Each (9,2) counter exchanges six lateral carries with the
// same counter in the neighbouring columns and produces y0 (weight 1, stays
// in this column) and y1 (weight 2, goes to the column on the left). A (6,2)
// counter then adds the three local y0 bits and the three y1 bits coming from
// the right column, in the order y0[0], y1r[0], y0[1], y1r[1], y0[2], y1r[2],
// and exchanges three lateral carries of its own. Its outputs are the two
// rows handed to the final adder: sum (this column) and carry (weight 2, the
// adder's next column).
// Everything the column passes left travels in one col92_link_t bundle.
// No lateral carry depends on a carry input, so columns never ripple: the
// whole column is 4 + 3 = 7 (3,2) stage delays. Combinational.
// The column contents follow the source design; which nine bits go to which
// (9,2) counter and the order of the (6,2) inputs are this design's choice.
module column_9_2
  import mult_pkg::*;
(
  input  logic [PP_HEIGHT-1:0] pp,          // the 27 bits of this column
  input  col92_link_t          from_right,  // bundle from column c-1
  output col92_link_t          to_left,     // bundle to column c+1
  output logic                 sum,         // weight 2^c
  output logic                 carry        // weight 2^(c+1)
);
  logic [2:0] y0;

  for (genvar k = 0; k < 3; k++) begin : g_92
    counter_9_2 u_92 (
      .x   (pp[9*k +: 9]),
      .cin (from_right.c92[k]),
      .cout(to_left.c92[k]),
      .y1  (to_left.y92[k]),
      .y0  (y0[k])
    );
  end

  counter_6_2 u_62 (
    .x   ({from_right.y92[2], y0[2], from_right.y92[1], y0[1], from_right.y92[0], y0[0]}),
    .cin (from_right.c62),
    .cout(to_left.c62),
    .y1  (carry),
    .y0  (sum)
  );
endmodule
