// reduction_array_27_5: partial-product reduction array built from (27,5)
// and (5,5,4) counters.
//
// COLS/2 slices (slice_27_5) each cover two columns. The (27,5) counter of
// column c yields bits of weight 2^c .. 2^(c+4); bit k is routed to column
// c+k, so every column then holds five bits (y0 of its own counter, y1 of
// column c-1, ..., y4 of column c-4). The (5,5,4) counter of slice j adds
// columns 2j and 2j+1 into four bits for columns 2j..2j+3. Column 2j thus
// ends with bit 0 of slice j and bit 2 of slice j-1, column 2j+1 with bit 1
// of slice j and bit 3 of slice j-1: two rows, row_a and row_b, for the
// final adder. Bits routed at or beyond column COLS are dropped (weight
// vanishes modulo 2^COLS). Depth: 7.5 + 4 = 11.5 (3,2) stage delays.
// The 53-slice arrangement follows the source design; the source draws the
// diagonal routing only as a dot diagram, and the wiring of the two output
// rows is this design's reading of it.
// Combinational.
module reduction_array_27_5
  import mult_pkg::*;
#(
  parameter int unsigned COLS = PROD_WIDTH  // must be even
) (
  input  logic [PP_HEIGHT-1:0][COLS-1:0] pp,
  output logic [COLS-1:0]                row_a,
  output logic [COLS-1:0]                row_b
);
  localparam int unsigned SLICES = COLS / 2;

  logic [COLS-1:0][4:0]   cnt;   // (27,5) count of each column
  logic [COLS-1:0][4:0]   cmp;   // five bits gathered in each column
  logic [SLICES-1:0][3:0] y;     // (5,5,4) result of each slice

  if (COLS % 2 != 0) begin : g_bad_cols
    $error("reduction_array_27_5: COLS must be even");
  end

  for (genvar c = 0; c < COLS; c++) begin : g_route
    for (genvar k = 0; k < 5; k++) begin : g_k
      if (c >= k) begin : g_in
        assign cmp[c][k] = cnt[c-k][k];
      end else begin : g_zero
        assign cmp[c][k] = 1'b0;
      end
    end
  end

  for (genvar j = 0; j < SLICES; j++) begin : g_slice
    logic [26:0] col_lo, col_hi;
    for (genvar r = 0; r < 27; r++) begin : g_bit
      assign col_lo[r] = pp[r][2*j];
      assign col_hi[r] = pp[r][2*j+1];
    end
    slice_27_5 u_slice (
      .col_lo(col_lo),
      .col_hi(col_hi),
      .cnt_lo(cnt[2*j]),
      .cnt_hi(cnt[2*j+1]),
      .cmp_lo(cmp[2*j]),
      .cmp_hi(cmp[2*j+1]),
      .y     (y[j])
    );
    assign row_a[2*j]   = y[j][0];
    assign row_a[2*j+1] = y[j][1];
    if (j == 0) begin : g_first
      assign row_b[1:0] = 2'b00;
    end else begin : g_next
      assign row_b[2*j]   = y[j-1][2];
      assign row_b[2*j+1] = y[j-1][3];
    end
  end
endmodule
