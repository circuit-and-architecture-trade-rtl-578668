// booth_multiplier_top: single-cycle (purely combinational) N x N-bit
// unsigned significand multiplier, N = 53 for IEEE double precision,
// carrying both proposed partial-product reduction schemes side by side.
//
// Data path: the multiplier y is Booth-encoded (NZ+, NZ-, D per 2-bit group)
// and the per-bit decoders build N/2+1 = 27 partial-product rows over 2N =
// 106 columns (booth_pp_generator). The same 27-row matrix then feeds
//   - reduction_array_9_2 : 106 columns of three (9,2) + one (6,2) counter,
//     7 (3,2) stage delays, followed by a cla_adder -> product_9_2;
//   - reduction_array_27_5: 53 two-column slices of two (27,5) counters over
//     one (5,5,4) counter, 11.5 (3,2) stage delays, followed by a cla_adder
//     -> product_27_5.
// Both products equal x*y; the two reduction schemes are alternatives of the
// same design and a chip would keep one. No clock: the result settles within
// the cycle in which the operands are applied.
// The matrix is at most 27 rows high, so N may be at most 53.
// Both schemes, the encoding and the 106-column size follow the source
// design; placing the two arrays side by side is this design's choice.
module booth_multiplier_top
  import mult_pkg::*;
#(
  parameter int unsigned N = SIG_WIDTH
) (
  input  logic [N-1:0]   multiplicand,  // x
  input  logic [N-1:0]   multiplier,    // y
  output logic [2*N-1:0] product_9_2,   // x*y through the (9,2)-family array
  output logic [2*N-1:0] product_27_5   // x*y through the (27,5)/(5,5,4) array
);
  localparam int unsigned ROWS = N / 2 + 1;
  localparam int unsigned COLS = 2 * N;

  if (ROWS > PP_HEIGHT) begin : g_too_wide
    $error("booth_multiplier_top: N/2+1 rows exceed the 27-row reduction arrays");
  end

  logic [ROWS-1:0][COLS-1:0]      pp;
  logic [PP_HEIGHT-1:0][COLS-1:0] pp_full;
  logic [COLS-1:0] sum_92, carry_92, row_a_275, row_b_275;
  logic            cout_92, cout_275;

  booth_pp_generator #(.N(N)) u_ppgen (
    .x (multiplicand),
    .y (multiplier),
    .pp(pp)
  );

  always_comb begin
    pp_full = '0;
    for (int r = 0; r < ROWS; r++) pp_full[r] = pp[r];
  end

  reduction_array_9_2 #(.COLS(COLS)) u_tree_92 (
    .pp       (pp_full),
    .row_sum  (sum_92),
    .row_carry(carry_92)
  );

  cla_adder #(.WIDTH(COLS)) u_cla_92 (
    .a   (sum_92),
    .b   (carry_92),
    .sum (product_9_2),
    .cout(cout_92)
  );

  reduction_array_27_5 #(.COLS(COLS)) u_tree_275 (
    .pp   (pp_full),
    .row_a(row_a_275),
    .row_b(row_b_275)
  );

  cla_adder #(.WIDTH(COLS)) u_cla_275 (
    .a   (row_a_275),
    .b   (row_b_275),
    .sum (product_27_5),
    .cout(cout_275)
  );
endmodule
