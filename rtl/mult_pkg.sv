// mult_pkg: types and constants shared by the Booth multiplier and its two
// partial-product reduction arrays.
//
// The multiplier multiplies two unsigned N-bit significands (N = 53 for an
// IEEE double) into a 2N-bit product. Modified (radix-4) Booth encoding cuts
// the partial-product rows to N/2+1 (27 for N = 53). Both reduction arrays
// are built for a column height of at most PP_HEIGHT = 27 bits.
//
// booth_code_t is the "improved" Booth code: NZ+ (non-zero, add), NZ-
// (non-zero, subtract) and D (double). pp_slot_used() gives the layout of
// the partial-product matrix (which slot/column positions carry a bit); the
// generator follows it and testbenches use it to count bits.
//
// col92_link_t bundles every signal a column of the (9,2)-family array passes
// to its left neighbour: six lateral carries of each of its three (9,2)
// counters, the three (9,2) carry outputs (weight 2, summed one column to the
// left) and three lateral carries of its (6,2) counter.
package mult_pkg;

  localparam int unsigned SIG_WIDTH  = 53;              // IEEE double significand
  localparam int unsigned PP_HEIGHT  = 27;              // 3 x (9,2) = 27 inputs per column
  localparam int unsigned PROD_WIDTH = 2 * SIG_WIDTH;   // 106 columns

  typedef struct packed {
    logic nz_pos;  // NZ+: row is +X or +2X
    logic nz_neg;  // NZ-: row is -X or -2X
    logic dbl;     // D  : row uses 2X
  } booth_code_t;

  typedef struct packed {
    logic [2:0][5:0] c92;  // lateral carries of the three (9,2) counters
    logic [2:0]      y92;  // weight-2 outputs of the three (9,2) counters
    logic [2:0]      c62;  // lateral carries of the (6,2) counter
  } col92_link_t;

  // Number of Booth partial-product rows for an n-bit unsigned multiplier.
  function automatic int booth_rows(int n);
    return n / 2 + 1;
  endfunction

  // 1 if position (slot, col) of the partial-product matrix can hold a
  // non-constant bit or a constant one. Row r occupies slot r with its N+1
  // decoded bits from column 2r. Every row except the last may be negative:
  // its sign bit s_r sits in slot r+1 at column 2r. Row 0 carries s0, s0, n0
  // at columns N+1..N+3; rows 1..R-2 carry n_r at N+1+2r and a constant one
  // at N+2+2r. Positions at or above column 2n do not exist.
  function automatic bit pp_slot_used(int n, int slot, int col);
    int rows;
    rows = booth_rows(n);
    if (col < 0 || col >= 2 * n || slot < 0 || slot >= rows) return 1'b0;
    if (col >= 2 * slot && col <= 2 * slot + n) return 1'b1;           // z bits
    if (slot >= 1 && slot - 1 <= rows - 2 && col == 2 * (slot - 1)) return 1'b1; // s bit
    if (slot == 0 && rows >= 2 && col >= n + 1 && col <= n + 3) return 1'b1;    // s0 s0 n0
    if (slot >= 1 && slot <= rows - 2 && (col == n + 1 + 2 * slot || col == n + 2 + 2 * slot))
      return 1'b1;                                                    // n_r and constant 1
    return 1'b0;
  endfunction

endpackage
