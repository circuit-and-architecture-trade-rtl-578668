// booth_pp_generator: partial-product matrix of an unsigned N x N radix-4
// Booth multiplication.
//
// Row i (i = 0 .. N/2) is encoded from multiplier bits y[2i+1], y[2i],
// y[2i-1] (bits outside 0..N-1 read as 0) and decoded into N+1 bits
// z[i][0..N] at columns 2i .. 2i+N. The last row is never negative. A
// negative row is the one's complement of X or 2X, completed by its sign bit
// s_i = NZ- added at column 2i; sign extension is replaced by n_i = NOT s_i
// and constant ones:
//   row 0       : s0 at N+1, s0 at N+2, n0 at N+3
//   row 1..R-2  : n_i at N+1+2i, constant 1 at N+2+2i
// (constant ones at or beyond column 2N vanish modulo 2^(2N)). For N = 8 this
// is the classic 5-row, 56-bit matrix; for N = 53 it has 27 rows.
//
// Output pp[slot][col] is a slot-by-column matrix, zero where no bit is
// placed; the sum of its slots modulo 2^(2N) is x*y. Row i sits in slot i
// and its sign bit s_i in slot i+1 (free at column 2i), so no column holds
// more than R = N/2+1 bits. Combinational.
// The bit placement generalises the source design's 8-bit example; the slot
// assignment and holding the decoders here rather than inside each column
// slice are this design's choices.
module booth_pp_generator
  import mult_pkg::*;
#(
  parameter  int unsigned N    = SIG_WIDTH,
  localparam int unsigned ROWS = N / 2 + 1,
  localparam int unsigned COLS = 2 * N
) (
  input  logic [N-1:0]                x,   // multiplicand
  input  logic [N-1:0]                y,   // multiplier
  output logic [ROWS-1:0][COLS-1:0]   pp
);
  logic [N+2:0]             yext;  // yext[k+1] = y[k]
  logic [N+1:0]             xext;  // xext[j+1] = x[j]
  booth_code_t [ROWS-1:0]   code;
  logic [ROWS-1:0][N:0]     z;

  assign yext = {2'b00, y, 1'b0};
  assign xext = {1'b0, x, 1'b0};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    booth_encoder u_enc (
      .y_hi (yext[2*r+2]),
      .y_mid(yext[2*r+1]),
      .y_lo (yext[2*r]),
      .code (code[r])
    );
    for (genvar j = 0; j <= N; j++) begin : g_bit
      booth_decoder u_dec (
        .code (code[r]),
        .x_j  (xext[j+1]),
        .x_jm1(xext[j]),
        .z    (z[r][j])
      );
    end
  end

  always_comb begin
    pp = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int j = 0; j <= N; j++)
        if (2 * r + j < COLS) pp[r][2*r+j] = z[r][j];
      if (r <= ROWS - 2) begin
        pp[r+1][2*r] = code[r].nz_neg;                        // s_r
        if (r == 0) begin
          pp[0][N+1] = code[0].nz_neg;                        // s0
          pp[0][N+2] = code[0].nz_neg;                        // s0
          pp[0][N+3] = ~code[0].nz_neg;                       // n0
        end else begin
          if (N + 1 + 2 * r < COLS) pp[r][N+1+2*r] = ~code[r].nz_neg;  // n_r
          if (N + 2 + 2 * r < COLS) pp[r][N+2+2*r] = 1'b1;             // constant one
        end
      end
    end
  end
endmodule
