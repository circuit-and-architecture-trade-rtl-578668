// booth_decoder: per-bit decoder for the improved Booth code.
//
// Produces partial-product bit z[i][j] of row i from multiplicand bits x_j and
// x_(j-1) as a cascade of two small circuits:
//   stage 1: t = D ? x_(j-1) : x_j          (selects X or 2X)
//   stage 2: z = NZ+ ? t : (NZ- ? NOT t : 0) (passes, inverts or zeroes)
// NZ+ and NZ- are never both 1 (asserted). Inversion is the one's complement of the row;
// the +1 that completes the two's complement is the row's sign bit s_i, added
// in the partial-product matrix. Combinational.
module booth_decoder
  import mult_pkg::*;
(
  input  booth_code_t code,
  input  logic        x_j,    // multiplicand bit j
  input  logic        x_jm1,  // multiplicand bit j-1
  output logic        z
);
  logic t;

  always_comb begin
    t = code.dbl ? x_jm1 : x_j;
    z = (code.nz_pos & t) | (code.nz_neg & ~t);
  end

  // A valid code never asks for both addition and subtraction.
  always_comb
    assert (!(code.nz_pos && code.nz_neg))
      else $error("booth_decoder: NZ+ and NZ- both set");
endmodule
