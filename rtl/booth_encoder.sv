// booth_encoder: improved modified-Booth encoder for one multiplier group.
//
// A radix-4 group (y_hi, y_mid, y_lo) = (y[2i+1], y[2i], y[2i-1]) selects one
// of +0, +X, +2X, -2X, -X, -0. Instead of the usual sign/C1/C0 code it
// produces NZ+ (the row is +X or +2X), NZ- (the row is -X or -2X) and D (the
// row uses 2X), which lets the per-bit decoder be split into two small
// stages. D is a don't-care for +0 and -0; this design sets
// D = NOT(y_mid XOR y_lo), which is 1 there. Both +0 and -0 give NZ+ = NZ- = 0
// (a zero row with no negation). Combinational.
module booth_encoder
  import mult_pkg::*;
(
  input  logic        y_hi,   // y[2i+1]
  input  logic        y_mid,  // y[2i]
  input  logic        y_lo,   // y[2i-1]
  output booth_code_t code
);
  always_comb begin
    code.nz_pos = ~y_hi & (y_mid | y_lo);
    code.nz_neg =  y_hi & ~(y_mid & y_lo);
    code.dbl    = ~(y_mid ^ y_lo);
  end
endmodule
