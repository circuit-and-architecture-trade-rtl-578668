// cla_adder: WIDTH-bit carry-lookahead adder that sums the two rows left by
// a reduction array.
//
// The carries are computed by a parallel-prefix (Kogge-Stone) lookahead
// network: bit generate g = a AND b and propagate p = a XOR b are combined
// over spans doubling at each of ceil(log2 WIDTH) levels with
// (G, P) o (G', P') = (G OR P AND G', P AND P'). sum = p XOR carry-in of the
// bit; cout is the carry out of the top bit. Carry-in is zero.
// The source design only calls for a carry-lookahead adder on the two rows;
// the parallel-prefix structure is this design's choice.
// Combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 106
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [LEVELS:0][WIDTH-1:0] gen, prop;
  logic [WIDTH:0]             c;

  assign gen[0]  = a & b;
  assign prop[0] = a ^ b;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << (l - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= SPAN) begin : g_merge
        assign gen[l][i]  = gen[l-1][i] | (prop[l-1][i] & gen[l-1][i-SPAN]);
        assign prop[l][i] = prop[l-1][i] & prop[l-1][i-SPAN];
      end else begin : g_pass
        assign gen[l][i]  = gen[l-1][i];
        assign prop[l][i] = prop[l-1][i];
      end
    end
  end

  assign c    = {gen[LEVELS], 1'b0};
  assign sum  = prop[0] ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
