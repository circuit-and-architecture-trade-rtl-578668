// counter_4_2: (4,2) counter built from two (3,2) counters.
//
// The first (3,2) counter adds x0,x1,x2 into a temporary carry (cout, passed
// to the neighbouring column on the left, weight 2) and a temporary sum t0.
// The second adds x3, t0 and the temporary carry cin arriving from the column
// on the right into y1 (weight 2) and y0 (weight 1).
// cout depends on x0..x2 only, so lateral carries never ripple.
// Identity: x0+x1+x2+x3+cin = 2*cout + 2*y1 + y0. Two (3,2) stage delays.
module counter_4_2 (
  input  logic [3:0] x,
  input  logic       cin,   // T1: temporary carry from the right column
  output logic       cout,  // t1: temporary carry to the left column
  output logic       y1,
  output logic       y0
);
  logic t0;

  counter_3_2 u_s1 (.a2(x[0]), .a1(x[1]), .a0(x[2]), .x1(cout), .x0(t0));
  counter_3_2 u_s2 (.a2(t0),   .a1(cin),  .a0(x[3]), .x1(y1),   .x0(y0));
endmodule
