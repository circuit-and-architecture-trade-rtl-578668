// counter_6_2: (6,2) counter built from two (3,2) counters and a (4,2) counter.
//
// x5,x4,x3 and x2,x1,x0 each go through a (3,2) counter. Their weight-2
// outputs t3 and t1 leave to the left column (cout[1], cout[0]); their
// weight-1 outputs t2 and t0 meet the two carries from the right column
// (cin[0] = T1, cin[1] = T3) in a (4,2) counter fed in the order t0, T1, t2,
// T3. The (4,2) counter's own lateral carry is cout[2] / cin[2].
// Identity: sum(x) + sum(cin) = 2*sum(cout) + 2*y1 + y0.
// Three (3,2) stage delays; no lateral carry depends on a carry input.
module counter_6_2 (
  input  logic [5:0] x,
  input  logic [2:0] cin,
  output logic [2:0] cout,
  output logic       y1,
  output logic       y0
);
  logic t0, t2;

  counter_3_2 u_g0 (.a2(x[0]), .a1(x[1]), .a0(x[2]), .x1(cout[0]), .x0(t0));
  counter_3_2 u_g1 (.a2(x[3]), .a1(x[4]), .a0(x[5]), .x1(cout[1]), .x0(t2));
  counter_4_2 u_42 (.x({cin[1], t2, cin[0], t0}), .cin(cin[2]), .cout(cout[2]),
                    .y1(y1), .y0(y0));
endmodule
