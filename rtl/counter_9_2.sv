// counter_9_2: (9,2) counter built from three (3,2) counters and a (6,2)
// counter.
//
// Inputs x[2:0], x[5:3] and x[8:6] each go through a (3,2) counter. The
// weight-2 outputs t1, t3, t5 leave to the left column (cout[0..2]); the
// weight-1 outputs t0, t2, t4 are interleaved with the carries arriving from
// the right column (T1, T3, T5 = cin[0..2]) and summed by a (6,2) counter in
// the order t0, T1, t2, T3, t4, T5. The (6,2) counter's three lateral carries
// are cout[5:3] / cin[5:3].
// Identity: sum(x) + sum(cin) = 2*sum(cout) + 2*y1 + y0.
// Four (3,2) stage delays.
module counter_9_2 (
  input  logic [8:0] x,
  input  logic [5:0] cin,
  output logic [5:0] cout,
  output logic       y1,
  output logic       y0
);
  logic t0, t2, t4;

  counter_3_2 u_g0 (.a2(x[0]), .a1(x[1]), .a0(x[2]), .x1(cout[0]), .x0(t0));
  counter_3_2 u_g1 (.a2(x[3]), .a1(x[4]), .a0(x[5]), .x1(cout[1]), .x0(t2));
  counter_3_2 u_g2 (.a2(x[6]), .a1(x[7]), .a0(x[8]), .x1(cout[2]), .x0(t4));
  counter_6_2 u_62 (.x({cin[2], t4, cin[1], t2, cin[0], t0}), .cin(cin[5:3]),
                    .cout(cout[5:3]), .y1(y1), .y0(y0));
endmodule
