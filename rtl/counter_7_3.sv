// counter_7_3: (7,3) counter built from four (3,2) counters in three stages.
//
// Stage 1: x3,x4,x5 -> t3,t2 and x0,x1,x2 -> t1,t0.
// Stage 2: t0,t2,x6 -> t4,y0.
// Stage 3: t1,t3,t4 -> y2,y1.
// y = number of ones among x[6:0] (0..7). Combinational, three (3,2) stage
// delays. With x6 tied low it serves as the (6,3) counter of the (27,5)
// counter.
module counter_7_3 (
  input  logic [6:0] x,
  output logic [2:0] y
);
  logic t0, t1, t2, t3, t4;

  counter_3_2 u_s1a (.a2(x[3]), .a1(x[4]), .a0(x[5]), .x1(t3), .x0(t2));
  counter_3_2 u_s1b (.a2(x[0]), .a1(x[1]), .a0(x[2]), .x1(t1), .x0(t0));
  counter_3_2 u_s2  (.a2(t0),   .a1(t2),   .a0(x[6]), .x1(t4), .x0(y[0]));
  counter_3_2 u_s3  (.a2(t1),   .a1(t3),   .a0(t4),   .x1(y[2]), .x0(y[1]));
endmodule
