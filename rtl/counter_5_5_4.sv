// counter_5_5_4: (5,5,4) counter built from six (3,2) counters in four stages.
//
// x[4:0] are five bits of weight 1, x[9:5] five bits of weight 2; y is their
// weighted sum (0..15) as a 4-bit number.
// Stage 1: x5,x6,x7 -> t3,t2   x0,x1,x2 -> t1,t0
// Stage 2: t2,x8,x9 -> t6,t5   t0,x3,x4 -> t4,y0
// Stage 3: t1,t4,t5 -> t7,y1
// Stage 4: t3,t6,t7 -> y3,y2
// Four (3,2) stage delays; combinational.
module counter_5_5_4 (
  input  logic [9:0] x,
  output logic [3:0] y
);
  logic t0, t1, t2, t3, t4, t5, t6, t7;

  counter_3_2 u_s1a (.a2(x[5]), .a1(x[6]), .a0(x[7]), .x1(t3), .x0(t2));
  counter_3_2 u_s1b (.a2(x[0]), .a1(x[1]), .a0(x[2]), .x1(t1), .x0(t0));
  counter_3_2 u_s2a (.a2(t2),   .a1(x[8]), .a0(x[9]), .x1(t6), .x0(t5));
  counter_3_2 u_s2b (.a2(t0),   .a1(x[3]), .a0(x[4]), .x1(t4), .x0(y[0]));
  counter_3_2 u_s3  (.a2(t1),   .a1(t4),   .a0(t5),   .x1(t7), .x0(y[1]));
  counter_3_2 u_s4  (.a2(t3),   .a1(t6),   .a0(t7),   .x1(y[3]), .x0(y[2]));
endmodule
