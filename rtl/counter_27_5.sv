// counter_27_5: (27,5) counter, the column slice of the second proposed
// reduction scheme.
//
// The 27 inputs are counted into a 5-bit number y (0..27). Four (7,3)
// counters take x0-x6, x7-x13, x14-x20 and x21-x26 (the last one with its
// seventh input tied low, i.e. a (6,3) counter) in three stages, giving
// t2 t1 t0, t5 t4 t3, t8 t7 t6 and t11 t10 t9 (weights 4,2,1). Then:
// stage 4  : (3,2) t0,t3,t6 -> t13,t12  t1,t4,t7 -> t15,t14  t2,t5,t8 -> t17,t16
// stage 5  : (2,2) t9,t12 -> t18,y0     (3,2) t10,t13,t14 -> t20,t19
//            (3,2) t11,t15,t16 -> t22,t21
// stage 5.5: (2,2) t18,t19 -> t23,y1
// stage 6.5: (3,2) t20,t21,t23 -> t24,y2
// stage 7.5: (3,2) t17,t22,t24 -> y4,y3
// 7.5 (3,2) stage delays when a (2,2) counter counts as half a stage.
module counter_27_5 (
  input  logic [26:0] x,
  output logic [4:0]  y
);
  logic [2:0] ca, cb, cc, cd;  // (7,3) outputs: {t2,t1,t0}, {t5,t4,t3}, {t8,t7,t6}, {t11,t10,t9}
  logic t12, t13, t14, t15, t16, t17, t18, t19, t20, t21, t22, t23, t24;

  counter_7_3 u_a (.x(x[6:0]),            .y(ca));
  counter_7_3 u_b (.x(x[13:7]),           .y(cb));
  counter_7_3 u_c (.x(x[20:14]),          .y(cc));
  counter_7_3 u_d (.x({1'b0, x[26:21]}),  .y(cd));

  counter_3_2 u_s4a (.a2(ca[0]), .a1(cb[0]), .a0(cc[0]), .x1(t13), .x0(t12));
  counter_3_2 u_s4b (.a2(ca[1]), .a1(cb[1]), .a0(cc[1]), .x1(t15), .x0(t14));
  counter_3_2 u_s4c (.a2(ca[2]), .a1(cb[2]), .a0(cc[2]), .x1(t17), .x0(t16));

  counter_2_2 u_s5a (.a1(cd[0]), .a0(t12), .x1(t18), .x0(y[0]));
  counter_3_2 u_s5b (.a2(cd[1]), .a1(t13), .a0(t14), .x1(t20), .x0(t19));
  counter_3_2 u_s5c (.a2(cd[2]), .a1(t15), .a0(t16), .x1(t22), .x0(t21));

  counter_2_2 u_s55 (.a1(t18), .a0(t19), .x1(t23), .x0(y[1]));
  counter_3_2 u_s65 (.a2(t20), .a1(t21), .a0(t23), .x1(t24), .x0(y[2]));
  counter_3_2 u_s75 (.a2(t17), .a1(t22), .a0(t24), .x1(y[4]), .x0(y[3]));
endmodule
