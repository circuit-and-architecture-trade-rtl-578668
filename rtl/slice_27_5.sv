// slice_27_5: one vertical slice of the (27,5)/(5,5,4) reduction array,
// covering two adjacent columns (the prototype silicon held two of these).
//
// Two (27,5) counters count the 27 bits of the even column 2j (col_lo) and of
// the odd column 2j+1 (col_hi) into 5-bit numbers. Bit k of a count has
// weight 2^k relative to its column, so the array routes it k columns to the
// left (cnt_lo/cnt_hi out, cmp_lo/cmp_hi in). After that routing each column
// holds five bits. The (5,5,4) counter at the bottom of the slice adds the
// five bits of column 2j (weight 1) and of column 2j+1 (weight 2) into a
// 4-bit number y of weight 2^(2j).
// Depth: 7.5 (3,2) stage delays for the (27,5) counter plus 4 for the (5,5,4)
// counter. Combinational.
module slice_27_5 (
  input  logic [26:0] col_lo,  // 27 bits of column 2j
  input  logic [26:0] col_hi,  // 27 bits of column 2j+1
  output logic [4:0]  cnt_lo,  // count of column 2j, bit k to column 2j+k
  output logic [4:0]  cnt_hi,  // count of column 2j+1, bit k to column 2j+1+k
  input  logic [4:0]  cmp_lo,  // the five bits gathered in column 2j
  input  logic [4:0]  cmp_hi,  // the five bits gathered in column 2j+1
  output logic [3:0]  y        // (5,5,4) result, bit k to column 2j+k
);
  counter_27_5  u_lo  (.x(col_lo), .y(cnt_lo));
  counter_27_5  u_hi  (.x(col_hi), .y(cnt_hi));
  counter_5_5_4 u_554 (.x({cmp_hi, cmp_lo}), .y(y));
endmodule
