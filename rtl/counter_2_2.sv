// counter_2_2: the (2,2) counter (half adder) used in the last stages of the
// (27,5) counter, where it counts as half a (3,2) stage delay.
// x1 = a1 AND a0 (weight 2), x0 = a1 XOR a0 (weight 1). Combinational.
// The source design names this counter only; the gates are the obvious ones.
module counter_2_2 (
  input  logic a1,
  input  logic a0,
  output logic x1,  // carry, weight 2
  output logic x0   // sum, weight 1
);
  always_comb begin
    x1 = a1 & a0;
    x0 = a1 ^ a0;
  end
endmodule
