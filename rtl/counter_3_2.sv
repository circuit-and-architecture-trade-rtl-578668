// counter_3_2: the (3,2) counter, leaf cell of every reduction structure.
//
// Three inputs of equal weight are counted into a carry x1 (weight 2) and a
// sum x0 (weight 1): x1 = a2a1 + a1a0 + a0a2 and x0 = a2 XOR (a1 XOR a0).
// Purely combinational; one "(3,2) stage delay" is the unit in which all the
// larger counters are timed. The transistor-level styles (folded full CMOS,
// folded cross-coupled PMOS load) and output buffers are circuit choices with
// the same logic function and are not modelled.
module counter_3_2 (
  input  logic a2,
  input  logic a1,
  input  logic a0,
  output logic x1,  // carry, weight 2
  output logic x0   // sum, weight 1
);
  always_comb begin
    x1 = (a2 & a1) | (a1 & a0) | (a0 & a2);
    x0 = a2 ^ (a1 ^ a0);
  end
endmodule
