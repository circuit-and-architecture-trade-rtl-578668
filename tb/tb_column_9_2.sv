// tb_column_9_2: one (9,2)-family column with random partial-product bits and
// random incoming bundles. Everything entering has weight 1 relative to the
// column, everything leaving left (and the carry output) weight 2, so
//   ones(pp) + ones(from_right) = 2*ones(to_left) + 2*carry + sum.
// No carry ripples along the row of columns: each group of lateral carries
// leaving the column may depend only on incoming carries produced at an
// earlier stage. Checked against reference columns whose incoming bundle has
// the same- and later-stage carries cleared:
//   (9,2) carries 0-2 (stage 1)   : independent of the whole bundle
//   (9,2) carries 3-4 (stage 2)   : independent of (9,2) carries 3-5 and (6,2) carries
//   (9,2) carry 5     (stage 3)   : independent of (9,2) carries 4-5 and (6,2) carries
//   (6,2) carries 0-1             : independent of the incoming (6,2) carries
//   (6,2) carry 2                 : independent of incoming (6,2) carry 2
module tb_column_9_2;
  import mult_pkg::*;
  logic [PP_HEIGHT-1:0] pp;
  col92_link_t from_right, to_left;
  col92_link_t in_r [5];
  col92_link_t out_r [5];
  logic [4:0] sum_r, carry_r;
  logic sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  column_9_2 dut  (.pp(pp), .from_right(from_right), .to_left(to_left),
                   .sum(sum), .carry(carry));
  for (genvar g = 0; g < 5; g++) begin : g_ref
    column_9_2 u_ref (.pp(pp), .from_right(in_r[g]), .to_left(out_r[g]),
                      .sum(sum_r[g]), .carry(carry_r[g]));
  end

  always_comb begin
    for (int g = 0; g < 5; g++) in_r[g] = from_right;
    in_r[0] = '0;
    for (int k = 0; k < 3; k++) begin
      in_r[1].c92[k][5:3] = '0;
      in_r[2].c92[k][5:4] = '0;
    end
    in_r[1].c62 = '0;
    in_r[2].c62 = '0;
    in_r[3].c62 = '0;
    in_r[4].c62[2] = 1'b0;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int dens;
      dens = $urandom_range(0, 8);
      for (int i = 0; i < PP_HEIGHT; i++) pp[i] = ($urandom_range(0, 7) < dens);
      from_right = col92_link_t'({$urandom, $urandom});
      if (n == 0) begin pp = '1; from_right = '1; end
      if (n == 1) begin pp = '0; from_right = '0; end
      #1;
      checks++;
      if ($countones(pp) + $countones(from_right) !=
          2 * $countones(to_left) + 2 * int'(carry) + int'(sum)) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%b in=%h out=%h c=%b s=%b", pp, from_right, to_left, carry, sum);
      end
      checks++;
      if (to_left.c92[0][2:0] != out_r[0].c92[0][2:0] || to_left.c92[1][2:0] != out_r[0].c92[1][2:0] ||
          to_left.c92[2][2:0] != out_r[0].c92[2][2:0] ||
          to_left.c92[0][4:3] != out_r[1].c92[0][4:3] || to_left.c92[1][4:3] != out_r[1].c92[1][4:3] ||
          to_left.c92[2][4:3] != out_r[1].c92[2][4:3] ||
          to_left.c92[0][5] != out_r[2].c92[0][5] || to_left.c92[1][5] != out_r[2].c92[1][5] ||
          to_left.c92[2][5] != out_r[2].c92[2][5] ||
          to_left.c62[1:0] != out_r[3].c62[1:0] || to_left.c62[2] != out_r[4].c62[2]) begin
        failures++;
        if (failures < 10) $display("FAIL a lateral carry depends on a same-stage incoming carry");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
