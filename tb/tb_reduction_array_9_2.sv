// tb_reduction_array_9_2: the (9,2)-family reduction array at its default width
// of 106 columns and 27 rows. For random matrices of varying density, all
// ones and all zeros, the two output rows must add up (modulo 2^106) to the
// sum of the 27 input rows, computed here with wide integer arithmetic.
module tb_reduction_array_9_2;
  import mult_pkg::*;
  localparam int COLS = PROD_WIDTH;
  logic [PP_HEIGHT-1:0][COLS-1:0] pp;
  logic [COLS-1:0] r1, r2, acc;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  reduction_array_9_2 dut (.pp(pp), .row_sum(r1), .row_carry(r2));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int dens;
      dens = $urandom_range(0, 8);
      for (int r = 0; r < PP_HEIGHT; r++)
        for (int c = 0; c < COLS; c++) pp[r][c] = ($urandom_range(0, 7) < dens);
      if (n == 0) pp = '1;
      if (n == 1) pp = '0;
      #1;
      acc = '0;
      for (int r = 0; r < PP_HEIGHT; r++) acc += pp[r];
      checks++;
      if (COLS'(r1 + r2) != acc) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d rows=%h + %h expected %h", n, r1, r2, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
