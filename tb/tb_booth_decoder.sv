// tb_booth_decoder: exhaustive check of the two-stage decoder for every
// valid code (NZ+ and NZ- never both set) and both multiplicand bits:
// z = x_j or x_(j-1) (chosen by D), inverted under NZ-, zero when neither
// NZ+ nor NZ- is set.
module tb_booth_decoder;
  import mult_pkg::*;
  booth_code_t code;
  logic x_j, x_jm1, z, expect_z;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_decoder dut (.code(code), .x_j(x_j), .x_jm1(x_jm1), .z(z));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      if (v[4] && v[3]) continue;  // NZ+ and NZ- both set: not a valid code
      {code, x_j, x_jm1} = 5'(v);
      #1;
      if (!code.nz_pos && !code.nz_neg) expect_z = 1'b0;
      else begin
        expect_z = code.dbl ? x_jm1 : x_j;
        if (code.nz_neg) expect_z = !expect_z;
      end
      checks++;
      if (z != expect_z) begin
        failures++;
        $display("FAIL code=%b x_j=%b x_jm1=%b z=%b", code, x_j, x_jm1, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
