// tb_booth_encoder: checks the improved Booth code for all eight groups
// against the encoding table (NZ+, NZ-, D) and against the value each group
// stands for: +0, +X, +X, +2X, -2X, -X, -X, -0. D is checked only where it
// matters (non-zero rows).
module tb_booth_encoder;
  import mult_pkg::*;
  logic y_hi, y_mid, y_lo;
  booth_code_t code;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // expected {NZ+, NZ-, D} per group {y_hi, y_mid, y_lo}; D of 000/111 unused
  localparam logic [2:0] EXPECT [8] = '{3'b000, 3'b100, 3'b100, 3'b101,
                                        3'b011, 3'b010, 3'b010, 3'b000};
  localparam int VALUE [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_encoder dut (.y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .code(code));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int val;
      {y_hi, y_mid, y_lo} = 3'(v);
      #1;
      checks++;
      if (code.nz_pos != EXPECT[v][2] || code.nz_neg != EXPECT[v][1] ||
          ((code.nz_pos | code.nz_neg) && code.dbl != EXPECT[v][0])) begin
        failures++;
        $display("FAIL group=%b code=%b%b%b", 3'(v), code.nz_pos, code.nz_neg, code.dbl);
      end
      val = (code.nz_pos ? 1 : 0) - (code.nz_neg ? 1 : 0);
      if (code.dbl) val = val * 2;
      checks++;
      if (val != VALUE[v] || (code.nz_pos & code.nz_neg)) begin
        failures++;
        $display("FAIL group=%b stands for %0d, expected %0d", 3'(v), val, VALUE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
