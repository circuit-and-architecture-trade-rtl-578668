// tb_booth_multiplier_8b: the multiplier built for 8-bit operands (5 Booth
// rows, 16 columns, the textbook example of the radix-4 scheme), checked
// exhaustively: all 65536 operand pairs through both reduction arrays.
module tb_booth_multiplier_8b;
  logic [7:0]  x, y;
  logic [15:0] p92, p275;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_multiplier_top #(.N(8)) dut (.multiplicand(x), .multiplier(y),
                                     .product_9_2(p92), .product_27_5(p275));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x, y} = 16'(v);
      #1;
      checks++;
      if (p92 != 16'(x) * 16'(y) || p275 != 16'(x) * 16'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d: %0d %0d", x, y, p92, p275);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
