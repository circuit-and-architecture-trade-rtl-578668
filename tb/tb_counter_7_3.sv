// tb_counter_7_3: exhaustive check of the (7,3) counter: y must equal the
// number of ones among the seven inputs for all 128 combinations.
module tb_counter_7_3;
  logic [6:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_7_3 dut (.x(x), .y(y));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if (y != 3'($countones(x))) begin
        failures++;
        $display("FAIL x=%b y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
