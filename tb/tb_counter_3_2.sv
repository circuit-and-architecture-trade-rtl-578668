// tb_counter_3_2: exhaustive check of the (3,2) counter: {x1,x0} must equal
// the number of ones among a2, a1, a0 for all eight input combinations.
module tb_counter_3_2;
  logic a2, a1, a0, x1, x0;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_3_2 dut (.a2(a2), .a1(a1), .a0(a0), .x1(x1), .x0(x0));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a2, a1, a0} = 3'(v);
      #1;
      checks++;
      if ({x1, x0} != 2'(a2 + a1 + a0)) begin
        failures++;
        $display("FAIL in=%b out=%b%b", 3'(v), x1, x0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
