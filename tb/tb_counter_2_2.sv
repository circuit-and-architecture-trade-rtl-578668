// tb_counter_2_2: exhaustive check of the (2,2) counter (half adder).
module tb_counter_2_2;
  logic a1, a0, x1, x0;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_2_2 dut (.a1(a1), .a0(a0), .x1(x1), .x0(x0));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a1, a0} = 2'(v);
      #1;
      checks++;
      if ({x1, x0} != 2'(a1 + a0)) begin
        failures++;
        $display("FAIL in=%b out=%b%b", 2'(v), x1, x0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
