// tb_counter_5_5_4: exhaustive check of the (5,5,4) counter over all 1024
// inputs: y = ones(x[4:0]) + 2*ones(x[9:5]).
module tb_counter_5_5_4;
  logic [9:0] x;
  logic [3:0] y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_5_5_4 dut (.x(x), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      x = 10'(v);
      #1;
      checks++;
      if (int'(y) != $countones(x[4:0]) + 2 * $countones(x[9:5])) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
