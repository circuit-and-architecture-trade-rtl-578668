// tb_counter_27_5: the (27,5) counter must output the number of ones among
// its 27 inputs. Checked for all-zero, all-one, every single one-hot input
// and 20000 random inputs with a random density.
module tb_counter_27_5;
  logic [26:0] x;
  logic [4:0]  y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_27_5 dut (.x(x), .y(y));

  task automatic check();
    #1;
    checks++;
    if (int'(y) != $countones(x)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%b y=%0d", x, y);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; check();
    x = '1; check();
    for (int i = 0; i < 27; i++) begin x = 27'(1) << i; check(); end
    for (int n = 0; n < 20000; n++) begin
      int dens;
      dens = $urandom_range(0, 8);
      for (int i = 0; i < 27; i++) x[i] = ($urandom_range(0, 7) < dens);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
