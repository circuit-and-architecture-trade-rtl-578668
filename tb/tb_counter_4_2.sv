// tb_counter_4_2: exhaustive check of the (4,2) counter over all 32 input
// combinations: x0+x1+x2+x3+cin = 2*cout + 2*y1 + y0, and the lateral carry
// cout must not depend on cin (it equals the majority of x0, x1, x2).
module tb_counter_4_2;
  logic [3:0] x;
  logic cin, cout, y1, y0;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_4_2 dut (.x(x), .cin(cin), .cout(cout), .y1(y1), .y0(y0));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      checks++;
      if ($countones(x) + int'(cin) != 2 * int'(cout) + 2 * int'(y1) + int'(y0)) begin
        failures++;
        $display("FAIL x=%b cin=%b -> cout=%b y1=%b y0=%b", x, cin, cout, y1, y0);
      end
      checks++;
      if (cout != ((x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]))) begin
        failures++;
        $display("FAIL lateral carry x=%b cout=%b", x, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
