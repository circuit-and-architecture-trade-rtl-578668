// tb_counter_6_2: exhaustive check of the (6,2) counter over all 512
// combinations of six inputs and three lateral carry inputs:
// sum(x) + sum(cin) = 2*sum(cout) + 2*y1 + y0. No lateral carry ripples:
// cout[1:0] (stage 1) depend on no carry input, and cout[2], the (4,2)
// counter's carry, depends only on the stage-1 carry T1 = cin[0]. Checked
// against instances with the carry inputs zeroed or with cin[2:1] zeroed.
module tb_counter_6_2;
  logic [5:0] x;
  logic [2:0] cin, cout, cout_ref, cout_ref1;
  logic y1, y0, y1_ref, y0_ref, y1_ref1, y0_ref1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_6_2 dut  (.x(x), .cin(cin),  .cout(cout),     .y1(y1),     .y0(y0));
  counter_6_2 dut0 (.x(x), .cin(3'b0), .cout(cout_ref), .y1(y1_ref), .y0(y0_ref));
  counter_6_2 dut1 (.x(x), .cin({2'b0, cin[0]}), .cout(cout_ref1), .y1(y1_ref1), .y0(y0_ref1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, x} = 9'(v);
      #1;
      checks++;
      if ($countones(x) + $countones(cin) != 2 * $countones(cout) + 2 * int'(y1) + int'(y0)) begin
        failures++;
        $display("FAIL x=%b cin=%b -> cout=%b y1=%b y0=%b", x, cin, cout, y1, y0);
      end
      checks++;
      if (cout[1:0] != cout_ref[1:0] || cout[2] != cout_ref1[2]) begin
        failures++;
        $display("FAIL lateral carries depend on carry inputs x=%b cin=%b", x, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
