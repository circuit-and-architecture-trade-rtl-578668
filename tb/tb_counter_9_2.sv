// tb_counter_9_2: exhaustive check of the (9,2) counter over all 2^15
// combinations of nine inputs and six lateral carry inputs:
// sum(x) + sum(cin) = 2*sum(cout) + 2*y1 + y0. No lateral carry ripples:
// cout[2:0] (stage 1) depend on no carry input, cout[4:3] (stage 2) only on
// the stage-1 carries cin[2:0], and cout[5] (stage 3) only on cin[3:0].
// Checked against instances with the later carry inputs zeroed.
module tb_counter_9_2;
  logic [8:0] x;
  logic [5:0] cin, cout, cout_ref, cout_ref1, cout_ref2;
  logic y1, y0, y1_ref, y0_ref, y1_ref1, y0_ref1, y1_ref2, y0_ref2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  counter_9_2 dut  (.x(x), .cin(cin),  .cout(cout),     .y1(y1),     .y0(y0));
  counter_9_2 dut0 (.x(x), .cin(6'b0), .cout(cout_ref), .y1(y1_ref), .y0(y0_ref));
  counter_9_2 dut1 (.x(x), .cin({3'b0, cin[2:0]}), .cout(cout_ref1), .y1(y1_ref1), .y0(y0_ref1));
  counter_9_2 dut2 (.x(x), .cin({2'b0, cin[3:0]}), .cout(cout_ref2), .y1(y1_ref2), .y0(y0_ref2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 15); v++) begin
      {cin, x} = 15'(v);
      #1;
      checks++;
      if ($countones(x) + $countones(cin) != 2 * $countones(cout) + 2 * int'(y1) + int'(y0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b cin=%b -> cout=%b y1=%b y0=%b", x, cin, cout, y1, y0);
      end
      checks++;
      if (cout[2:0] != cout_ref[2:0] || cout[4:3] != cout_ref1[4:3] || cout[5] != cout_ref2[5]) begin
        failures++;
        if (failures < 10) $display("FAIL lateral carries depend on carry inputs x=%b cin=%b", x, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
