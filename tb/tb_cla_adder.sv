// tb_cla_adder: the carry-lookahead adder at its default width (106) and at
// width 8. Width 8 is checked exhaustively; width 106 with corner operands
// (full carry propagation from bit 0 to the top) and 20000 random pairs.
module tb_cla_adder;
  localparam int W = 106;
  logic [W-1:0] a, b, s;
  logic         co;
  logic [7:0]   a8, b8, s8;
  logic         co8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_adder           dut   (.a(a),  .b(b),  .sum(s),  .cout(co));
  cla_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(co8));

  task automatic check();
    logic [W:0] r;
    #1;
    r = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co, s} != r) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, got %b%h", a, b, r, co, s);
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
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if ({co8, s8} != 9'(a8) + 9'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d + %0d = %0d", a8, b8, {co8, s8});
      end
    end
    a = '1; b = W'(1); check();
    a = '1; b = '1;    check();
    a = '0; b = '0;    check();
    for (int n = 0; n < 20000; n++) begin
      a = W'({$urandom, $urandom, $urandom, $urandom});
      b = W'({$urandom, $urandom, $urandom, $urandom});
      if (n % 4 == 1) b = ~a;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
