// tb_booth_multiplier_top: end-to-end test of the 53 x 53-bit multiplier at
// its default size. Operands are applied just after a rising clock edge and
// both products (through the (9,2)-family array and through the
// (27,5)/(5,5,4) array) are compared with x*y at the next rising edge: the
// multiplication completes within a single cycle.
//
// Operands: zero, one, all ones, alternating bit patterns (every Booth group
// negative or every group +2X), normalized IEEE significands (bit 52 set)
// and random pairs. The test also counts how often each mechanism occurred
// and fails if one never did: each of the six Booth row operations
// (+0, +X, +2X, -2X, -X, -0), a lateral carry between columns of the (9,2)
// array at both the (9,2) and the (6,2) level, a (27,5) counter with its
// weight-16 output set, and a carry out of the final adder's low half
// reaching the high half.
module tb_booth_multiplier_top;
  import mult_pkg::*;
  localparam int N = SIG_WIDTH;
  localparam int COLS = 2 * N;
  localparam int ROWS = N / 2 + 1;

  logic [N-1:0]    x, y;
  logic [COLS-1:0] p92, p275, expect_p;
  int checks = 0, failures = 0;
  int op_count [8];                 // per Booth group value {y_hi, y_mid, y_lo}
  int lat92 = 0, lat62 = 0, y16 = 0, mid_carry = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_multiplier_top dut (.multiplicand(x), .multiplier(y),
                            .product_9_2(p92), .product_27_5(p275));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xa, input logic [N-1:0] ya);
    logic [N+2:0] yext;
    logic [N:0]   low;
    @(posedge clk);
    #1;
    x = xa;
    y = ya;
    expect_p = COLS'(x) * COLS'(y);
    yext = {2'b00, y, 1'b0};
    for (int r = 0; r < ROWS; r++) op_count[yext[2*r +: 3]]++;
    @(posedge clk);
    checks++;
    if (p92 != expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL (9,2) x=%h y=%h p=%h expected %h", x, y, p92, expect_p);
    end
    checks++;
    if (p275 != expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL (27,5) x=%h y=%h p=%h expected %h", x, y, p275, expect_p);
    end
    // mechanism coverage, read from inside the design
    for (int c = 1; c <= COLS; c++) begin
      if (dut.u_tree_92.link[c].c92 != '0) begin lat92++; break; end
    end
    for (int c = 1; c <= COLS; c++) begin
      if (dut.u_tree_92.link[c].c62 != '0) begin lat62++; break; end
    end
    for (int c = 0; c < COLS; c++) begin
      if (dut.u_tree_275.cnt[c][4]) begin y16++; break; end
    end
    low = {1'b0, dut.sum_92[N-1:0]} + {1'b0, dut.carry_92[N-1:0]};
    if (low[N]) mid_carry++;
  endtask

  initial begin
    x = '0; y = '0;
    foreach (op_count[i]) op_count[i] = 0;
    apply('0, '0);
    apply(N'(1), N'(1));
    apply('1, '1);
    apply('1, {(N+1)/2{2'b10}} >> 1);
    apply('1, N'({(N+1)/2{2'b10}}));
    apply({(N+1)/2{2'b01}} >> 1, '1);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] a, b;
      a = N'({$urandom, $urandom});
      b = N'({$urandom, $urandom});
      if (n % 2 == 0) begin a[N-1] = 1'b1; b[N-1] = 1'b1; end  // normalized significands
      apply(a, b);
    end
    $display("Booth ops +0:%0d +X:%0d +2X:%0d -2X:%0d -X:%0d -0:%0d",
             op_count[0], op_count[1] + op_count[2], op_count[3], op_count[4],
             op_count[5] + op_count[6], op_count[7]);
    $display("lateral (9,2) carries:%0d lateral (6,2) carries:%0d (27,5) y4 set:%0d adder mid carry:%0d",
             lat92, lat62, y16, mid_carry);
    foreach (op_count[i]) begin
      checks++;
      if (op_count[i] == 0) begin failures++; $display("FAIL Booth group %b never used", 3'(i)); end
    end
    checks++; if (lat92 == 0)     begin failures++; $display("FAIL no (9,2) lateral carry"); end
    checks++; if (lat62 == 0)     begin failures++; $display("FAIL no (6,2) lateral carry"); end
    checks++; if (y16 == 0)       begin failures++; $display("FAIL no (27,5) weight-16 output"); end
    checks++; if (mid_carry == 0) begin failures++; $display("FAIL no adder carry into upper half"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
