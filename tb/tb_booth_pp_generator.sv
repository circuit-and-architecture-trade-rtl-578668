// tb_booth_pp_generator: the sum of all partial-product slots, modulo
// 2^(2N), must equal x*y.
//  - N = 8 (the textbook 8-bit example): all 65536 operand pairs. The matrix
//    must be 5 rows high and hold 56 bit positions, and every position
//    outside that layout must stay zero.
//  - N = 53 (IEEE double significand, default): corner operands and 3000
//    random pairs; the matrix must be 27 rows high, no column may hold more
//    than 27 bits, and positions outside the layout must stay zero.
module tb_booth_pp_generator;
  import mult_pkg::*;

  localparam int N8 = 8, R8 = N8 / 2 + 1, C8 = 2 * N8;
  localparam int N53 = 53, R53 = N53 / 2 + 1, C53 = 2 * N53;

  logic [N8-1:0]           x8, y8;
  logic [R8-1:0][C8-1:0]   pp8;
  logic [N53-1:0]          x53, y53;
  logic [R53-1:0][C53-1:0] pp53;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_pp_generator #(.N(N8)) dut8  (.x(x8),  .y(y8),  .pp(pp8));
  booth_pp_generator           dut53 (.x(x53), .y(y53), .pp(pp53));

  function automatic int count_used(int n);
    int cnt = 0;
    for (int s = 0; s < n / 2 + 1; s++)
      for (int c = 0; c < 2 * n; c++) cnt += int'(pp_slot_used(n, s, c));
    return cnt;
  endfunction

  function automatic int max_height(int n);
    int mh = 0;
    for (int c = 0; c < 2 * n; c++) begin
      int h = 0;
      for (int s = 0; s < n / 2 + 1; s++) h += int'(pp_slot_used(n, s, c));
      if (h > mh) mh = h;
    end
    return mh;
  endfunction

  task automatic check8();
    logic [C8-1:0] acc;
    #1;
    acc = '0;
    for (int s = 0; s < R8; s++) acc += pp8[s];
    checks++;
    if (acc != C8'(x8) * C8'(y8)) begin
      failures++;
      if (failures < 10) $display("FAIL N=8 x=%0d y=%0d sum=%0d", x8, y8, acc);
    end
    for (int s = 0; s < R8; s++)
      for (int c = 0; c < C8; c++)
        if (!pp_slot_used(N8, s, c) && pp8[s][c]) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 stray bit slot %0d col %0d", s, c);
        end
  endtask

  task automatic check53();
    logic [C53-1:0] acc;
    #1;
    acc = '0;
    for (int s = 0; s < R53; s++) acc += pp53[s];
    checks++;
    if (acc != C53'(x53) * C53'(y53)) begin
      failures++;
      if (failures < 10) $display("FAIL N=53 x=%h y=%h", x53, y53);
    end
    checks++;
    for (int s = 0; s < R53; s++)
      for (int c = 0; c < C53; c++)
        if (!pp_slot_used(N53, s, c) && pp53[s][c]) begin
          failures++;
          if (failures < 10) $display("FAIL N=53 stray bit slot %0d col %0d", s, c);
        end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (R8 != 5 || count_used(N8) != 56) begin
      failures++;
      $display("FAIL N=8 layout: %0d rows, %0d bits", R8, count_used(N8));
    end
    checks++;
    if (R53 != 27 || max_height(N53) > PP_HEIGHT) begin
      failures++;
      $display("FAIL N=53 layout: %0d rows, max column height %0d", R53, max_height(N53));
    end
    $display("N=53 matrix: %0d rows, %0d bit positions, max column height %0d",
             R53, count_used(N53), max_height(N53));

    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      check8();
    end

    x53 = '0; y53 = '0; check53();
    x53 = '1; y53 = '1; check53();
    x53 = '1; y53 = 53'h0AAAAAAAAAAAAA; check53();
    x53 = '1; y53 = 53'h15555555555555; check53();
    for (int n = 0; n < 3000; n++) begin
      x53 = 53'({$urandom, $urandom});
      y53 = 53'({$urandom, $urandom});
      check53();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
