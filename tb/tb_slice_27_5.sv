// tb_slice_27_5: one two-column slice of the (27,5)/(5,5,4) array. Each
// (27,5) count must equal the number of ones in its column and the (5,5,4)
// result must equal ones(cmp_lo) + 2*ones(cmp_hi). A second part wires two
// slices together as in the array (bits of each count routed k columns to
// the left) and checks that the four columns reduce to the right total.
module tb_slice_27_5;
  logic [26:0] col_lo, col_hi;
  logic [4:0]  cnt_lo, cnt_hi, cmp_lo, cmp_hi;
  logic [3:0]  y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  slice_27_5 dut (.col_lo(col_lo), .col_hi(col_hi), .cnt_lo(cnt_lo), .cnt_hi(cnt_hi),
                  .cmp_lo(cmp_lo), .cmp_hi(cmp_hi), .y(y));

  // Two slices covering columns 0..3, as on the prototype.
  logic [3:0][26:0] pcol;
  logic [3:0][4:0]  pcnt, pcmp;
  logic [1:0][3:0]  py;

  slice_27_5 u_s0 (.col_lo(pcol[0]), .col_hi(pcol[1]), .cnt_lo(pcnt[0]), .cnt_hi(pcnt[1]),
                   .cmp_lo(pcmp[0]), .cmp_hi(pcmp[1]), .y(py[0]));
  slice_27_5 u_s1 (.col_lo(pcol[2]), .col_hi(pcol[3]), .cnt_lo(pcnt[2]), .cnt_hi(pcnt[3]),
                   .cmp_lo(pcmp[2]), .cmp_hi(pcmp[3]), .y(py[1]));

  always_comb
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 5; k++) pcmp[c][k] = (c >= k) ? pcnt[c-k][k] : 1'b0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int dens, total, got;
      dens = $urandom_range(0, 8);
      for (int i = 0; i < 27; i++) begin
        col_lo[i] = ($urandom_range(0, 7) < dens);
        col_hi[i] = ($urandom_range(0, 7) < dens);
      end
      cmp_lo = 5'($urandom);
      cmp_hi = 5'($urandom);
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < 27; i++) pcol[c][i] = ($urandom_range(0, 7) < dens);
      if (n == 0) begin col_lo = '1; col_hi = '1; cmp_lo = '1; cmp_hi = '1; pcol = '1; end
      #1;
      checks++;
      if (int'(cnt_lo) != $countones(col_lo) || int'(cnt_hi) != $countones(col_hi)) begin
        failures++;
        if (failures < 10) $display("FAIL (27,5) counts %0d %0d", cnt_lo, cnt_hi);
      end
      checks++;
      if (int'(y) != $countones(cmp_lo) + 2 * $countones(cmp_hi)) begin
        failures++;
        if (failures < 10) $display("FAIL (5,5,4) %b %b -> %0d", cmp_hi, cmp_lo, y);
      end
      // Everything that falls outside columns 0..3 of the pair is still
      // accounted for: bits routed beyond column 3 and the top (5,5,4) bits.
      total = 0;
      for (int c = 0; c < 4; c++) total += $countones(pcol[c]) << c;
      got = int'(py[0]) + (int'(py[1]) << 2);
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 5; k++) if (c + k >= 4) got += int'(pcnt[c][k]) << (c + k);
      checks++;
      if (got != total) begin
        failures++;
        if (failures < 10) $display("FAIL two-slice total %0d expected %0d", got, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
