// tb_dadda_reduction_8x8: self-check of the two-stage reduction tree.
// Part 1 applies the AND array of every 8-bit operand pair (65536 cases) and
// checks row_a + row_b = a * b. Part 2 applies 50000 random bit matrices,
// not only AND arrays, and checks that the two rows add up to the weighted
// sum of all input bits, sum over i,j of pp[i][j] * 2^(i+j). It also checks
// that the bits of row_b the tree never drives (0, 3 and 15) stay 0.
module tb_dadda_reduction_8x8;
  import dadda_pkg::*;

  pp_matrix_t pp;
  product_t   row_a, row_b;
  int checks = 0, failures = 0;

  dadda_reduction_8x8 dut (.pp(pp), .row_a(row_a), .row_b(row_b));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned weighted_sum(pp_matrix_t m);
    int unsigned total = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (m[i][j]) total += 1 << (i + j);
    return total;
  endfunction

  task automatic check(input int unsigned expected, input string what);
    int unsigned got;
    #1;
    got = int'(row_a) + int'(row_b);
    checks++;
    if (got != expected || row_b[0] || row_b[3] || row_b[15]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: row_a=%h row_b=%h sum=%0d expected %0d", what, row_a, row_b, got, expected);
    end
  endtask

  initial begin
    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++) begin
        for (int i = 0; i < N; i++) pp[i] = va[N-1:0] & {N{vb[i]}};
        check(va * vb, "and-array");
      end
    for (int n = 0; n < 50000; n++) begin
      pp = {$urandom, $urandom};
      check(weighted_sum(pp), "random matrix");
    end
    pp = '1;
    check(weighted_sum(pp), "all ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
