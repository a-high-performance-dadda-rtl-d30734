// tb_dadda_multiplier_8x8: end-to-end check of the 8x8 multiplier at its
// only size. All 65536 operand pairs are applied and p is compared with
// a * b computed in integer arithmetic.
//
// It also counts, over the run, how often each carry path of the reduction
// tree is exercised, and fails if one never is:
//   - the column-2 half adder's carry into the 4:2 compressor's Cin
//   - the 4:2 compressor's Cout into the first 5:2 compressor's Cin1
//   - both Cin1 and Cin2 of a 5:2 compressor high at once (chained Couts)
//   - the last 5:2 compressor's Cout1/Cout2 absorbed by the column-12 full adder
//   - the column-13 half adder's carry into column 14
//   - a carry generated in the final adder (row_a & row_b non-zero)
module tb_dadda_multiplier_8x8;
  import dadda_pkg::*;

  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;

  int n_ha2_carry = 0, n_c42_cout = 0, n_c52_both_cin = 0;
  int n_fa12_from_chain = 0, n_ha13_carry = 0, n_cpa_carry = 0;

  dadda_multiplier_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(input string what, input int count);
    checks++;
    $display("  %-44s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++) begin
        int unsigned expected;
        a = va[N-1:0];
        b = vb[N-1:0];
        #1;
        expected = va * vb;
        checks++;
        if (p !== expected[PW-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", va, vb, p, expected);
        end
        if (dut.u_red.ha2_c)                                  n_ha2_carry++;
        if (dut.u_red.c42_cout)                               n_c42_cout++;
        if (|(dut.u_red.c52_cin1 & dut.u_red.c52_cin2))       n_c52_both_cin++;
        if (dut.u_red.c52_cout1[11] | dut.u_red.c52_cout2[11]) n_fa12_from_chain++;
        if (dut.u_red.ha13f_c)                                n_ha13_carry++;
        if (|(dut.row_a & dut.row_b))                         n_cpa_carry++;
      end
    $display("carry paths exercised (operand pairs):");
    expect_seen("half adder col 2 -> 4:2 Cin", n_ha2_carry);
    expect_seen("4:2 Cout -> 5:2 Cin1", n_c42_cout);
    expect_seen("5:2 with Cin1 and Cin2 both set", n_c52_both_cin);
    expect_seen("5:2 chain Cout -> full adder col 12", n_fa12_from_chain);
    expect_seen("half adder col 13 carry -> col 14", n_ha13_carry);
    expect_seen("carry generated in final adder", n_cpa_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
