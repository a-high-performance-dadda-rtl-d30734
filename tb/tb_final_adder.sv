// tb_final_adder: self-check of the two-row adder at W = 16.
// Corner cases (zero, all ones, a carry through every bit) and 20000 random
// pairs are compared with the sum computed in 32-bit integer arithmetic.
module tb_final_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned va, input int unsigned vb);
    int unsigned expected;
    a = va[W-1:0];
    b = vb[W-1:0];
    #1;
    expected = (va + vb) & ((1 << W) - 1);
    checks++;
    if (s !== expected[W-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d -> %0d, expected %0d", va, vb, s, expected);
    end
  endtask

  initial begin
    apply(0, 0);
    apply(16'hffff, 1);
    apply(16'h7fff, 1);
    apply(16'haaaa, 16'h5555);
    apply(16'hffff, 16'hffff);
    for (int n = 0; n < 20000; n++) apply($urandom & 16'hffff, $urandom & 16'hffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
