// tb_half_adder: exhaustive self-check of half_adder.
// All four input pairs are applied; s and c are compared with the
// arithmetic sum a + b split into its two bits.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] total;
      {a, b} = v[1:0];
      #1;
      total = 2'(v[1]) + 2'(v[0]);
      checks++;
      if ({c, s} !== total) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> c=%0d s=%0d, expected %0d", a, b, c, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
