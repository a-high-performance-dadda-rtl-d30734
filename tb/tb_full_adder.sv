// tb_full_adder: exhaustive self-check of full_adder.
// All eight input combinations are applied; {co, s} must equal the count of
// ones among a, b and ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] total;
      {a, b, ci} = v[2:0];
      #1;
      total = 2'($countones(v[2:0]));
      checks++;
      if ({co, s} !== total) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d, expected %0d", a, b, ci, co, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
