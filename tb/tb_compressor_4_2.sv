// tb_compressor_4_2: exhaustive self-check of the exact 4:2 compressor.
// For all 32 input combinations it checks
//   X1+X2+X3+X4+Cin = Sum + 2*(Carry + Cout)
// and that Cout does not depend on Cin (flipping Cin must leave Cout alone),
// which is what lets a row of compressors avoid a carry ripple.
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_at_0;
      for (int ci = 0; ci < 2; ci++) begin
        int unsigned expected, got;
        x   = v[3:0];
        cin = ci[0];
        #1;
        expected = $countones(v[3:0]) + ci;
        got      = sum + 2 * (carry + cout);
        checks++;
        if (got != expected) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d (value %0d, expected %0d)",
                   x, cin, sum, carry, cout, got, expected);
        end
        if (ci == 0) cout_at_0 = cout;
        else begin
          checks++;
          if (cout !== cout_at_0) begin
            failures++;
            $display("FAIL x=%b: cout depends on cin", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
