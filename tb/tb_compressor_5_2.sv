// tb_compressor_5_2: exhaustive self-check of the exact 5:2 compressor.
// For all 128 input combinations it checks
//   X1+..+X5+Cin1+Cin2 = Sum + 2*(Carry + Cout1 + Cout2)
// and that Cout1/Cout2 do not depend on Cin1/Cin2, so that chaining
// compressors through Cout -> Cin creates no ripple path.
module tb_compressor_5_2;
  logic [4:0] x;
  logic       cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                      .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [1:0] couts_at_0;
      for (int ci = 0; ci < 4; ci++) begin
        int unsigned expected, got;
        x    = v[4:0];
        cin1 = ci[0];
        cin2 = ci[1];
        #1;
        expected = $countones(v[4:0]) + $countones(ci[1:0]);
        got      = sum + 2 * (carry + cout1 + cout2);
        checks++;
        if (got != expected) begin
          failures++;
          $display("FAIL x=%b cin1=%0d cin2=%0d -> sum=%0d carry=%0d cout1=%0d cout2=%0d (value %0d, expected %0d)",
                   x, cin1, cin2, sum, carry, cout1, cout2, got, expected);
        end
        if (ci == 0) couts_at_0 = {cout2, cout1};
        else begin
          checks++;
          if ({cout2, cout1} !== couts_at_0) begin
            failures++;
            $display("FAIL x=%b: cout1/cout2 depend on cin1/cin2", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
