// tb_partial_product_gen: self-check of the AND array at N = 8.
// All 65536 operand pairs are applied; every bit pp[i][j] is compared with
// a[j] & b[i], and the weighted sum of the array with a * b.
module tb_partial_product_gen;
  localparam int unsigned N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 2**N; va++) begin
      for (int vb = 0; vb < 2**N; vb++) begin
        int unsigned weighted;
        logic bit_ok;
        a = va[N-1:0];
        b = vb[N-1:0];
        #1;
        weighted = 0;
        bit_ok   = 1'b1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            if (pp[i][j] !== (va[j] & vb[i])) bit_ok = 1'b0;
            if (pp[i][j]) weighted += 1 << (i + j);
          end
        checks++;
        if (!bit_ok || weighted != va * vb) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d", va, vb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
