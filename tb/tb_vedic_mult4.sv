// tb_vedic_mult4: exhaustive check of the 4x4 Urdhva Tiryagbhyam multiplier.
// All 256 operand pairs are applied and each product is compared with the
// integer product of the operands.
module tb_vedic_mult4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mult4 dut (.a, .b, .p);

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
