// tb_vedic_mult: checks the N-bit digit-wise Vedic multiplier at its default
// width (24 bits) against the integer product: corner operands (0, 1, all
// ones, single high bits) and 20000 random pairs.
module tb_vedic_mult;
  localparam int unsigned N = 24;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  vedic_mult dut (.a, .b, .p);

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expect_p;
    a = x;
    b = y;
    #1;
    expect_p = (2*N)'(x) * (2*N)'(y);
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %0d*%0d = %0d, got %0d", x, y, expect_p, p);
    end
  endtask

  initial begin
    logic [N-1:0] corner [5];
    corner = '{'0, N'(1), '1, N'(1) << (N - 1), N'(24'h5A5A5A)};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
