// tb_mag_square: checks re^2 + im^2 at the default width (20 bits) for the
// extreme values (most negative, most positive, zero) and 20000 random
// samples, against integer arithmetic.
module tb_mag_square;
  localparam int unsigned W = 20;
  logic signed [W-1:0] re, im;
  logic [2*W-1:0] sq;
  int checks = 0, failures = 0;

  mag_square dut (.re, .im, .sq);

  task automatic check(input longint r, input longint i);
    longint e;
    re = W'(r);
    im = W'(i);
    #1;
    e = r * r + i * i;
    checks++;
    if (sq != (2*W)'(e)) begin
      failures++;
      $display("FAIL |%0d,%0d|^2 = %0d, got %0d", r, i, e, sq);
    end
  endtask

  initial begin
    longint lo, hi;
    lo = -(64'sd1 <<< (W - 1));
    hi = (64'sd1 <<< (W - 1)) - 1;
    check(lo, lo);
    check(hi, lo);
    check(0, hi);
    check(-1, 1);
    for (int n = 0; n < 20000; n++)
      check(longint'($signed(W'($urandom))), longint'($signed(W'($urandom))));
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
