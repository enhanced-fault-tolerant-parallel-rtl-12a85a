// tb_mag_compare: checks the tolerant comparator at its defaults
// (TOL_SHIFT = 10, TOL_ABS = 131072): equal values, differences just inside
// and just outside the limit (max(a,b) >> 10) + 131072 in both directions,
// and random pairs against the same rule computed in the testbench.
module tb_mag_compare;
  localparam int unsigned AW = 48;
  logic [AW-1:0] a, b;
  logic mismatch;
  int checks = 0, failures = 0;

  mag_compare dut (.a, .b, .mismatch);

  task automatic check(input longint x, input longint y, input bit expect_m);
    a = AW'(x);
    b = AW'(y);
    #1;
    checks++;
    if (mismatch != expect_m) begin
      failures++;
      $display("FAIL a=%0d b=%0d mismatch=%b expected %b", x, y, mismatch, expect_m);
    end
  endtask

  initial begin
    longint big_e, lim;
    check(0, 0, 0);
    check(131072, 0, 0);
    check(0, 131200, 0);
    check(0, 131329, 1);
    big_e = 64'd1 << 40;
    lim = (big_e >> 10) + 131072;
    check(big_e, big_e - lim, 0);
    check(big_e, big_e - lim - 1, 1);
    check(big_e - lim - 1, big_e, 1);
    check(big_e + 5, big_e, 0);
    for (int n = 0; n < 20000; n++) begin
      longint x, y, hi, lo;
      x = longint'({$urandom, $urandom} & ((64'd1 << 44) - 1));
      y = ($urandom_range(1, 0) == 1) ? x + longint'($urandom_range(300000, 0)) - 150000
                                      : longint'({$urandom, $urandom} & ((64'd1 << 44) - 1));
      if (y < 0) y = 0;
      hi = (x > y) ? x : y;
      lo = (x > y) ? y : x;
      check(x, y, (hi - lo) > (hi >> 10) + 131072);
    end
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
