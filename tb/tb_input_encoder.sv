// tb_input_encoder: checks the three check combinations (x1+x2+x3,
// x1+x2+x4, x1+x3+x4) and the parity sum x1+x2+x3+x4 of random and extreme
// 16-bit samples, real and imaginary parts, against integer sums.
module tb_input_encoder;
  localparam int unsigned IW = 16;
  logic signed [IW-1:0] x_re [4], x_im [4];
  logic signed [IW+1:0] c_re [3], c_im [3], s_re, s_im;
  int checks = 0, failures = 0;
  int MEMBER [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};

  input_encoder dut (.*);

  task automatic check();
    int er, ei;
    #1;
    for (int c = 0; c < 3; c++) begin
      er = 0; ei = 0;
      for (int m = 0; m < 3; m++) begin
        er += int'(x_re[MEMBER[c][m]]);
        ei += int'(x_im[MEMBER[c][m]]);
      end
      checks += 2;
      if (int'(c_re[c]) != er) begin failures++; $display("FAIL c_re[%0d] %0d expected %0d", c, c_re[c], er); end
      if (int'(c_im[c]) != ei) begin failures++; $display("FAIL c_im[%0d] %0d expected %0d", c, c_im[c], ei); end
    end
    er = 0; ei = 0;
    for (int i = 0; i < 4; i++) begin
      er += int'(x_re[i]);
      ei += int'(x_im[i]);
    end
    checks += 2;
    if (int'(s_re) != er) begin failures++; $display("FAIL s_re %0d expected %0d", s_re, er); end
    if (int'(s_im) != ei) begin failures++; $display("FAIL s_im %0d expected %0d", s_im, ei); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin x_re[i] = -32768; x_im[i] = 32767; end
    check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) begin
        x_re[i] = IW'($urandom);
        x_im[i] = IW'($urandom);
      end
      check();
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
