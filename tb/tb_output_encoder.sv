// tb_output_encoder: checks the three check combinations (X1+X2+X3,
// X1+X2+X4, X1+X3+X4) of random and extreme 20-bit FFT bins, real and imaginary parts, against integer sums.
module tb_output_encoder;
  localparam int unsigned OW = 20;
  logic signed [OW-1:0] x_re [4], x_im [4];
  logic signed [OW+1:0] c_re [3], c_im [3];
  int checks = 0, failures = 0;
  int MEMBER [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};

  output_encoder dut (.*);

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
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin x_re[i] = -524288; x_im[i] = 524287; end
    check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) begin
        x_re[i] = OW'($urandom);
        x_im[i] = OW'($urandom);
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
