// input_encoder: forms the inputs of the redundant paths from the four
// channel inputs, sample by sample.
//
//   c[0] = x1 + x2 + x3   (input of Parseval check 1)
//   c[1] = x1 + x2 + x4   (input of Parseval check 2)
//   c[2] = x1 + x3 + x4   (input of Parseval check 3)
//   s    = x1 + x2 + x3 + x4  (input of the parity FFT)
//
// The three combinations are the rows of a single-error-correcting code over
// the four channels; the combinations are the published ones.  The sums are
// exact: two guard bits (IW+2) hold a sum of four IW-bit values.
//
// Interface: x_re/x_im[4] (IW bits each) -> c_re/c_im[3], s_re/s_im (IW+2
// bits).  Combinational, applied to real and imaginary parts alike.
module input_encoder #(
  parameter int unsigned IW = 16
) (
  input  logic signed [IW-1:0] x_re [4],
  input  logic signed [IW-1:0] x_im [4],
  output logic signed [IW+1:0] c_re [3],
  output logic signed [IW+1:0] c_im [3],
  output logic signed [IW+1:0] s_re,
  output logic signed [IW+1:0] s_im
);

  typedef logic signed [IW+1:0] wide_t;

  // Channels (0-based) summed by each check, from the code table.
  localparam int unsigned MEMBER [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      c_re[c] = '0;
      c_im[c] = '0;
      for (int m = 0; m < 3; m++) begin
        c_re[c] = c_re[c] + wide_t'(x_re[MEMBER[c][m]]);
        c_im[c] = c_im[c] + wide_t'(x_im[MEMBER[c][m]]);
      end
    end
    s_re = '0;
    s_im = '0;
    for (int i = 0; i < 4; i++) begin
      s_re = s_re + wide_t'(x_re[i]);
      s_im = s_im + wide_t'(x_im[i]);
    end
  end

endmodule
