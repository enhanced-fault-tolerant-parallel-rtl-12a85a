// output_encoder: forms the outputs of the redundant check paths from the
// four channel FFT outputs, bin by bin.
//
//   C[0] = X1 + X2 + X3,  C[1] = X1 + X2 + X4,  C[2] = X1 + X3 + X4
//
// By linearity of the FFT, C[i] equals the transform of the matching
// input_encoder combination when all channels are fault-free, so a Parseval
// check between that combination and C[i] covers three channels at once.
// The combinations are the published ones; OW+2 bits make the sums exact.
//
// Interface: x_re/x_im[4] (OW bits) -> c_re/c_im[3] (OW+2 bits).
// Combinational.
module output_encoder #(
  parameter int unsigned OW = 20
) (
  input  logic signed [OW-1:0] x_re [4],
  input  logic signed [OW-1:0] x_im [4],
  output logic signed [OW+1:0] c_re [3],
  output logic signed [OW+1:0] c_im [3]
);

  typedef logic signed [OW+1:0] wide_t;

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
  end

endmodule
