// mag_square: squared magnitude re^2 + im^2 of one complex sample.
//
// Both parts are turned into magnitudes and squared by Vedic multipliers
// (vedic_mult); the two squares are added.  This is the "magnitude square"
// stage of a Parseval check.  Using the Vedic multiplier here follows the
// published scheme's choice of replacing multipliers by Vedic ones; the
// sign-magnitude form is this design's choice.
//
// Interface: re, im (W bits, signed) -> sq (2W bits, unsigned).
// Combinational.
module mag_square
  import fft_pkg::*;
#(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [2*W-1:0]      sq
);

  localparam int unsigned MW = mul_width(W);

  logic [MW-1:0]   mag_re, mag_im;
  logic [2*MW-1:0] sq_re, sq_im;

  assign mag_re = MW'(unsigned'(re[W-1] ? -re : re));
  assign mag_im = MW'(unsigned'(im[W-1] ? -im : im));

  vedic_mult #(.N(MW)) u_sq_re (.a(mag_re), .b(mag_re), .p(sq_re));
  vedic_mult #(.N(MW)) u_sq_im (.a(mag_im), .b(mag_im), .p(sq_im));

  // Each square is at most 2^(2W-2), so the sum fits 2W bits.
  assign sq = (2*W)'(sq_re) + (2*W)'(sq_im);

endmodule
