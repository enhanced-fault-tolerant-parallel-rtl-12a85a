// scale_c45: multiplies a signed value by cos(pi/4) with a Vedic multiplier.
//
// y = round(x * TW_C45 / 2^TWF), rounding half away from zero.  The operand is
// converted to sign and magnitude, the magnitude is multiplied by the twiddle
// constant in a vedic_mult, the product is rounded back to an integer and the
// sign restored.  Because the constant is below one, y fits in the width of x.
// This is the only non-trivial twiddle product of an 8-point FFT; the
// sign-magnitude structure is this design's choice.
//
// Interface: x (W bits, signed) -> y (W bits, signed).  Combinational.
module scale_c45
  import fft_pkg::*;
#(
  parameter int unsigned W = 21
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned MW = mul_width(W);

  logic          neg;
  logic [MW-1:0] mag;
  logic [2*MW-1:0] prod;
  logic [2*MW-1:0] rnd;   // only the low W bits can be non-zero (constant < 1)

  assign neg = x[W-1];
  assign mag = MW'(unsigned'(neg ? -x : x));  // W-bit magnitude, zero-extended

  vedic_mult #(.N(MW)) u_mul (
    .a (mag),
    .b (MW'(TW_C45)),
    .p (prod)
  );

  assign rnd = (prod + (2*MW)'(1 << (TWF - 1))) >> TWF;
  assign y   = neg ? -W'(rnd) : W'(rnd);

endmodule
