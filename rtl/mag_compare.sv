// mag_compare: tolerant magnitude comparator of a Parseval check.
//
// Raises mismatch when the two energies a and b differ by more than
// (max(a,b) >> TOL_SHIFT) + TOL_ABS.  The FFT rounds its twiddle products, so
// the energies of a fault-free transform agree only approximately; the
// tolerance, relative for large signals and absolute for lo_e ones, absorbs
// that rounding.  Comparing the two accumulated energies is the published
// scheme; the tolerance rule and its values are this design's choices.
//
// Interface: a, b (AW bits, unsigned) -> mismatch.  Combinational.
module mag_compare #(
  parameter int unsigned AW        = 48,
  parameter int unsigned TOL_SHIFT = 10,
  parameter int unsigned TOL_ABS   = 131072
) (
  input  logic [AW-1:0] a,
  input  logic [AW-1:0] b,
  output logic          mismatch
);

  logic [AW-1:0] hi_e, lo_e, diff;
  logic [AW:0]   limit;

  assign hi_e      = (a >= b) ? a : b;
  assign lo_e    = (a >= b) ? b : a;
  assign diff     = hi_e - lo_e;
  assign limit    = (AW+1)'(hi_e >> TOL_SHIFT) + (AW+1)'(TOL_ABS);
  assign mismatch = (AW+1)'(diff) > limit;

endmodule
