// fft_pkg: constants and helpers shared by the protected parallel-FFT design.
//
// The design protects four parallel 8-point FFTs with one parity FFT and three
// Parseval (sum-of-squares) checks placed on error-correcting-code combinations
// of the channels.  Check c1 covers channels 1,2,3, c2 covers 1,2,4 and c3
// covers 1,3,4, so a single faulty channel flips a unique pattern of the three
// check flags (the syndrome).  The syndrome table and the transform size follow
// the published scheme; the twiddle precision is a choice of this design.
package fft_pkg;

  // Transform size: 8 points, 3 radix-2 stages.
  localparam int unsigned NPTS = 8;
  localparam int unsigned LOGN = 3;

  // Twiddle magnitude cos(pi/4) = sin(pi/4) in unsigned fixed point with
  // TWF fraction bits: round(2^17 / sqrt(2)) = 92682 (relative error 8e-7).
  localparam int unsigned TWF = 17;
  localparam logic [16:0] TW_C45 = 17'd92682;

  // Where a single error is, as decoded from the three check flags.
  typedef enum logic [2:0] {
    LOC_NONE = 3'd0,  // syndrome 000
    LOC_CH1  = 3'd1,  // syndrome 111
    LOC_CH2  = 3'd2,  // syndrome 110
    LOC_CH3  = 3'd3,  // syndrome 101
    LOC_CH4  = 3'd4,  // syndrome 011
    LOC_CHK1 = 3'd5,  // syndrome 100: check path 1 itself
    LOC_CHK2 = 3'd6,  // syndrome 010: check path 2 itself
    LOC_CHK3 = 3'd7   // syndrome 001: check path 3 itself
  } err_loc_e;

  // Syndrome {p1,p2,p3} -> error location (single-error code table).
  function automatic err_loc_e decode_syndrome(input logic [2:0] s);
    unique case (s)
      3'b111:  return LOC_CH1;
      3'b110:  return LOC_CH2;
      3'b101:  return LOC_CH3;
      3'b011:  return LOC_CH4;
      3'b100:  return LOC_CHK1;
      3'b010:  return LOC_CHK2;
      3'b001:  return LOC_CHK3;
      default: return LOC_NONE;
    endcase
  endfunction

  // Multiplier width for an operand of w bits: next multiple of 4 (the Vedic
  // multiplier is built from 4-bit digits), at least 20 so that TW_C45 fits.
  function automatic int unsigned mul_width(input int unsigned w);
    int unsigned r;
    r = ((w + 3) / 4) * 4;
    return (r < 20) ? 20 : r;
  endfunction

endpackage
