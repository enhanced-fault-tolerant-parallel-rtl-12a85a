// fft8: 8-point complex FFT with one-sample-per-cycle input and output.
//
// Samples of a frame arrive in natural order, one per cycle in which in_valid
// is high (gaps are allowed).  The eighth sample completes the frame: in that
// same clock edge the whole transform is computed by a combinational radix-2
// decimation-in-time network (bit-reversed input order, three butterfly
// stages) and stored in an output buffer.  The buffer is then streamed out in
// natural order, X[0] first, one bin per cycle for eight cycles with out_valid
// high.  Loading of the next frame overlaps the streaming, so frames can follow
// each other back to back at one sample per cycle.
//
// Twiddles: W8^0 = 1 and W8^2 = -j are wiring; W8^1 = c(1-j) and
// W8^3 = -c(1+j), c = cos(pi/4), need c*(re+im) and c*(im-re), which four
// scale_c45 units (Vedic multipliers) form, rounded to integers.  No scaling is
// applied, so X[k] = sum x[n] W8^(nk) and the output is IW+4 bits wide.
//
// fault_re/fault_im are XORed onto the streamed output.  They are zero in
// normal use and let a soft error in the transform be emulated.
//
// The sequential input/output and the use of Vedic multipliers follow the
// published scheme; the network, the rounding, the widths, the synchronous
// active-high reset and the fault inputs are this design's choices.
//
// Timing: the sample completing frame n is taken in cycle t; X[k] of that
// frame is on out_re/out_im in cycle t+1+k (k = 0..7).
module fft8
  import fft_pkg::*;
#(
  parameter int unsigned IW = 16,        // bits of the real and of the imaginary part of a sample
  parameter int unsigned OW = IW + 4     // output width (8-point growth plus sign)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [2:0]           out_idx,  // frequency index of the bin on the output
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  input  logic [OW-1:0]        fault_re,
  input  logic [OW-1:0]        fault_im
);

  typedef logic signed [OW-1:0] word_t;

  // ---------------------------------------------------------------- input
  word_t      xin_re [NPTS];
  word_t      xin_im [NPTS];
  logic [2:0] in_cnt;
  logic       frame_done;

  assign frame_done = in_valid && (in_cnt == 3'(NPTS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt <= '0;
    end else if (in_valid) begin
      in_cnt <= in_cnt + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      xin_re[in_cnt] <= OW'(in_re);
      xin_im[in_cnt] <= OW'(in_im);
    end
  end

  // ------------------------------------------------------------ transform
  word_t s0_re [NPTS], s0_im [NPTS];
  word_t s1_re [NPTS], s1_im [NPTS];
  word_t s2_re [NPTS], s2_im [NPTS];
  word_t s3_re [NPTS], s3_im [NPTS];

  // Inputs of the four constant multipliers: c*(re+im) and c*(im-re) of
  // s2[5] (twiddle W8^1) and of s2[7] (twiddle W8^3).
  logic signed [OW:0] m_in  [4];
  logic signed [OW:0] m_out [4];

  assign m_in[0] = (OW+1)'(s2_re[5]) + (OW+1)'(s2_im[5]);
  assign m_in[1] = (OW+1)'(s2_im[5]) - (OW+1)'(s2_re[5]);
  assign m_in[2] = (OW+1)'(s2_re[7]) + (OW+1)'(s2_im[7]);
  assign m_in[3] = (OW+1)'(s2_im[7]) - (OW+1)'(s2_re[7]);

  for (genvar m = 0; m < 4; m++) begin : g_tw
    scale_c45 #(.W(OW + 1)) u_c45 (.x(m_in[m]), .y(m_out[m]));
  end

  always_comb begin
    word_t t_re, t_im;
    // Frame in bit-reversed order; the sample of this cycle is x[7].
    for (int k = 0; k < NPTS; k++) begin
      int unsigned n;
      n = {29'd0, k[0], k[1], k[2]};
      if (n == NPTS - 1) begin
        s0_re[k] = OW'(in_re);
        s0_im[k] = OW'(in_im);
      end else begin
        s0_re[k] = xin_re[n];
        s0_im[k] = xin_im[n];
      end
    end
    // Stage 1: 2-point butterflies.
    for (int g = 0; g < NPTS; g += 2) begin
      s1_re[g]   = s0_re[g] + s0_re[g+1];
      s1_im[g]   = s0_im[g] + s0_im[g+1];
      s1_re[g+1] = s0_re[g] - s0_re[g+1];
      s1_im[g+1] = s0_im[g] - s0_im[g+1];
    end
    // Stage 2: 4-point butterflies, twiddles 1 and -j.
    for (int g = 0; g < NPTS; g += 4) begin
      for (int j = 0; j < 2; j++) begin
        if (j == 0) begin
          t_re = s1_re[g+2];
          t_im = s1_im[g+2];
        end else begin
          t_re = s1_im[g+3];
          t_im = -s1_re[g+3];
        end
        s2_re[g+j]   = s1_re[g+j] + t_re;
        s2_im[g+j]   = s1_im[g+j] + t_im;
        s2_re[g+j+2] = s1_re[g+j] - t_re;
        s2_im[g+j+2] = s1_im[g+j] - t_im;
      end
    end
  end

  always_comb begin
    word_t t_re, t_im;
    // Stage 3: 8-point butterflies, twiddles W8^0..W8^3.
    for (int j = 0; j < 4; j++) begin
      unique case (j)
        0: begin t_re = s2_re[4];          t_im = s2_im[4];           end
        1: begin t_re = OW'(m_out[0]);     t_im = OW'(m_out[1]);      end
        2: begin t_re = s2_im[6];          t_im = -s2_re[6];          end
        default: begin t_re = OW'(m_out[3]); t_im = -OW'(m_out[2]);   end
      endcase
      s3_re[j]   = s2_re[j] + t_re;
      s3_im[j]   = s2_im[j] + t_im;
      s3_re[j+4] = s2_re[j] - t_re;
      s3_im[j+4] = s2_im[j] - t_im;
    end
  end

  // --------------------------------------------------------------- output
  word_t      ob_re [NPTS];
  word_t      ob_im [NPTS];
  logic [2:0] out_cnt;
  logic       busy;

  always_ff @(posedge clk) begin
    if (frame_done) begin
      ob_re <= s3_re;
      ob_im <= s3_im;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      out_cnt <= '0;
    end else if (frame_done) begin
      busy    <= 1'b1;
      out_cnt <= '0;
    end else if (busy) begin
      out_cnt <= out_cnt + 3'd1;
      if (out_cnt == 3'(NPTS - 1)) busy <= 1'b0;
    end
  end

  assign out_valid = busy;
  assign out_idx   = out_cnt;
  assign out_re    = ob_re[out_cnt] ^ fault_re;
  assign out_im    = ob_im[out_cnt] ^ fault_im;

  // A new frame may only complete once the previous one has been streamed.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    frame_done |-> (!busy || out_cnt == 3'(NPTS - 1)));

endmodule
