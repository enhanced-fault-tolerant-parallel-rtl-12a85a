// edc: error detection and correction for one channel of the protected FFT
// bank (one instance per channel).
//
// While a frame of the channel's FFT output streams in (in_valid), each bin is
// stored twice in one bank of a ping-pong buffer: as produced (X_CH) and as
// rebuilt from the parity FFT,
//   Xc_CH = X_parity - (sum of the other three channels' outputs),
// which is exact for a fault-free bank by linearity of the FFT, up to the
// rounding of the twiddle products.  When the three Parseval flags of that
// frame arrive (syn_valid, syn = {p1,p2,p3}) the frame is streamed out of its
// bank, eight bins on eight cycles, taking Xc_CH instead of X_CH if the
// single-error code table puts the error in this channel
// (ch1 = 111, ch2 = 110, ch3 = 101, ch4 = 011).  Frames are flagged in order,
// so the read bank simply alternates with each syn_valid.
//
// The code table and the correction formula are the published ones; the
// ping-pong buffering, the timing and the corrected flag are this design's
// choices.
//
// Timing: syn_valid in cycle s starts the frame; bin k is on y_re/y_im in
// cycle s+1+k with y_valid high.
module edc
  import fft_pkg::*;
#(
  parameter int unsigned CH = 1,    // channel served, 1..4
  parameter int unsigned OW = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [OW-1:0] x_re,        // this channel's FFT output
  input  logic signed [OW-1:0] x_im,
  input  logic signed [OW-1:0] oth_re [3],  // the other three channels
  input  logic signed [OW-1:0] oth_im [3],
  input  logic signed [OW+1:0] par_re,      // parity FFT output
  input  logic signed [OW+1:0] par_im,
  input  logic                 syn_valid,
  input  logic [2:0]           syn,
  output logic                 y_valid,
  output logic signed [OW-1:0] y_re,
  output logic signed [OW-1:0] y_im,
  output logic                 corrected   // this frame was rebuilt
);

  typedef logic signed [OW+1:0] wide_t;
  typedef logic signed [OW-1:0] word_t;

  localparam err_loc_e MY_LOC = err_loc_e'(CH);

  // Rebuilt value of this bin; it fits OW bits whenever the parity and the
  // other channels are right, which is the single-error case it serves.
  wide_t rc_re, rc_im;
  assign rc_re = par_re - wide_t'(oth_re[0]) - wide_t'(oth_re[1]) - wide_t'(oth_re[2]);
  assign rc_im = par_im - wide_t'(oth_im[0]) - wide_t'(oth_im[1]) - wide_t'(oth_im[2]);

  word_t      raw_re [2][NPTS], raw_im [2][NPTS];
  word_t      fix_re [2][NPTS], fix_im [2][NPTS];
  logic       wr_bank;
  logic [2:0] wr_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_bank <= 1'b0;
      wr_cnt  <= '0;
    end else if (in_valid) begin
      wr_cnt <= wr_cnt + 3'd1;
      if (wr_cnt == 3'(NPTS - 1)) wr_bank <= ~wr_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      raw_re[wr_bank][wr_cnt] <= x_re;
      raw_im[wr_bank][wr_cnt] <= x_im;
      fix_re[wr_bank][wr_cnt] <= OW'(rc_re);
      fix_im[wr_bank][wr_cnt] <= OW'(rc_im);
    end
  end

  logic       rd_next;   // bank of the next frame to be flagged
  logic       rd_bank;
  logic [2:0] rd_cnt;
  logic       rd_busy;
  logic       use_fix;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_next <= 1'b0;
      rd_bank <= 1'b0;
      rd_cnt  <= '0;
      rd_busy <= 1'b0;
      use_fix <= 1'b0;
    end else if (syn_valid) begin
      rd_bank <= rd_next;
      rd_next <= ~rd_next;
      rd_cnt  <= '0;
      rd_busy <= 1'b1;
      use_fix <= (decode_syndrome(syn) == MY_LOC);
    end else if (rd_busy) begin
      rd_cnt <= rd_cnt + 3'd1;
      if (rd_cnt == 3'(NPTS - 1)) rd_busy <= 1'b0;
    end
  end

  assign y_valid   = rd_busy;
  assign corrected = rd_busy && use_fix;
  assign y_re      = use_fix ? fix_re[rd_bank][rd_cnt] : raw_re[rd_bank][rd_cnt];
  assign y_im      = use_fix ? fix_im[rd_bank][rd_cnt] : raw_im[rd_bank][rd_cnt];

  // A new frame's flags may only arrive once the previous frame is out.
  a_flags_in_order: assert property (@(posedge clk) disable iff (rst)
    syn_valid |-> (!rd_busy || rd_cnt == 3'(NPTS - 1)));

endmodule
