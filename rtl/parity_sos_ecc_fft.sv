// parity_sos_ecc_fft: four parallel 8-point FFTs protected by the
// Parity-SOS-ECC scheme.
//
// Four channels x1..x4 are transformed by four FFTs (m1..m4).  Protection
// costs one extra FFT and three Parseval (sum-of-squares) checks:
//  * the parity FFT transforms x1+x2+x3+x4, so by linearity any one channel
//    output can be rebuilt as X = X_parity - (other three outputs);
//  * check i compares the energy of an input combination with the energy of
//    the same combination of outputs: check 1 covers channels 1,2,3, check 2
//    channels 1,2,4, check 3 channels 1,3,4.  A faulty channel fails the
//    checks that contain it, and the three flags {p1,p2,p3} (the syndrome)
//    name it: 111 -> ch1, 110 -> ch2, 101 -> ch3, 011 -> ch4.  A single set
//    flag points at a check path itself and no output is changed; an error in
//    the parity FFT sets no flag and leaves the outputs untouched.
//  * one edc per channel (m8..m11) holds each output frame until its
//    syndrome is known and substitutes the rebuilt frame in the faulty
//    channel.
// The structure, the check combinations and the syndrome table are the
// published Parity-SOS-ECC scheme; widths, the frame timing, the comparator
// tolerance and the fault inputs are this design's choices.
//
// Interface: samples of the four channels enter together, one per cycle
// with in_valid, frames of 8 samples; each sample is 16-bit real plus
// 16-bit imaginary (a 32-bit word).  Corrected bins (IW+4 bits each part)
// leave in natural order with y_valid; syn_valid/syndrome/err_loc report the
// check result of each frame one cycle before its first bin.
// fault_re/fault_im[i] are XORed onto the output of FFT i (index 4 is the
// parity FFT) and fault_chk[c] onto the real part of check path c's output
// combination, to emulate soft errors; tie them to zero in normal use.
//
// Timing: if the last sample of a frame enters in cycle t, the syndrome is
// valid in cycle t+10 and bin k of the corrected frame leaves in cycle
// t+11+k.  Frames may follow each other back to back.
module parity_sos_ecc_fft
  import fft_pkg::*;
#(
  parameter int unsigned IW        = 16,      // bits per real / imaginary input part
  parameter int unsigned OW        = IW + 4,  // bits per real / imaginary output part
  parameter int unsigned TOL_SHIFT = 10,
  parameter int unsigned TOL_ABS   = 131072
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_re [4],
  input  logic signed [IW-1:0] x_im [4],
  output logic                 y_valid,
  output logic signed [OW-1:0] y_re [4],
  output logic signed [OW-1:0] y_im [4],
  output logic [3:0]           corrected,
  output logic                 syn_valid,
  output logic [2:0]           syndrome,
  output err_loc_e             err_loc,
  input  logic [OW+1:0]        fault_re [5],
  input  logic [OW+1:0]        fault_im [5],
  input  logic [OW+1:0]        fault_chk [3]
);

  localparam int unsigned PW = OW + 2;   // parity and check-path output width

  // ------------------------------------------------------- channel FFTs
  logic              f_valid [4];
  logic [2:0]        f_idx   [4];
  logic signed [OW-1:0] f_re [4], f_im [4];

  fft8 #(.IW(IW), .OW(OW)) m1 (
    .clk, .rst, .in_valid, .in_re(x_re[0]), .in_im(x_im[0]),
    .out_valid(f_valid[0]), .out_idx(f_idx[0]), .out_re(f_re[0]), .out_im(f_im[0]),
    .fault_re(OW'(fault_re[0])), .fault_im(OW'(fault_im[0])));
  fft8 #(.IW(IW), .OW(OW)) m2 (
    .clk, .rst, .in_valid, .in_re(x_re[1]), .in_im(x_im[1]),
    .out_valid(f_valid[1]), .out_idx(f_idx[1]), .out_re(f_re[1]), .out_im(f_im[1]),
    .fault_re(OW'(fault_re[1])), .fault_im(OW'(fault_im[1])));
  fft8 #(.IW(IW), .OW(OW)) m3 (
    .clk, .rst, .in_valid, .in_re(x_re[2]), .in_im(x_im[2]),
    .out_valid(f_valid[2]), .out_idx(f_idx[2]), .out_re(f_re[2]), .out_im(f_im[2]),
    .fault_re(OW'(fault_re[2])), .fault_im(OW'(fault_im[2])));
  fft8 #(.IW(IW), .OW(OW)) m4 (
    .clk, .rst, .in_valid, .in_re(x_re[3]), .in_im(x_im[3]),
    .out_valid(f_valid[3]), .out_idx(f_idx[3]), .out_re(f_re[3]), .out_im(f_im[3]),
    .fault_re(OW'(fault_re[3])), .fault_im(OW'(fault_im[3])));

  // ------------------------------------------------------ input encoder
  logic signed [IW+1:0] ck_in_re [3], ck_in_im [3];
  logic signed [IW+1:0] par_in_re, par_in_im;

  input_encoder #(.IW(IW)) u_in_enc (
    .x_re, .x_im, .c_re(ck_in_re), .c_im(ck_in_im), .s_re(par_in_re), .s_im(par_in_im));

  // --------------------------------------------------------- parity FFT
  logic              par_valid;
  logic [2:0]        par_idx;
  logic signed [PW-1:0] par_re, par_im;

  fft8 #(.IW(IW + 2), .OW(PW)) u_parity_fft (
    .clk, .rst, .in_valid, .in_re(par_in_re), .in_im(par_in_im),
    .out_valid(par_valid), .out_idx(par_idx), .out_re(par_re), .out_im(par_im),
    .fault_re(fault_re[4]), .fault_im(fault_im[4]));

  // ----------------------------------------------------- output encoder
  logic signed [PW-1:0] ck_out_re [3], ck_out_im [3];

  output_encoder #(.OW(OW)) u_out_enc (
    .x_re(f_re), .x_im(f_im), .c_re(ck_out_re), .c_im(ck_out_im));

  // ---------------------------------------------------- Parseval checks
  logic p_valid [3];
  logic p       [3];

  for (genvar c = 0; c < 3; c++) begin : g_chk
    parseval_check #(.IW(IW + 2), .OW(PW), .TOL_SHIFT(TOL_SHIFT), .TOL_ABS(TOL_ABS)) u_chk (
      .clk, .rst,
      .in_valid, .in_re(ck_in_re[c]), .in_im(ck_in_im[c]),
      .out_valid(f_valid[0]), .out_re(ck_out_re[c] ^ fault_chk[c]), .out_im(ck_out_im[c]),
      .p_valid(p_valid[c]), .p(p[c]));
  end

  assign syn_valid = p_valid[0];
  assign syndrome  = {p[0], p[1], p[2]};
  assign err_loc   = decode_syndrome(syndrome);

  // ------------------------------------------ detection and correction
  logic y_valid_ch [4];

  edc #(.CH(1), .OW(OW)) m8 (
    .clk, .rst, .in_valid(f_valid[0]), .x_re(f_re[0]), .x_im(f_im[0]),
    .oth_re('{f_re[1], f_re[2], f_re[3]}), .oth_im('{f_im[1], f_im[2], f_im[3]}),
    .par_re, .par_im, .syn_valid, .syn(syndrome),
    .y_valid(y_valid_ch[0]), .y_re(y_re[0]), .y_im(y_im[0]), .corrected(corrected[0]));
  edc #(.CH(2), .OW(OW)) m9 (
    .clk, .rst, .in_valid(f_valid[1]), .x_re(f_re[1]), .x_im(f_im[1]),
    .oth_re('{f_re[0], f_re[2], f_re[3]}), .oth_im('{f_im[0], f_im[2], f_im[3]}),
    .par_re, .par_im, .syn_valid, .syn(syndrome),
    .y_valid(y_valid_ch[1]), .y_re(y_re[1]), .y_im(y_im[1]), .corrected(corrected[1]));
  edc #(.CH(3), .OW(OW)) m10 (
    .clk, .rst, .in_valid(f_valid[2]), .x_re(f_re[2]), .x_im(f_im[2]),
    .oth_re('{f_re[0], f_re[1], f_re[3]}), .oth_im('{f_im[0], f_im[1], f_im[3]}),
    .par_re, .par_im, .syn_valid, .syn(syndrome),
    .y_valid(y_valid_ch[2]), .y_re(y_re[2]), .y_im(y_im[2]), .corrected(corrected[2]));
  edc #(.CH(4), .OW(OW)) m11 (
    .clk, .rst, .in_valid(f_valid[3]), .x_re(f_re[3]), .x_im(f_im[3]),
    .oth_re('{f_re[0], f_re[1], f_re[2]}), .oth_im('{f_im[0], f_im[1], f_im[2]}),
    .par_re, .par_im, .syn_valid, .syn(syndrome),
    .y_valid(y_valid_ch[3]), .y_re(y_re[3]), .y_im(y_im[3]), .corrected(corrected[3]));

  assign y_valid = y_valid_ch[0];

  // All five transforms run in lock step.
  a_lock_step: assert property (@(posedge clk) disable iff (rst)
    f_valid[0] |-> (f_valid[1] && f_valid[2] && f_valid[3] && par_valid &&
                    f_idx[1] == f_idx[0] && f_idx[2] == f_idx[0] &&
                    f_idx[3] == f_idx[0] && par_idx == f_idx[0]));
  a_checks_aligned: assert property (@(posedge clk) disable iff (rst)
    p_valid[0] |-> (p_valid[1] && p_valid[2]));
  a_edc_aligned: assert property (@(posedge clk) disable iff (rst)
    y_valid_ch[0] |-> (y_valid_ch[1] && y_valid_ch[2] && y_valid_ch[3]));

endmodule
