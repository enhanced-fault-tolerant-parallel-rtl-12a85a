// tb_parity_sos_ecc_fft: end-to-end test of the protected four-FFT bank at
// its default parameters.
//
// Frames of random complex samples (full scale, 1/16 or 1/256 of it) are streamed into
// all four channels, mostly back to back and sometimes with idle cycles.
// Each frame runs one scenario: no fault, a soft error (a high bit flipped in
// one bin) in one of the four channel FFTs, in the parity FFT, or in one of
// the three check paths.  The testbench computes every channel's DFT in
// floating point and checks
//  * the syndrome and decoded location of every frame (111/110/101/011 for
//    channels 1..4, one-hot for a check path, 000 otherwise),
//  * the corrected flags,
//  * every output bin: within 1.5 LSB of the DFT, or 4 LSB for a rebuilt
//    channel (it adds the rounding of five transforms),
//  * the latency: syndrome 10 cycles and bin k 11+k cycles after the
//    sample completing the frame.
// Each mechanism (correction of each channel, parity-FFT fault ignored, each
// check-path fault ignored, clean frames, gapped frames) is counted and must
// occur at least once.
module tb_parity_sos_ecc_fft;
  import fft_pkg::*;
  localparam int unsigned IW = 16;
  localparam int unsigned OW = IW + 4;
  localparam int unsigned NFRAMES = 3000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [IW-1:0] x_re [4], x_im [4];
  logic y_valid;
  logic signed [OW-1:0] y_re [4], y_im [4];
  logic [3:0] corrected;
  logic syn_valid;
  logic [2:0] syndrome;
  err_loc_e err_loc;
  logic [OW+1:0] fault_re [5], fault_im [5], fault_chk [3];

  parity_sos_ecc_fft dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ plan
  typedef struct {
    real    xr [4][8];
    real    xi [4][8];
    int     scen;        // 0 none, 1..4 channel, 5 parity, 6..8 check path
    longint t_done;      // cycle in which the last sample entered
  } frame_t;

  frame_t frames [$];
  frame_t out_q  [$];   // frames awaiting their syndrome
  frame_t bin_q  [$];   // frames awaiting their bins

  // Fault schedule, by cycle: target (0..3 channel, 4 parity, 5..7 check
  // path), mask, and whether it hits the imaginary part.
  int            f_tgt  [longint];
  logic [OW+1:0] f_mask [longint];
  bit            f_im   [longint];

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      fault_re[i] = '0;
      fault_im[i] = '0;
    end
    for (int c = 0; c < 3; c++) fault_chk[c] = '0;
    if (f_tgt.exists(cycle)) begin
      if (f_tgt[cycle] < 5) begin
        if (f_im[cycle]) fault_im[f_tgt[cycle]] = f_mask[cycle];
        else             fault_re[f_tgt[cycle]] = f_mask[cycle];
      end else begin
        fault_chk[f_tgt[cycle] - 5] = f_mask[cycle];
      end
    end
  end

  // Mechanism counters.
  int n_corr [4] = '{0, 0, 0, 0};
  int n_par = 0, n_clean = 0, n_gap = 0, n_b2b = 0;
  int n_chk [3] = '{0, 0, 0};

  function automatic logic [2:0] expected_syn(int scen);
    case (scen)
      1: return 3'b111;
      2: return 3'b110;
      3: return 3'b101;
      4: return 3'b011;
      6: return 3'b100;
      7: return 3'b010;
      8: return 3'b001;
      default: return 3'b000;
    endcase
  endfunction

  localparam int MEMBER [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};
  int n_blind = 0;

  // True when flipping bit b of bin k (real or imaginary part) of the target
  // of scenario scen changes the energy of every check that covers it by
  // well over twice the comparator's tolerance.
  function automatic bit visible(input frame_t fr, input int scen, input int k, input int b, input bit im);
    for (int c = 0; c < 3; c++) begin
      bit covers;
      real cr, ci, tr, ti, ein, eout, de, lim, v, e;
      longint iv;
      covers = (scen >= 6) ? (c == scen - 6) :
               (MEMBER[c][0] == scen - 1 || MEMBER[c][1] == scen - 1 || MEMBER[c][2] == scen - 1);
      if (!covers) continue;
      cr = 0.0; ci = 0.0; ein = 0.0; eout = 0.0;
      for (int n = 0; n < 8; n++) begin
        real sr = 0.0, si = 0.0;
        for (int m = 0; m < 3; m++) begin
          sr += fr.xr[MEMBER[c][m]][n];
          si += fr.xi[MEMBER[c][m]][n];
        end
        ein += 8.0 * (sr * sr + si * si);
      end
      // value whose bit is flipped: the channel's bin, or the check's sum
      v = 0.0;
      for (int m = 0; m < 3; m++) begin
        dft(fr, MEMBER[c][m], k, tr, ti);
        cr += tr;
        ci += ti;
      end
      if (scen >= 6) v = im ? ci : cr;
      else begin
        dft(fr, scen - 1, k, tr, ti);
        v = im ? ti : tr;
      end
      iv = longint'($rtoi(v >= 0 ? v + 0.5 : v - 0.5));
      e = iv[b] ? -$pow(2.0, b) : $pow(2.0, b);
      if (im) de = (ci + e) * (ci + e) - ci * ci;
      else    de = (cr + e) * (cr + e) - cr * cr;
      eout = ein + de;
      lim = (ein > eout ? ein : eout) / 1024.0 + 131072.0;
      if (de < 0) de = -de;
      if (de < 2.0 * lim) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic send_frame(input int scen, input int shift, input int gap);
    frame_t fr;
    int bin, bit_pos;
    bit fim;
    fr.scen = scen;
    for (int c = 0; c < 4; c++) begin
      for (int n = 0; n < 8; n++) begin
        int r, i;
        r = $signed(16'($urandom));
        i = $signed(16'($urandom));
        r = r >>> shift; i = i >>> shift;
        fr.xr[c][n] = real'(r);
        fr.xi[c][n] = real'(i);
      end
    end
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int c = 0; c < 4; c++) begin
        x_re[c] = IW'($rtoi(fr.xr[c][n]));
        x_im[c] = IW'($rtoi(fr.xi[c][n]));
      end
      if (n == 7) fr.t_done = cycle;
      if (gap > 0 && n < 7) begin
        @(negedge clk);
        in_valid = 0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    // Schedule the fault on one bin of this frame's FFT outputs.
    // Pick a bin and bit the Parseval checks can see: a flip changes a
    // check's energy by |C+e|^2 - |C|^2, which is near zero when the check's
    // combination C is close to -e/2 (a blind spot of any sum-of-squares
    // check).  Such picks are drawn again; n_blind counts them.
    for (int tries = 0; tries < 100; tries++) begin
      bin = int'($urandom_range(7, 0));
      bit_pos = int'($urandom_range(18, 15));
      fim = 1'($urandom);
      if (scen >= 6) fim = 1'b0;
      if (scen == 0 || scen == 5 || visible(fr, scen, bin, bit_pos, fim)) break;
      n_blind++;
    end
    if (scen != 0) begin
      longint fc;
      fc = fr.t_done + 1 + longint'(bin);
      f_tgt[fc]  = scen - 1;
      f_mask[fc] = (OW+2)'(1) << bit_pos;
      f_im[fc]   = fim;
    end
    out_q.push_back(fr);
  endtask

  function automatic void dft(input frame_t fr, input int c, input int k, output real sr, output real si);
    sr = 0.0;
    si = 0.0;
    for (int n = 0; n < 8; n++) begin
      real ang = -2.0 * PI * real'(n * k) / 8.0;
      sr += fr.xr[c][n] * $cos(ang) - fr.xi[c][n] * $sin(ang);
      si += fr.xr[c][n] * $sin(ang) + fr.xi[c][n] * $cos(ang);
    end
  endfunction

  // ----------------------------------------------------- syndrome monitor
  always @(posedge clk) begin
    if (!rst && syn_valid) begin
      frame_t fr;
      logic [2:0] es;
      fr = out_q.pop_front();
      es = expected_syn(fr.scen);
      checks += 3;
      if (syndrome != es) begin
        failures++;
        $display("FAIL frame scen %0d: syndrome %b expected %b", fr.scen, syndrome, es);
      end
      if (err_loc != decode_syndrome(es)) failures++;
      if (cycle != fr.t_done + 10) begin
        failures++;
        $display("FAIL syndrome at cycle %0d, frame done at %0d", cycle, fr.t_done);
      end
      if (syndrome == es) begin
        case (fr.scen)
          0:          n_clean++;
          1, 2, 3, 4: n_corr[fr.scen - 1]++;
          5:          n_par++;
          default:    n_chk[fr.scen - 6]++;
        endcase
      end
      bin_q.push_back(fr);
    end
  end

  // ---------------------------------------------------------- bin monitor
  int obin = 0;
  real max_err_plain = 0.0, max_err_fixed = 0.0;
  always @(posedge clk) begin
    if (!rst && y_valid) begin
      frame_t fr;
      fr = bin_q[0];
      checks++;
      if (cycle != fr.t_done + 11 + obin) begin
        failures++;
        $display("FAIL bin %0d at cycle %0d, frame done at %0d", obin, cycle, fr.t_done);
      end
      for (int c = 0; c < 4; c++) begin
        real er, ei, dr, di, tol;
        bit fixed;
        fixed = (fr.scen == c + 1);
        tol = fixed ? 4.0 : 1.5;
        dft(fr, c, obin, er, ei);
        dr = real'(y_re[c]) - er;
        di = real'(y_im[c]) - ei;
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (fixed) begin
          if (dr > max_err_fixed) max_err_fixed = dr;
          if (di > max_err_fixed) max_err_fixed = di;
        end else begin
          if (dr > max_err_plain) max_err_plain = dr;
          if (di > max_err_plain) max_err_plain = di;
        end
        checks += 2;
        if (dr > tol || di > tol) begin
          failures++;
          $display("FAIL scen %0d ch %0d bin %0d: got %0d,%0d expected %f,%f",
                   fr.scen, c + 1, obin, y_re[c], y_im[c], er, ei);
        end
        if (corrected[c] != fixed) begin
          failures++;
          $display("FAIL scen %0d ch %0d corrected=%b", fr.scen, c + 1, corrected[c]);
        end
      end
      obin = (obin + 1) % 8;
      if (obin == 0) void'(bin_q.pop_front());
    end
  end

  // -------------------------------------------------------------- stimulus
  initial begin
    for (int c = 0; c < 4; c++) begin x_re[c] = '0; x_im[c] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      int scen, gap;
      scen = f % 9;
      gap = (f % 11 == 5) ? 2 : 0;
      if (gap > 0) n_gap++;
      else n_b2b++;
      send_frame(scen, (f % 4 == 3) ? 8 : (f % 4 == 1) ? 4 : 0, gap);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (out_q.size() != 0 || bin_q.size() != 0) begin
      failures++;
      $display("FAIL frames left: %0d awaiting syndrome, %0d awaiting bins", out_q.size(), bin_q.size());
    end
    $display("mechanisms: clean=%0d corrected ch1..4=%0d,%0d,%0d,%0d parity fault ignored=%0d check-path faults=%0d,%0d,%0d gapped=%0d back-to-back=%0d",
             n_clean, n_corr[0], n_corr[1], n_corr[2], n_corr[3], n_par, n_chk[0], n_chk[1], n_chk[2], n_gap, n_b2b);
    $display("fault picks drawn again (checks blind to them): %0d", n_blind);
    $display("max |error| plain=%f rebuilt=%f LSB", max_err_plain, max_err_fixed);
    checks += 11;
    if (n_clean == 0) failures++;
    for (int c = 0; c < 4; c++) if (n_corr[c] == 0) failures++;
    if (n_par == 0) failures++;
    for (int c = 0; c < 3; c++) if (n_chk[c] == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * 24 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
