// tb_edc: checks the per-channel detection-and-correction unit for all four
// channel positions (CH = 1..4) side by side.
//
// Frames of random bins are streamed in for the four channels plus the parity
// FFT; the parity bin is built so that the rebuilt value of every channel is
// known.  The syndrome of each frame (random among all eight codes) arrives
// 1 to 8 cycles after the frame's last bin, but never before the previous
// frame has left.  Each unit must output its own bins unchanged, or the
// rebuilt bins (parity - other three) when the code names its channel,
// starting one cycle after syn_valid, with corrected set accordingly.
module tb_edc;
  import fft_pkg::*;
  localparam int unsigned OW = 20;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [OW-1:0] x_re [4], x_im [4];
  logic signed [OW+1:0] par_re, par_im;
  logic syn_valid = 0;
  logic [2:0] syn = '0;
  logic y_valid [4];
  logic signed [OW-1:0] y_re [4], y_im [4];
  logic corrected [4];
  int checks = 0, failures = 0;
  longint cycle = 0;

  for (genvar c = 0; c < 4; c++) begin : g_dut
    localparam int O0 = (c == 0) ? 1 : 0;
    localparam int O1 = (c <= 1) ? 2 : 1;
    localparam int O2 = (c <= 2) ? 3 : 2;
    edc #(.CH(c + 1), .OW(OW)) dut (
      .clk, .rst, .in_valid, .x_re(x_re[c]), .x_im(x_im[c]),
      .oth_re('{x_re[O0], x_re[O1], x_re[O2]}), .oth_im('{x_im[O0], x_im[O1], x_im[O2]}),
      .par_re, .par_im, .syn_valid, .syn,
      .y_valid(y_valid[c]), .y_re(y_re[c]), .y_im(y_im[c]), .corrected(corrected[c]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int raw_re [4][8];
    int raw_im [4][8];
    int fix_re [4][8];
    int fix_im [4][8];
  } frame_t;

  frame_t    fq [$];
  logic [2:0] sq [$];
  longint    syn_cyc;
  int        obin = 0;
  int        n_fix [4] = '{0, 0, 0, 0};
  int        n_plain = 0;

  always @(posedge clk) begin
    if (!rst && y_valid[0]) begin
      err_loc_e loc;
      loc = decode_syndrome(sq[0]);
      checks++;
      if (cycle != syn_cyc + 1 + obin) begin
        failures++;
        $display("FAIL bin %0d at cycle %0d, syndrome at %0d", obin, cycle, syn_cyc);
      end
      for (int c = 0; c < 4; c++) begin
        bit fix;
        int er, ei;
        fix = (int'(loc) == c + 1);
        er = fix ? fq[0].fix_re[c][obin] : fq[0].raw_re[c][obin];
        ei = fix ? fq[0].fix_im[c][obin] : fq[0].raw_im[c][obin];
        checks += 3;
        if (!y_valid[c]) failures++;
        if (int'(y_re[c]) != er || int'(y_im[c]) != ei) begin
          failures++;
          $display("FAIL ch %0d bin %0d syn %b: got %0d,%0d expected %0d,%0d",
                   c + 1, obin, sq[0], y_re[c], y_im[c], er, ei);
        end
        if (corrected[c] != fix) failures++;
        if (obin == 0 && fix) n_fix[c]++;
      end
      if (obin == 0 && (loc == LOC_NONE || int'(loc) > 4)) n_plain++;
      obin = (obin + 1) % 8;
      if (obin == 0) begin
        void'(fq.pop_front());
        void'(sq.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      frame_t fr;
      int delay;
      logic [2:0] s;
      for (int k = 0; k < 8; k++) begin
        int pr, pi;
        // The parity bin is the sum of four true bins; in most frames one
        // channel is then corrupted, so that the rebuild of that channel
        // gives back its true value.
        pr = 0;
        pi = 0;
        for (int c = 0; c < 4; c++) begin
          fr.fix_re[c][k] = $signed(OW'($urandom)) >>> 1;
          fr.fix_im[c][k] = $signed(OW'($urandom)) >>> 1;
          pr += fr.fix_re[c][k];
          pi += fr.fix_im[c][k];
          fr.raw_re[c][k] = fr.fix_re[c][k];
          fr.raw_im[c][k] = fr.fix_im[c][k];
        end
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < 4; c++) begin
          x_re[c] = OW'(fr.raw_re[c][k]);
          x_im[c] = OW'(fr.raw_im[c][k]);
        end
        par_re = (OW+2)'(pr);
        par_im = (OW+2)'(pi);
        // one channel is corrupted on its way in
        if (f % 5 != 0) begin
          int cc;
          cc = f % 4;
          x_re[cc] = x_re[cc] ^ OW'(1 << (k + 8));
          fr.raw_re[cc][k] = int'(x_re[cc]);
        end
        // expected rebuild: parity minus the other three as received
        for (int c = 0; c < 4; c++) begin
          int sr, si;
          sr = pr;
          si = pi;
          for (int o = 0; o < 4; o++) if (o != c) begin
            sr -= fr.raw_re[o][k];
            si -= fr.raw_im[o][k];
          end
          fr.fix_re[c][k] = sr;
          fr.fix_im[c][k] = si;
        end
      end
      fq.push_back(fr);
      s = 3'($urandom);
      if (f % 8 < 4) s = (f % 4 == 0) ? 3'b111 : (f % 4 == 1) ? 3'b110 : (f % 4 == 2) ? 3'b101 : 3'b011;
      @(negedge clk);
      in_valid = 0;
      delay = int'($urandom_range(7, 0));
      repeat (delay) @(negedge clk);
      syn_valid = 1;
      syn = s;
      sq.push_back(s);
      syn_cyc = cycle;
      @(negedge clk);
      syn_valid = 0;
      repeat (6) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    $display("rebuilt frames per channel: %0d %0d %0d %0d, passed through: %0d",
             n_fix[0], n_fix[1], n_fix[2], n_fix[3], n_plain);
    checks += 5;
    for (int c = 0; c < 4; c++) if (n_fix[c] == 0) failures++;
    if (n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
