// tb_parseval_check: runs the Parseval check at its defaults (18-bit input,
// 22-bit output parts) next to an fft8 that produces the transform.
//
// Random frames (full scale and 1/64 scale) are streamed back to back; in
// every other frame one high bit of one output bin is flipped on its way to
// the check.  The testbench computes both energies from the integer samples
// it sees and the expected flag from the rule
//   p = | 8*E_in - E_out | > (max >> 10) + 131072,
// and checks p and that p_valid arrives two cycles after the frame's last
// output sample.  Both outcomes must occur.
module tb_parseval_check;
  localparam int unsigned IW = 18;
  localparam int unsigned OW = 22;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic f_valid;
  logic [2:0] f_idx;
  logic signed [OW-1:0] f_re, f_im;
  logic [OW-1:0] flt_re;
  logic p_valid, p;
  int checks = 0, failures = 0;
  longint cycle = 0;

  fft8 #(.IW(IW), .OW(OW)) u_fft (
    .clk, .rst, .in_valid, .in_re, .in_im,
    .out_valid(f_valid), .out_idx(f_idx), .out_re(f_re), .out_im(f_im),
    .fault_re('0), .fault_im('0));

  parseval_check dut (
    .clk, .rst, .in_valid, .in_re, .in_im,
    .out_valid(f_valid), .out_re(f_re ^ $signed(flt_re)), .out_im(f_im),
    .p_valid, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Fault plan per frame, by frame number: bin and bit (or -1).
  int fault_bin [$];
  int fault_bit [$];
  int out_frame = 0;

  always_comb begin
    flt_re = '0;
    if (f_valid && fault_bin.size() > 0 && fault_bin[0] == int'(f_idx))
      flt_re = OW'(1) << fault_bit[0];
  end

  longint e_in_q [$];
  longint e_out, e_in_acc;
  longint last_out_cyc;
  int     n_in = 0;
  int     n_ok = 0, n_err = 0;
  bit     exp_p_q [$];

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      e_in_acc += longint'(in_re) * longint'(in_re) + longint'(in_im) * longint'(in_im);
      n_in++;
      if (n_in == 8) begin
        e_in_q.push_back(8 * e_in_acc);
        e_in_acc = 0;
        n_in = 0;
      end
    end
    if (!rst && f_valid) begin
      longint r, i;
      r = longint'(f_re ^ $signed(flt_re));
      i = longint'(f_im);
      e_out += r * r + i * i;
      if (f_idx == 3'd7) begin
        longint ein, hi, lo;
        ein = e_in_q.pop_front();
        hi = (ein > e_out) ? ein : e_out;
        lo = (ein > e_out) ? e_out : ein;
        exp_p_q.push_back((hi - lo) > (hi >> 10) + 131072);
        e_out = 0;
        last_out_cyc = cycle;
        void'(fault_bin.pop_front());
        void'(fault_bit.pop_front());
      end
    end
    if (!rst && p_valid) begin
      bit ep;
      ep = exp_p_q.pop_front();
      checks += 2;
      if (p != ep) begin
        failures++;
        $display("FAIL p=%b expected %b", p, ep);
      end
      if (cycle != last_out_cyc + 2) begin
        failures++;
        $display("FAIL p_valid at %0d, last output at %0d", cycle, last_out_cyc);
      end
      if (p) n_err++;
      else n_ok++;
    end
  end

  initial begin
    e_in_acc = 0;
    e_out = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 400; f++) begin
      int sh;
      sh = (f % 3 == 2) ? 6 : 0;
      if (f % 2 == 1) begin
        fault_bin.push_back(int'($urandom_range(7, 0)));
        fault_bit.push_back(int'($urandom_range(20, 12)));
      end else begin
        fault_bin.push_back(-1);
        fault_bit.push_back(0);
      end
      for (int n = 0; n < 8; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_re = IW'($signed(IW'($urandom)) >>> sh);
        in_im = IW'($signed(IW'($urandom)) >>> sh);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    $display("frames passing: %0d, frames flagged: %0d", n_ok, n_err);
    checks += 3;
    if (n_ok < 150) failures++;
    if (n_err < 150) failures++;
    if (exp_p_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
