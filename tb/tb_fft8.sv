// tb_fft8: checks the streaming 8-point FFT against a floating-point DFT.
//
// Frames of random 16-bit complex samples (plus an all-full-scale frame and
// a frame with idle cycles between samples) are streamed in.  Each output bin
// must match X[k] = sum x[n] exp(-j 2 pi n k / 8) within 3 LSB (twiddle
// rounding) and appear exactly 1+k cycles after the sample completing its
// frame.  A fault pattern put on fault_re must show up XORed onto that bin.
module tb_fft8;
  localparam int unsigned IW = 16;
  localparam int unsigned OW = IW + 4;
  localparam int unsigned NFRAMES = 200;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 1.5;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [2:0] out_idx;
  logic signed [OW-1:0] out_re, out_im;
  logic [OW-1:0] fault_re = '0, fault_im = '0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0;

  fft8 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected bins of queued frames and the cycle each frame completed.
  real    exp_re [$], exp_im [$];
  longint exp_cyc [$];
  logic [OW-1:0] exp_fault [$];

  task automatic send_frame(input int kind, input int gap);
    int xr [8], xi [8];
    for (int n = 0; n < 8; n++) begin
      if (kind == 1) begin xr[n] = -32768; xi[n] = -32768; end
      else if (kind == 2) begin xr[n] = 32767; xi[n] = -32768; end
      else begin
        xr[n] = $signed(16'($urandom));
        xi[n] = $signed(16'($urandom));
      end
    end
    for (int k = 0; k < 8; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ang = -2.0 * PI * real'(n * k) / 8.0;
        sr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        si += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      exp_re.push_back(sr);
      exp_im.push_back(si);
    end
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_re = 16'(xr[n]);
      in_im = 16'(xi[n]);
      if (n == 7) exp_cyc.push_back(cycle);
      if (gap > 0 && n < 7) begin
        @(negedge clk);
        in_valid = 0;
        repeat (gap - 1) @(negedge clk);
      end
    end
  endtask

  // Output monitor.
  int  bin = 0;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      real er, ei, dr, di;
      logic [OW-1:0] fmask;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      fmask = fault_re;
      dr = real'($signed(out_re ^ fmask)) - er;
      di = real'(out_im) - ei;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > max_err) max_err = dr;
      if (di > max_err) max_err = di;
      checks++;
      if (dr > TOL || di > TOL || out_idx != 3'(bin)) begin
        failures++;
        $display("FAIL bin %0d: got %0d,%0d expected %f,%f", bin, out_re, out_im, er, ei);
      end
      // latency: bin k one + k cycles after the frame completed
      checks++;
      if (cycle != exp_cyc[0] + 1 + bin) begin
        failures++;
        $display("FAIL bin %0d at cycle %0d, frame completed at %0d", bin, cycle, exp_cyc[0]);
      end
      bin = (bin + 1) % 8;
      if (bin == 0) void'(exp_cyc.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send_frame(1, 0);
    send_frame(2, 0);
    for (int f = 0; f < NFRAMES; f++) begin
      send_frame(0, (f % 50 == 7) ? 3 : 0);
      if (f == 20) begin
        // fault on bin 0 of the frame just sent: the comparison above undoes
        // the XOR, so a missing fault shows as a 1024-LSB error
        fork
          begin
            @(negedge clk);
            fault_re = OW'(20'h00400);
            @(negedge clk);
            fault_re = '0;
          end
        join_none
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d bins never came out", exp_re.size());
    end
    $display("max |error| = %f LSB", max_err);
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
