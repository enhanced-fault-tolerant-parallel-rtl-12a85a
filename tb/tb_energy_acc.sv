// tb_energy_acc: feeds frames of 8 random squared magnitudes (default width
// 40 bits), some with idle cycles between values, and checks that each frame
// total appears with done one cycle after the frame's last value, that done
// is a single-cycle pulse and that the sum restarts with every frame.
module tb_energy_acc;
  localparam int unsigned SW = 40;
  localparam int unsigned AW = SW + 3;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [SW-1:0] in_sq = '0;
  logic done;
  logic [AW-1:0] sum;
  int checks = 0, failures = 0;
  longint cycle = 0;

  energy_acc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint exp_sum [$];
  longint exp_cyc [$];
  int n_done = 0;

  always @(posedge clk) begin
    if (!rst && done) begin
      n_done++;
      checks += 2;
      if (exp_sum.size() == 0) begin
        failures++;
        $display("FAIL done without a frame");
      end else begin
        if (sum != AW'(exp_sum[0])) begin
          failures++;
          $display("FAIL sum %0d expected %0d", sum, exp_sum[0]);
        end
        if (cycle != exp_cyc[0] + 1) begin
          failures++;
          $display("FAIL done at %0d, frame ended at %0d", cycle, exp_cyc[0]);
        end
        void'(exp_sum.pop_front());
        void'(exp_cyc.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      longint s;
      s = 0;
      for (int n = 0; n < 8; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_sq = SW'({$urandom, $urandom});
        s += longint'(in_sq);
        if (n == 7) begin
          exp_sum.push_back(s);
          exp_cyc.push_back(cycle);
        end
        if (f % 7 == 3) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_done != 300) begin
      failures++;
      $display("FAIL %0d frame totals, expected 300", n_done);
    end
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
