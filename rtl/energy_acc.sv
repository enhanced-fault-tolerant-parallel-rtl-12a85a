// energy_acc: frame accumulator of a Parseval check.
//
// Adds the squared magnitudes of the samples of one frame (NPTS = 8 samples,
// counted on in_valid) and presents the total on sum with done high for one
// cycle, in the cycle after the last sample of the frame.  The running sum
// restarts with the next frame.  The frame length follows the 8-point FFT; the
// widths, the reset and the one-cycle done pulse are this design's choices.
//
// Interface: in_valid/in_sq (SW bits) in, done/sum (AW bits) out.
module energy_acc
  import fft_pkg::*;
#(
  parameter int unsigned SW = 40,           // width of one squared magnitude
  parameter int unsigned AW = SW + LOGN     // width of a frame sum
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [SW-1:0] in_sq,
  output logic          done,
  output logic [AW-1:0] sum
);

  logic [AW-1:0] acc;
  logic [2:0]    cnt;
  logic [AW-1:0] acc_next;

  assign acc_next = ((cnt == '0) ? '0 : acc) + AW'(in_sq);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      acc  <= '0;
      done <= 1'b0;
      sum  <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        acc <= acc_next;
        cnt <= cnt + 3'd1;
        if (cnt == 3'(NPTS - 1)) begin
          done <= 1'b1;
          sum  <= acc_next;
        end
      end
    end
  end

endmodule
