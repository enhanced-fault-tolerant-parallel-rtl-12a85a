// parseval_check: sum-of-squares (Parseval) check of one 8-point transform.
//
// Parseval's theorem for the unscaled 8-point DFT says
//   sum_k |X[k]|^2 = 8 * sum_n |x[n]|^2 .
// The input side squares each incoming sample (mag_square) and accumulates a
// frame (energy_acc); the output side does the same on the transform output.
// Because the transform has a latency of about one frame, the input energy of
// up to two frames waits in a two-entry queue.  When the output energy of a
// frame is complete it is compared (mag_compare) with 8x the oldest queued
// input energy, and p (1 = the energies disagree, i.e. an error) is
// registered with p_valid high for one cycle.
//
// The square / accumulate / compare structure is the published one; the
// queue, the tolerance of the comparator and the flag polarity are this
// design's choices.
//
// Interface: in_valid/in_re/in_im (IW bits) watch the transform input,
// out_valid/out_re/out_im (OW bits) its output, in frames of 8 samples.
// Timing: p_valid rises two cycles after the last output sample of a frame.
module parseval_check
  import fft_pkg::*;
#(
  parameter int unsigned IW        = 18,
  parameter int unsigned OW        = 22,
  parameter int unsigned TOL_SHIFT = 10,
  parameter int unsigned TOL_ABS   = 131072
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  input  logic                 out_valid,
  input  logic signed [OW-1:0] out_re,
  input  logic signed [OW-1:0] out_im,
  output logic                 p_valid,
  output logic                 p
);

  // Output-side energies need 2*OW+LOGN bits; the input side, scaled by 8,
  // needs 2*IW+2*LOGN and is never wider because OW >= IW + LOGN.
  localparam int unsigned AW = 2 * OW + LOGN;

  logic [2*IW-1:0] sq_in;
  logic [2*OW-1:0] sq_out;
  logic            done_in, done_out;
  logic [2*IW+LOGN-1:0] e_in;
  logic [AW-1:0]   e_out;

  mag_square #(.W(IW)) u_sq_in  (.re(in_re),  .im(in_im),  .sq(sq_in));
  mag_square #(.W(OW)) u_sq_out (.re(out_re), .im(out_im), .sq(sq_out));

  energy_acc #(.SW(2*IW), .AW(2*IW+LOGN)) u_acc_in (
    .clk, .rst, .in_valid(in_valid), .in_sq(sq_in), .done(done_in), .sum(e_in));
  energy_acc #(.SW(2*OW), .AW(AW)) u_acc_out (
    .clk, .rst, .in_valid(out_valid), .in_sq(sq_out), .done(done_out), .sum(e_out));

  // Two-entry queue of scaled input energies.
  logic [AW-1:0] q [2];
  logic [1:0]    q_cnt;
  logic [AW-1:0] e_in_scaled;

  assign e_in_scaled = AW'(e_in) << LOGN;

  always_ff @(posedge clk) begin
    if (rst) begin
      q_cnt <= '0;
    end else begin
      unique case ({done_in, done_out})
        2'b10: begin
          q[q_cnt[0]] <= e_in_scaled;
          q_cnt       <= q_cnt + 2'd1;
        end
        2'b01: begin
          q[0]  <= q[1];
          q_cnt <= q_cnt - 2'd1;
        end
        2'b11: begin
          if (q_cnt == 2'd1) q[0] <= e_in_scaled;
          else begin
            q[0] <= q[1];
            q[1] <= e_in_scaled;
          end
        end
        default: ;
      endcase
    end
  end

  logic mismatch;

  mag_compare #(.AW(AW), .TOL_SHIFT(TOL_SHIFT), .TOL_ABS(TOL_ABS)) u_cmp (
    .a(q[0]), .b(e_out), .mismatch(mismatch));

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      p       <= 1'b0;
    end else begin
      p_valid <= done_out;
      if (done_out) p <= mismatch;
    end
  end

  a_queue_not_empty: assert property (@(posedge clk) disable iff (rst)
    done_out |-> q_cnt != 2'd0);
  a_queue_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (done_in && !done_out) |-> q_cnt != 2'd2);

endmodule
