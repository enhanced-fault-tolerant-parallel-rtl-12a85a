// vedic_mult: N x N-bit unsigned multiplier built from 4x4 Urdhva Tiryagbhyam
// cells.
//
// The operands are split into D = N/4 hexadecimal digits.  The same vertical
// and crosswise rule used inside vedic_mult4 is applied one level up: column k
// of the product (k = 0 .. 2D-2) is the sum of the 4x4 digit products
// a_i * b_j with i + j = k plus the carry from column k-1; its low four bits
// are product digit k and the rest carries on.  All D*D digit products are
// formed in parallel by vedic_mult4 cells.
//
// The published design uses Vedic multipliers in the FFT but shows only the
// 4-bit cell; extending it digit-wise to N bits is this design's choice.
//
// Interface: a, b (N bits, N a multiple of 4), p = a * b (2N bits).
// Purely combinational.
module vedic_mult #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned D = N / 4;
  // A column holds at most D digit products (< 2^8 each) plus a carry.
  localparam int unsigned CW = 8 + $clog2(D + 1) + 2;

  logic [7:0] dp [D][D];

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic_mult4 u_cell (
        .a (a[4*i +: 4]),
        .b (b[4*j +: 4]),
        .p (dp[i][j])
      );
    end
  end

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * D - 1; k++) begin
      col = carry;
      for (int i = 0; i < D; i++) begin
        if (k - i >= 0 && k - i < D) col = col + CW'(dp[i][k-i]);
      end
      p[4*k +: 4] = col[3:0];
      carry       = col >> 4;
    end
    p[2*N-1 -: 4] = carry[3:0];
  end

endmodule
