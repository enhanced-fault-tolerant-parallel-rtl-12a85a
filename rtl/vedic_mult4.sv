// vedic_mult4: 4x4-bit unsigned multiplier after the Urdhva Tiryagbhyam
// ("vertically and crosswise") sutra.
//
// Every partial product a[i] & b[j] is an AND gate.  The product is formed in
// seven column steps: step k (k = 0..6) adds the crosswise partial products
// with i + j = k together with the carry left over from step k-1; the low bit
// of that column sum is product bit k and the rest is carried into step k+1.
// Step 1 is the single vertical product a0.b0, step 4 the four crosswise
// products of the middle column, step 7 the vertical product a3.b3, whose
// carry gives P7.  Each column sum is a small adder of half and full adders.
// All partial products are generated at once and summed in parallel, as in the
// published sutra description; the column-sum formulation is the whole circuit.
//
// Interface: a, b (4 bits each), p = a * b (8 bits).  Purely combinational.
module vedic_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  always_comb begin
    logic [3:0] col;    // at most 4 partial products plus a carry of up to 3
    logic [2:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 7; k++) begin
      col = {1'b0, carry};
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) col = col + {3'b0, a[i] & b[k-i]};
      end
      p[k]  = col[0];
      carry = col[3:1];
    end
    p[7] = carry[0];
  end

endmodule
