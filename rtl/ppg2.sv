// ppg2: 2-bit partial-product generator of one filter tap.
//
// Splits the signed L-bit sample into L/2 radix-4 digits and outputs the
// weight times each digit, p[j] = w * digit_j, so that
// w * x = sum_j p[j] * 4^j. The low digits are unsigned (0..3); the top digit
// carries the sign of the two's-complement sample (0, 1, -2, -1). Each
// product is picked from 0, w, 2w and 3w; 3w = w + 2w is formed once and
// shared by all digits, so no multiplier is used. Combinational.
// The PPG with 2-bit digits and L/2 outputs is the document's; the handling
// of the sign digit is this design's choice.
module ppg2 #(
  parameter int unsigned L = 8,    // sample width (even)
  parameter int unsigned W = 16    // weight width
) (
  input  logic signed [W-1:0] w,
  input  logic signed [L-1:0] x,
  output logic signed [W+1:0] p [L/2]
);
  localparam int unsigned ND = L / 2;
  logic signed [W+1:0] w1, w2, w3;

  always_comb begin
    w1 = (W+2)'(w);
    w2 = w1 <<< 1;
    w3 = w1 + w2;
    for (int j = 0; j < ND; j++) begin
      unique case (x[2*j +: 2])
        2'd0: p[j] = '0;
        2'd1: p[j] = w1;
        2'd2: p[j] = (j == ND - 1) ? -w2 : w2;
        default: p[j] = (j == ND - 1) ? -w1 : w3;
      endcase
    end
  end

  initial assert (L % 2 == 0 && L >= 4) else $error("ppg2: L must be even and at least 4");
endmodule
