// shift_add_tree: combines the radix-4 digit sums into the filter output.
//
// y = sum_j q[j] * 4^j over the L/2 digit sums, in log2(L) - 1 stages. Stage
// s adds pairs of stage s-1 results, the upper one shifted left by 2^s
// places (2 in the first stage, 4 in the second, ...). Combinational; L/2
// must be a power of two. The stage count is the document's; the pairing and
// widths are this design's.
module shift_add_tree #(
  parameter int unsigned L  = 8,   // sample width
  parameter int unsigned QW = 22   // digit-sum width
) (
  input  logic signed [QW-1:0]   q [L/2],
  output logic signed [QW+L-1:0] y
);
  localparam int unsigned ND = L / 2;
  localparam int unsigned LV = $clog2(ND);
  localparam int unsigned OW = QW + L;

  logic signed [OW-1:0] lvl [LV+1][ND];

  always_comb begin
    for (int i = 0; i < ND; i++) lvl[0][i] = OW'(q[i]);
    for (int s = 1; s <= LV; s++)
      for (int i = 0; i < ND; i++)
        lvl[s][i] = (i < (ND >> s))
                  ? lvl[s-1][2*i] + (lvl[s-1][2*i+1] <<< (1 << s))
                  : '0;
    y = lvl[LV][0];
  end

  initial assert (ND == (1 << LV)) else $error("shift_add_tree: L/2 must be a power of two");
endmodule
