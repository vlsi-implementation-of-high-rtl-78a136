// adder_tree: pairwise adder tree that sums N signed operands.
//
// log2(N) stages of two-input adders; stage s adds neighbouring results of
// stage s-1. In the error computation it adds the N partial products of the
// same digit weight, q_j = sum_k p_kj. The output is wide enough never to
// overflow (IW + log2 N bits). Combinational; N must be a power of two.
// The stage count is the document's; widths are this design's.
module adder_tree #(
  parameter int unsigned N  = 16,  // number of operands (power of two)
  parameter int unsigned IW = 18   // operand width
) (
  input  logic signed [IW-1:0]            in_vec [N],
  output logic signed [IW+$clog2(N)-1:0] sum
);
  localparam int unsigned LV = $clog2(N);
  localparam int unsigned OW = IW + LV;

  logic signed [OW-1:0] lvl [LV+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) lvl[0][i] = OW'(in_vec[i]);
    for (int s = 1; s <= LV; s++)
      for (int i = 0; i < N; i++)
        lvl[s][i] = (i < (N >> s)) ? lvl[s-1][2*i] + lvl[s-1][2*i+1] : '0;
    sum = lvl[LV][0];
  end

  initial assert (N == (1 << LV)) else $error("adder_tree: N must be a power of two");
endmodule
