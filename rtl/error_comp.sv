// error_comp: error-computation block of the adaptive filter.
//
// Computes the filter output y = sum_k w_k * x(n-k) without multipliers and
// the estimation error e = d - y. Each tap has a 2-bit partial-product
// generator (ppg2) giving w_k times each radix-4 digit of x(n-k); one adder
// tree per digit position sums those over the N taps (q_j); a shift-add tree
// weights the q_j by 4^j. The weights carry F fractional bits, so the sum is
// shifted right by F (rounding toward minus infinity) to the scale of x and
// d, and saturated to DW bits; e is d - y, saturated to DW bits.
//
// Interface: taps and weights in; y_now and e_now are combinational; with
// `en` high they are captured in y_q and e_q at the clock edge (the delay D at
// the output of the structure). The structure is the document's; the fixed
// point format, the saturation and the enable are this design's choices.
module error_comp #(
  parameter int unsigned N  = 16,  // taps
  parameter int unsigned L  = 8,   // sample width
  parameter int unsigned W  = 16,  // weight width
  parameter int unsigned F  = 12,  // fractional bits of the weights
  parameter int unsigned DW = 16   // width of d, y and e
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [L-1:0]  taps [N],
  input  logic signed [W-1:0]  w    [N],
  input  logic signed [DW-1:0] d,
  output logic signed [DW-1:0] y_now,
  output logic signed [DW-1:0] e_now,
  output logic signed [DW-1:0] y_q,
  output logic signed [DW-1:0] e_q
);
  localparam int unsigned ND = L / 2;
  localparam int unsigned PW = W + 2;             // partial-product width
  localparam int unsigned QW = PW + $clog2(N);    // digit-sum width
  localparam int unsigned YW = QW + L;            // full-precision output width

  localparam logic signed [DW-1:0] DMAX = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] DMIN = {1'b1, {(DW-1){1'b0}}};

  logic signed [PW-1:0] p  [N][ND];
  logic signed [PW-1:0] pt [ND][N];   // transposed: per digit, all taps
  logic signed [QW-1:0] q  [ND];
  logic signed [YW-1:0] y_full;
  logic signed [YW-1:0] y_scaled;
  logic signed [YW:0]   e_full;

  for (genvar k = 0; k < N; k++) begin : g_ppg
    ppg2 #(.L(L), .W(W)) u_ppg (.w(w[k]), .x(taps[k]), .p(p[k]));
  end

  always_comb
    for (int j = 0; j < ND; j++)
      for (int k = 0; k < N; k++)
        pt[j][k] = p[k][j];

  for (genvar j = 0; j < ND; j++) begin : g_tree
    adder_tree #(.N(N), .IW(PW)) u_tree (.in_vec(pt[j]), .sum(q[j]));
  end

  shift_add_tree #(.L(L), .QW(QW)) u_sat (.q(q), .y(y_full));

  always_comb begin
    y_scaled = y_full >>> F;
    if (y_scaled > YW'(DMAX))      y_now = DMAX;
    else if (y_scaled < YW'(DMIN)) y_now = DMIN;
    else                           y_now = y_scaled[DW-1:0];
    e_full = (YW+1)'(d) - (YW+1)'(y_now);
    if (e_full > (YW+1)'(DMAX))      e_now = DMAX;
    else if (e_full < (YW+1)'(DMIN)) e_now = DMIN;
    else                             e_now = e_full[DW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_q <= '0;
      e_q <= '0;
    end else if (en) begin
      y_q <= y_now;
      e_q <= e_now;
    end
  end
endmodule
