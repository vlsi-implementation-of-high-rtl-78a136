// weight_update: LMS weight-update block built on APC-OMS LUT multipliers.
//
// Applies w_k(n+1) = w_k(n) + 2*mu*e(n)*x(n-k) to all N weights at once, with
// 2*mu a power of two. All N products share the coefficient e, so one
// APC-OMS multiplier with N*ceil(L/5) inputs is used, whose single LUT holds
// the odd multiples of |e|: |x(n-k)| is cut into 5-bit chunks, each chunk is
// one input of the multiplier, and the chunk products are shifted and added
// into |e|*|x(n-k)|. That magnitude is
// shifted right by MU_SHIFT, given the sign sign(e) XOR sign(x), and added to
// the weight, which saturates at its W-bit range.
//
// Timing: `load` (one cycle) writes the LUT with |e| and keeps the sign of e;
// `upd` in a later cycle, with the same taps, writes the new weights. The
// weights are registers; reset clears them. In weight units (F fractional
// bits) the step is 2*mu = 2^-(MU_SHIFT + F).
// Eq. (1) and the LUT multiplier are the document's; the sign-magnitude
// split, the chunking and the saturation are this design's choices.
module weight_update
  import da_lms_pkg::*;
#(
  parameter int unsigned N        = 16,  // taps
  parameter int unsigned L        = 8,   // sample width
  parameter int unsigned W        = 16,  // weight width
  parameter int unsigned DW       = 16,  // error width
  parameter int unsigned MU_SHIFT = 6    // step size shift
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [DW-1:0] e,
  input  logic                 upd,
  input  logic signed [L-1:0]  taps [N],
  output logic signed [W-1:0]  w    [N]
);
  localparam int unsigned NCH = (L + APC_L - 1) / APC_L;    // 5-bit chunks per sample
  localparam int unsigned XW  = NCH * APC_L;                // padded magnitude width
  localparam int unsigned MW  = DW + XW;                    // |e|*|x| width
  localparam int unsigned SW  = MW + 2;                     // signed sum width
  localparam int unsigned NP  = N * NCH;                    // LUT read ports

  localparam logic signed [SW-1:0] WMAX = SW'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [SW-1:0] WMIN = -WMAX - 1;

  logic [DW-1:0]        e_mag;      // |e| presented to the LUT
  logic                 e_neg_q;    // sign of the loaded e
  logic [APC_L-1:0]     chunk [NP];
  logic [DW+4:0]        cprod [NP];
  logic [XW-1:0]        x_mag [N];
  logic signed [SW-1:0] w_next [N];

  assign e_mag = e[DW-1] ? DW'(-e) : DW'(e);

  apc_oms_mult #(.W(DW), .R(NP)) u_mult (
    .clk(clk), .rst_n(rst_n), .load(load), .a(e_mag), .x(chunk), .product(cprod));

  for (genvar k = 0; k < N; k++) begin : g_tap
    assign x_mag[k] = taps[k][L-1] ? XW'(-(XW'(taps[k]))) : XW'(taps[k]);
    for (genvar c = 0; c < NCH; c++) begin : g_chunk
      assign chunk[k*NCH+c] = x_mag[k][c*APC_L +: APC_L];
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [MW-1:0]        acc;
      logic signed [SW-1:0] delta;
      acc = '0;
      for (int c = 0; c < NCH; c++)
        acc = acc + (MW'(cprod[k*NCH+c]) << (c * APC_L));
      delta  = SW'(acc >> MU_SHIFT);
      if (e_neg_q ^ taps[k][L-1]) delta = -delta;
      w_next[k] = SW'(w[k]) + delta;
      if (w_next[k] > WMAX)      w_next[k] = WMAX;
      else if (w_next[k] < WMIN) w_next[k] = WMIN;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_neg_q <= 1'b0;
      for (int k = 0; k < N; k++) w[k] <= '0;
    end else begin
      if (load) e_neg_q <= e[DW-1];
      if (upd)
        for (int k = 0; k < N; k++) w[k] <= w_next[k][W-1:0];
    end
  end
endmodule
