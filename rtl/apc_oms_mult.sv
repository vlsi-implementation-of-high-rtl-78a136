// apc_oms_mult: 5-bit by W-bit multiplier built on the APC-OMS combined LUT.
//
// Instead of a multiplier array, the product X*A is read from a LUT that
// keeps only nine words: the odd multiples A, 3A, ..., 15A and 2A. With
// anti-symmetric product coding, X*A = 16A +/- A*x', where the 4-bit x'
// depends on X (Table I); A*x' is an odd multiple shifted left by 0..3 places
// (Table II). The path per input is: control circuit and address generator
// -> 4-to-9 decoder -> LUT -> barrel shifter -> sign modification (+16A).
//
// The multiplier has R inputs X[r] that all multiply the same coefficient and
// share the one LUT (R = 1 is the single multiplier of the document; the
// weight update uses many). Interface: pulse `load` for one cycle with the
// coefficient on `a`; the LUT words and the coefficient (for the 16A term)
// are written at that clock edge. From then on product[r] = X[r]*A
// combinationally, until the next load. X is unsigned 5-bit, A unsigned
// W-bit, the product unsigned W+5 bits. The structure follows the document;
// the load port, the shared read ports and the default W = 8 are this
// design's choices.
module apc_oms_mult
  import da_lms_pkg::*;
#(
  parameter int unsigned W = 8,   // coefficient width
  parameter int unsigned R = 1    // inputs sharing the coefficient
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] a,
  input  logic [4:0]   x       [R],
  output logic [W+4:0] product [R]
);
  logic [APC_WORDS-1:0] wsel  [R];
  logic                 rst_w [R];
  logic [W+3:0]         word  [R];
  logic [W-1:0]         a_q;      // coefficient held in the LUT

  apc_oms_lut #(.W(W), .R(R)) u_lut (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a),
    .wsel(wsel), .reset(rst_w), .word(word));

  for (genvar r = 0; r < R; r++) begin : g_in
    apc_oms_slice #(.W(W)) u_slice (
      .x(x[r]), .a(a_q), .wsel(wsel[r]), .reset(rst_w[r]),
      .word(word[r]), .product(product[r]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    a_q <= '0;
    else if (load) a_q <= a;
  end
endmodule
