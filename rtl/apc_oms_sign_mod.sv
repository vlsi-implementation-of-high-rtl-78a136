// apc_oms_sign_mod: sign modification of the APC word and final product.
//
// The APC word coming out of the barrel shifter is the magnitude A*x'. Table I
// pairs the inputs around 16A: the product is 16A + A*x' when x4 = 1 and
// 16A - A*x' when x4 = 0. This block applies that sign under control of x4
// and adds 16A (A shifted left by four). Interface: coefficient A (W bits),
// APC word (W+4 bits) and x4 in, unsigned product X*A (W+5 bits) out.
// Combinational. The sign control by x4 is the document's; applying it as a
// full two's-complement subtraction is this design's choice.
module apc_oms_sign_mod #(
  parameter int unsigned W = 8    // coefficient width
) (
  input  logic [W-1:0] a,
  input  logic [W+3:0] apc,
  input  logic         x4,
  output logic [W+4:0] product
);
  logic [W+4:0] a16;
  always_comb begin
    a16     = {1'b0, a, 4'b0};
    product = x4 ? a16 + {1'b0, apc} : a16 - {1'b0, apc};
  end
endmodule
