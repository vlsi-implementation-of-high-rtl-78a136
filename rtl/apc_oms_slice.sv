// apc_oms_slice: the per-input logic of one APC-OMS LUT multiplier.
//
// Everything of the APC-OMS multiplier except the LUT words themselves:
// control circuit (shift count, RESET), address generator, 4-to-9 decoder,
// barrel shifter and sign modification. The slice drives the word selects and
// RESET of one LUT read port and turns the word it gets back into the product
// X*A. Keeping the LUT outside lets many slices share one LUT when they
// multiply by the same coefficient. Combinational: the word selects depend on
// X only, the product on X, A and the returned word.
module apc_oms_slice
  import da_lms_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [4:0]           x,        // multiplier input X
  input  logic [W-1:0]         a,        // coefficient (for the 16A term)
  output logic [APC_WORDS-1:0] wsel,     // to the LUT read port
  output logic                 reset,    // to the LUT read port
  input  logic [W+3:0]         word,     // from the LUT read port
  output logic [W+4:0]         product   // X*A
);
  logic [1:0]   s;
  logic [3:0]   d;
  logic [W+3:0] shifted;

  apc_oms_ctrl     u_ctrl (.x_lo(x[2:0]), .x4(x[4]), .d3(d[3]), .s(s), .reset(reset));
  apc_oms_addr_gen u_addr (.x(x), .s(s), .d(d));
  apc_oms_decoder  u_dec  (.d(d), .wsel(wsel));
  apc_oms_barrel_shifter #(.WD(W + 4)) u_bsh (.din(word), .s(s), .dout(shifted));
  apc_oms_sign_mod #(.W(W)) u_sgn (.a(a), .apc(shifted), .x4(x[4]), .product(product));
endmodule
