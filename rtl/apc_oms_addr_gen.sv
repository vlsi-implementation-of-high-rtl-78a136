// apc_oms_addr_gen: address-generation circuit of the APC-OMS LUT multiplier.
//
// Anti-symmetric product coding writes X*A as 16A + A*x' when x4 = 1 and as
// 16A - A*x' when x4 = 0, where the 4-bit APC address x' is X[3:0] itself
// (x4 = 1) or its two's complement modulo 16 (x4 = 0), as in Table I.
// Shifting x' right by s places (s = its trailing zeros, from apc_oms_ctrl)
// leaves an odd number y = 2i+1 whose index i is the LUT address of the odd
// multiple P_i (Table II). When x' is zero the address is 1000, the word that
// holds 2A. Interface: X and s in, address d[3:0] out; combinational.
// The mapping follows Tables I and II; the circuit is written from them.
module apc_oms_addr_gen
  import da_lms_pkg::*;
(
  input  logic [4:0] x,   // multiplier input X
  input  logic [1:0] s,   // shift count from the control circuit
  output logic [3:0] d    // LUT address d3..d0
);
  logic [3:0] xp;  // APC address x'
  logic [3:0] y;   // x' with its trailing zeros removed

  always_comb begin
    xp = x[4] ? x[3:0] : 4'(-x[3:0]);
    y  = xp >> s;
    if (y == 4'd0) d = APC_ZERO_ADDR;
    else           d = {1'b0, y[3:1]};
  end
endmodule
