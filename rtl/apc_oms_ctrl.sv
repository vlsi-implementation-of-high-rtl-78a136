// apc_oms_ctrl: control circuit of the APC-OMS LUT multiplier.
//
// Produces the barrel-shifter control s = {s1,s0} and the RESET signal.
// s is the number of left shifts of Table II: the count of trailing zeros of
// the low four input bits, limited to 3 (it is 3 when x0..x2 are all zero).
// Negating the low four bits (the APC input mapping) keeps their trailing
// zeros, so s is taken straight from x0..x2 as in the published control
// circuit. RESET = x4 AND d3: for X = 10000 the LUT output must be zero
// (product 16A + 0). Purely combinational.
// The inputs and outputs follow the document; the logic is written from the
// function of Table II rather than from the gate drawing.
module apc_oms_ctrl (
  input  logic [2:0] x_lo,   // x2..x0 of the multiplier input X
  input  logic       x4,     // x4, the MSB of X
  input  logic       d3,     // MSB of the LUT address
  output logic [1:0] s,      // number of left shifts (s1 s0)
  output logic       reset   // force LUT output to zero
);
  always_comb begin
    if (x_lo[0])      s = 2'd0;
    else if (x_lo[1]) s = 2'd1;
    else if (x_lo[2]) s = 2'd2;
    else              s = 2'd3;
  end

  assign reset = x4 & d3;
endmodule
