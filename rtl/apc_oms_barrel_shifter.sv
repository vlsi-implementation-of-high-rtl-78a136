// apc_oms_barrel_shifter: left shifter of the APC-OMS LUT multiplier.
//
// Shifts the selected LUT word left by 0..3 places (s = {s1,s0}) to derive
// the even multiples of A from the stored odd multiples (Table II), and 16A
// from the stored 2A. WD is the LUT word width, W+4; no result of the
// multiplier exceeds 16A, so nothing is shifted out. Combinational.
module apc_oms_barrel_shifter #(
  parameter int unsigned WD = 12   // word width (W + 4)
) (
  input  logic [WD-1:0] din,
  input  logic [1:0]    s,
  output logic [WD-1:0] dout
);
  always_comb begin
    unique case (s)
      2'd0: dout = din;
      2'd1: dout = {din[WD-2:0], 1'b0};
      2'd2: dout = {din[WD-3:0], 2'b0};
      default: dout = {din[WD-4:0], 3'b0};
    endcase
  end
endmodule
