// apc_oms_decoder: 4-to-9 line address decoder of the APC-OMS LUT.
//
// Turns the 4-bit LUT address into nine one-hot word-select lines w0..w8.
// Addresses 0000..0111 select the odd multiples P0..P7, 1000 selects the word
// holding 2A; the unused addresses 1001..1111 select nothing. Combinational.
// The function is the document's; the handling of unused codes is this
// design's choice.
module apc_oms_decoder
  import da_lms_pkg::*;
(
  input  logic [3:0]           d,     // LUT address
  output logic [APC_WORDS-1:0] wsel   // one-hot word select
);
  always_comb begin
    wsel = '0;
    if (d <= 4'(APC_WORDS - 1)) wsel[d] = 1'b1;
  end
endmodule
