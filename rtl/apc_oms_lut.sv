// apc_oms_lut: the 9 x (W+4) word memory of the APC-OMS LUT multiplier.
//
// Words 0..7 hold the odd multiples P_i = (2i+1)*A; word 8 (address 1000)
// holds 2A, which the barrel shifter turns into 16A for the input X = 00000.
// A one-cycle `load` pulse computes all nine words from the coefficient `a`
// with shift-and-add (no multiplier) and writes them; the words keep their
// value until the next load. Reset clears them. The memory has R read ports,
// so several multipliers that share one coefficient can share one LUT. Each
// port is read combinationally through its nine one-hot word selects; its
// RESET input forces the port's output to zero.
// Word count, word width and contents follow the document; the load port,
// the reset and the multiple read ports are this design's choices.
module apc_oms_lut
  import da_lms_pkg::*;
#(
  parameter int unsigned W = 8,   // coefficient width
  parameter int unsigned R = 1    // read ports
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [W-1:0]             a,
  input  logic [APC_WORDS-1:0]     wsel  [R],
  input  logic                     reset [R],
  output logic [W+3:0]             word  [R]
);
  logic [W+3:0] mem [APC_WORDS];

  // k*a as a sum of shifted copies of a, for a small constant k.
  function automatic logic [W+3:0] times_const(input logic [W-1:0] av, input int unsigned k);
    logic [W+3:0] acc;
    acc = '0;
    for (int b = 0; b < 5; b++)
      if (k[b]) acc = acc + ((W+4)'(av) << b);
    return acc;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < APC_WORDS; i++) mem[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < APC_WORDS - 1; i++) mem[i] <= times_const(a, 2 * i + 1);
      mem[APC_WORDS-1] <= times_const(a, 2);
    end
  end

  always_comb begin
    for (int r = 0; r < R; r++) begin
      word[r] = '0;
      for (int i = 0; i < APC_WORDS; i++)
        if (wsel[r][i]) word[r] = word[r] | mem[i];
      if (reset[r]) word[r] = '0;
    end
  end
endmodule
