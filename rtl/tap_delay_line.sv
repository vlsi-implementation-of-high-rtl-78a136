// tap_delay_line: the chain of sample delays that feeds the filter taps.
//
// Holds the N newest input samples, taps[k] = x(n-k), the input vector of the
// LMS update. On each `shift` the new sample enters tap 0 and every sample
// moves one tap down; the oldest is dropped. Synchronous active-low reset
// clears all taps. Outputs are registers, valid the cycle after `shift`.
// The D chain is the document's; the shift enable and the reset are this
// design's choices.
module tap_delay_line #(
  parameter int unsigned N = 16,   // number of taps
  parameter int unsigned L = 8     // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [L-1:0] x_in,
  output logic signed [L-1:0] taps [N]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) taps[k] <= '0;
    end else if (shift) begin
      taps[0] <= x_in;
      for (int k = 1; k < N; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
