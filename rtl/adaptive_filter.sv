// adaptive_filter: multiplier-less LMS adaptive FIR filter (top level).
//
// An N-tap transversal filter whose weights follow the LMS rule
// w(n+1) = w(n) + 2*mu*e(n)*x(n), e(n) = d(n) - y(n). No multiplier is used:
// the filter output is formed by 2-bit partial-product generators, adder
// trees and a shift-add tree (error_comp), and the e*x products of the
// update by APC-OMS LUT multipliers sharing one LUT of odd multiples of |e|
// (weight_update).
//
// Two pipeline stages follow the accepting clock edge (at which x enters the
// delay line and d is latched):
//   error stage   y and e are formed from the taps and the current weights;
//                 e is registered, the LUT is loaded with |e| and the taps
//                 are copied into the update latch.
//   update stage  all weights are written from the LUT and the latched
//                 taps; y_out/e_out are presented with out_valid.
// With CONCURRENT = 1 (default) a new sample is accepted every cycle, so
// filtering of sample n runs in the same cycle as the weight update of
// sample n-1: one sample per clock with an adaptation delay of one sample
// when samples arrive back to back (none when they are two or more cycles
// apart). With CONCURRENT = 0, in_ready stays low while a sample is in
// flight: one sample per three cycles, no adaptation delay.
// Latency: out_valid two cycles after the accepting edge.
// Interface: samples are signed L-bit (x) and DW-bit (d); y_out and e_out
// are DW bits, saturated; w_out shows the W-bit weights (F fractional bits).
// Synchronous active-low reset clears the taps, the weights and the outputs.
// The datapath and the concurrent filtering and update follow the document.
// N = 16 is inferred from the 33 multipliers of the multiplier-based version
// it compares with (2N + 1); the widths, the fixed-point format, the step
// size, the handshake and the CONCURRENT = 0 mode are this design's choices.
module adaptive_filter
  import da_lms_pkg::*;
#(
  parameter int unsigned N          = 16,   // taps
  parameter int unsigned L          = 8,    // input sample width
  parameter int unsigned W          = 16,   // weight width
  parameter int unsigned F          = 12,   // fractional bits of the weights
  parameter int unsigned DW         = 16,   // width of d, y and e
  parameter int unsigned MU_SHIFT   = 6,    // 2*mu = 2^-(MU_SHIFT + F)
  parameter bit          CONCURRENT = 1'b1  // filter and update overlap
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [L-1:0]  x_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 out_valid,
  output logic signed [DW-1:0] y_out,
  output logic signed [DW-1:0] e_out,
  output logic signed [W-1:0]  w_out [N]
);
  af_pipe_t pipe;
  logic signed [DW-1:0] d_q;
  logic signed [L-1:0]  taps  [N];
  logic signed [L-1:0]  utaps [N];   // taps of the sample in the update stage
  logic signed [W-1:0]  w     [N];
  logic signed [DW-1:0] e_now;
  logic                 accept;

  assign in_ready  = CONCURRENT ? 1'b1 : (pipe == '0);
  assign accept    = in_valid && in_ready;
  assign out_valid = pipe.upd;
  assign w_out     = w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pipe <= '0;
      d_q  <= '0;
      for (int k = 0; k < N; k++) utaps[k] <= '0;
    end else begin
      pipe.err <= accept;
      pipe.upd <= pipe.err;
      if (accept)   d_q   <= d_in;
      if (pipe.err) utaps <= taps;
    end
  end

  tap_delay_line #(.N(N), .L(L)) u_taps (
    .clk(clk), .rst_n(rst_n), .shift(accept), .x_in(x_in), .taps(taps));

  error_comp #(.N(N), .L(L), .W(W), .F(F), .DW(DW)) u_err (
    .clk(clk), .rst_n(rst_n), .en(pipe.err),
    .taps(taps), .w(w), .d(d_q),
    .y_now(), .e_now(e_now), .y_q(y_out), .e_q(e_out));

  weight_update #(.N(N), .L(L), .W(W), .DW(DW), .MU_SHIFT(MU_SHIFT)) u_wup (
    .clk(clk), .rst_n(rst_n), .load(pipe.err), .e(e_now),
    .upd(pipe.upd), .taps(utaps), .w(w));

  // Without overlap, a sample is only taken while none is in flight.
  if (!CONCURRENT) begin : g_seq_check
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> pipe == '0);
  end
endmodule
