// tb_adaptive_filter_seq: end-to-end test of the filter with CONCURRENT = 0
// (one sample in flight at a time, no adaptation delay), otherwise at default
// sizes. Same model and phases as tb_adaptive_filter (see
// adaptive_filter_tb_body.svh); here samples offered while one is in flight
// must be stalled by in_ready, and the two stages must never overlap.
module tb_adaptive_filter_seq;
  localparam bit CONC = 1'b0;

  logic clk = 0, rst_n = 0, in_valid, in_ready, out_valid;
  logic signed [7:0]  x_in;
  logic signed [15:0] d_in, y_out, e_out;
  logic signed [15:0] w_out [16];

  adaptive_filter #(.CONCURRENT(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .d_in(d_in), .out_valid(out_valid), .y_out(y_out),
    .e_out(e_out), .w_out(w_out));

`include "adaptive_filter_tb_body.svh"

  // Watchdog: the run needs about 10,000 cycles.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
