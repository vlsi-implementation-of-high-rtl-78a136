// tb_adaptive_filter: end-to-end test of the multiplier-less LMS filter with
// all parameters at their defaults (16 taps, 8-bit samples, 16-bit weights,
// concurrent filtering and update). Every output, in_ready/out_valid and all
// weights are compared with a cycle-accurate model in every cycle; see
// adaptive_filter_tb_body.svh for the phases. Must occur: filtering of one
// sample in the same cycle as the update of the previous one, back-to-back
// samples, idle cycles, error and weight saturation, both update signs, the
// APC-OMS special inputs 00000 and 10000, and reset while running; stalls
// must not occur in this mode.
module tb_adaptive_filter;
  localparam bit CONC = 1'b1;

  logic clk = 0, rst_n = 0, in_valid, in_ready, out_valid;
  logic signed [7:0]  x_in;
  logic signed [15:0] d_in, y_out, e_out;
  logic signed [15:0] w_out [16];

  adaptive_filter dut (
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
