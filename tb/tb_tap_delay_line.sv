// tb_tap_delay_line: shifts random samples in (with random gaps where shift
// is low) and checks every tap against a software history; checks reset.
module tb_tap_delay_line;
  localparam int N = 16, L = 8;
  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [L-1:0] x_in;
  logic signed [L-1:0] taps [N];
  logic signed [L-1:0] hist [N];
  int checks = 0, failures = 0;

  tap_delay_line #(.N(N), .L(L)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .x_in(x_in), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < N; k++) begin
      checks++;
      if (taps[k] != hist[k]) begin
        failures++;
        $display("FAIL tap %0d = %0d expected %0d", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    x_in = '0;
    for (int k = 0; k < N; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      x_in  = L'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
      end
      #1 compare();
    end
    @(negedge clk) begin rst_n = 0; shift = 0; end
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < N; k++) hist[k] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
