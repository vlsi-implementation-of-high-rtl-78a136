// tb_apc_oms_mult: the APC-OMS multiplier against plain multiplication.
// For the two extreme coefficients and random ones, all 32 inputs X are
// applied to both inputs of a two-input instance (X on one, 31-X on the
// other); each product must equal X*A, combinationally, from the cycle after
// the load until the next load, whatever the a input does meanwhile.
// The special inputs X = 00000 (stored 2A shifted to 16A) and X = 10000
// (RESET path) are counted.
module tb_apc_oms_mult;
  localparam int W = 8;
  logic           clk = 0, rst_n = 0, load = 0;
  logic [W-1:0]   a;
  logic [4:0]     x       [2];
  logic [W+4:0]   product [2];
  int checks = 0, failures = 0, n_zero = 0, n_reset = 0;

  apc_oms_mult #(.W(W), .R(2)) dut (.clk(clk), .rst_n(rst_n), .load(load), .a(a), .x(x), .product(product));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av;
    a = '0; x[0] = '0; x[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      av = (t == 0) ? 0 : (t == 1) ? (1 << W) - 1 : int'($urandom_range(1, (1 << W) - 1));
      @(negedge clk);
      a = W'(av);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      a = W'($urandom);
      for (int xv = 0; xv < 32; xv++) begin
        x[0] = 5'(xv);
        x[1] = 5'(31 - xv);
        #1;
        checks += 2;
        if (int'(product[0]) != xv * av || int'(product[1]) != (31 - xv) * av) begin
          failures++;
          $display("FAIL A=%0d X=%0d products=%0d %0d", av, xv, product[0], product[1]);
        end
        @(negedge clk);
        if (xv == 0)  n_zero++;
        if (xv == 16) n_reset++;
      end
    end
    checks++;
    if (n_zero == 0 || n_reset == 0) failures++;
    $display("special inputs: X=0 %0d times, X=16 (RESET) %0d times", n_zero, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
