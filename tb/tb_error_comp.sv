// tb_error_comp: random taps, weights and desired responses against a
// software dot product. y must be sat(floor(sum w_k x_k / 2^F)) and e must be
// sat(d - y); both must be captured in y_q/e_q on an enabled clock edge and
// held otherwise. Large weights are used part of the time so that the error
// saturates (counted). At these widths |y| stays below 2^14, so the output
// saturation cannot be reached and is only counted.
module tb_error_comp;
  localparam int N = 16, L = 8, W = 16, F = 12, DW = 16;
  localparam longint DMAX = (longint'(1) << (DW - 1)) - 1;
  localparam longint DMIN = -(longint'(1) << (DW - 1));
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [L-1:0]  taps [N];
  logic signed [W-1:0]  w    [N];
  logic signed [DW-1:0] d, y_now, e_now, y_q, e_q;
  int checks = 0, failures = 0, n_ysat = 0, n_esat = 0;

  error_comp #(.N(N), .L(L), .W(W), .F(F), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .taps(taps), .w(w), .d(d),
    .y_now(y_now), .e_now(e_now), .y_q(y_q), .e_q(e_q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    return (v > DMAX) ? DMAX : (v < DMIN) ? DMIN : v;
  endfunction

  initial begin
    logic signed [DW-1:0] y_hold, e_hold;
    for (int k = 0; k < N; k++) begin taps[k] = '0; w[k] = '0; end
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    y_hold = '0; e_hold = '0;
    for (int i = 0; i < 1500; i++) begin
      longint acc, ye, ee;
      bit big;
      @(negedge clk);
      big = (i % 4 == 3);
      acc = 0;
      for (int k = 0; k < N; k++) begin
        taps[k] = L'($urandom);
        w[k]    = big ? W'($urandom) : W'($urandom_range(0, 2 * 4096) - 4096);
        acc += longint'(w[k]) * longint'(taps[k]);
      end
      d  = DW'($urandom);
      en = 1'($urandom);
      #1;
      ye = sat(acc >>> F);
      ee = sat(longint'(d) - ye);
      if (ye == DMAX || ye == DMIN) n_ysat++;
      if (ee == DMAX || ee == DMIN) n_esat++;
      checks++;
      if (longint'(y_now) != ye) begin
        failures++;
        $display("FAIL y=%0d expected %0d", y_now, ye);
      end
      checks++;
      if (longint'(e_now) != ee) begin
        failures++;
        $display("FAIL e=%0d expected %0d", e_now, ee);
      end
      if (en) begin
        y_hold = DW'(ye);
        e_hold = DW'(ee);
      end
      @(posedge clk);
      #1;
      checks++;
      if (y_q != y_hold || e_q != e_hold) begin
        failures++;
        $display("FAIL registered y=%0d e=%0d expected %0d %0d", y_q, e_q, y_hold, e_hold);
      end
    end
    checks++;
    if (n_esat == 0) failures++;
    $display("saturations: y %0d, e %0d", n_ysat, n_esat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
