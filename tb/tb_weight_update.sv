// tb_weight_update: the LUT-based LMS update against plain arithmetic.
// For random errors and taps: load |e| with `load`, then pulse `upd`; each
// weight must become sat(w + s * ((|e|*|x|) >> MU_SHIFT)), s = sign(e)*sign(x).
// A cycle with neither pulse must leave the weights unchanged. Error and tap
// extremes (-2^15, -128) and weight saturation are exercised and counted.
module tb_weight_update;
  localparam int N = 16, L = 8, W = 16, DW = 16, MU = 6;
  localparam longint WMAX = (longint'(1) << (W - 1)) - 1;
  localparam longint WMIN = -(longint'(1) << (W - 1));
  logic clk = 0, rst_n = 0, load = 0, upd = 0;
  logic signed [DW-1:0] e;
  logic signed [L-1:0]  taps [N];
  logic signed [W-1:0]  w    [N];
  longint ref_w [N];
  int checks = 0, failures = 0, n_wsat = 0, n_neg = 0, n_pos = 0;

  weight_update #(.N(N), .L(L), .W(W), .DW(DW), .MU_SHIFT(MU)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .e(e), .upd(upd), .taps(taps), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(w[k]) != ref_w[k]) begin
        failures++;
        $display("FAIL %s w[%0d]=%0d expected %0d", what, k, w[k], ref_w[k]);
      end
    end
  endtask

  initial begin
    e = '0;
    for (int k = 0; k < N; k++) begin taps[k] = '0; ref_w[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare("reset");
    for (int i = 0; i < 600; i++) begin
      longint ev;
      ev = (i == 5) ? -32768 : (i % 3 == 0) ? longint'($urandom_range(0, 65535)) - 32768
                             : longint'($urandom_range(0, 2000)) - 1000;
      @(negedge clk);
      for (int k = 0; k < N; k++) taps[k] = (i == 5 && k == 0) ? -8'sd128 : L'($urandom);
      e = DW'(ev);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      e = DW'($urandom);   // the loaded value must be used
      compare("load");     // load alone changes no weight
      upd = 1'b1;
      for (int k = 0; k < N; k++) begin
        longint m, dl, nw;
        m  = (ev < 0 ? -ev : ev) * longint'(taps[k] < 0 ? -longint'(taps[k]) : longint'(taps[k]));
        dl = m >> MU;
        if ((ev < 0) != (taps[k] < 0)) begin dl = -dl; if (dl != 0) n_neg++; end
        else if (dl != 0) n_pos++;
        nw = ref_w[k] + dl;
        if (nw > WMAX) begin nw = WMAX; n_wsat++; end
        if (nw < WMIN) begin nw = WMIN; n_wsat++; end
        ref_w[k] = nw;
      end
      @(negedge clk);
      upd = 1'b0;
      compare("update");
    end
    checks++;
    if (n_wsat == 0 || n_neg == 0 || n_pos == 0) failures++;
    $display("updates: positive %0d, negative %0d, saturated %0d", n_pos, n_neg, n_wsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
