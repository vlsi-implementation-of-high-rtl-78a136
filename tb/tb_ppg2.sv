// tb_ppg2: random weights and samples (plus the extreme values). Each output
// must be w times its radix-4 digit (top digit signed) and the weighted sum of
// the outputs must equal w*x.
module tb_ppg2;
  localparam int L = 8, W = 16, ND = L / 2;
  logic signed [W-1:0] w;
  logic signed [L-1:0] x;
  logic signed [W+1:0] p [ND];
  int checks = 0, failures = 0;

  ppg2 #(.L(L), .W(W)) dut (.w(w), .x(x), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint acc;
      w = (i == 0) ? W'(1 << (W - 1)) : (i == 1) ? W'((1 << (W - 1)) - 1) : W'($urandom);
      x = (i < 2) ? L'(1 << (L - 1)) : L'($urandom);
      #1;
      acc = 0;
      for (int j = 0; j < ND; j++) begin
        longint dig;
        dig = (x >>> (2 * j)) & 3;
        if (j == ND - 1 && dig >= 2) dig = dig - 4;
        checks++;
        if (longint'(p[j]) != longint'(w) * dig) begin
          failures++;
          $display("FAIL w=%0d x=%0d p[%0d]=%0d", w, x, j, p[j]);
        end
        acc += longint'(p[j]) <<< (2 * j);
      end
      checks++;
      if (acc != longint'(w) * longint'(x)) begin
        failures++;
        $display("FAIL w=%0d x=%0d sum=%0d", w, x, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
