// tb_shift_add_tree: random and extreme digit sums; y must equal
// sum_j q[j] * 4^j.
module tb_shift_add_tree;
  localparam int L = 8, QW = 22, ND = L / 2;
  logic signed [QW-1:0]   q [ND];
  logic signed [QW+L-1:0] y;
  int checks = 0, failures = 0;

  shift_add_tree #(.L(L), .QW(QW)) dut (.q(q), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      longint acc;
      acc = 0;
      for (int j = 0; j < ND; j++) begin
        q[j] = (i == 0) ? QW'(1 << (QW - 1)) : (i == 1) ? QW'((1 << (QW - 1)) - 1) : QW'($urandom);
        acc += longint'(q[j]) * (longint'(1) << (2 * j));
      end
      #1;
      checks++;
      if (longint'(y) != acc) begin
        failures++;
        $display("FAIL y=%0d expected %0d", y, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
