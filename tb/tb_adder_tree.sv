// tb_adder_tree: random and extreme operand vectors; the sum must equal the
// software sum.
module tb_adder_tree;
  localparam int N = 16, IW = 18;
  logic signed [IW-1:0] in_vec [N];
  logic signed [IW+3:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.N(N), .IW(IW)) dut (.in_vec(in_vec), .sum(sum));

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
      for (int k = 0; k < N; k++) begin
        in_vec[k] = (i == 0) ? IW'(1 << (IW - 1)) : (i == 1) ? IW'((1 << (IW - 1)) - 1) : IW'($urandom);
        acc += longint'(in_vec[k]);
      end
      #1;
      checks++;
      if (longint'(sum) != acc) begin
        failures++;
        $display("FAIL sum=%0d expected %0d", sum, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
