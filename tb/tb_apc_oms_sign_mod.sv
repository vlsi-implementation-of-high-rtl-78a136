// tb_apc_oms_sign_mod: for random A and x' the product must be
// 16A + x'A when x4 = 1 and 16A - x'A when x4 = 0 (APC table).
module tb_apc_oms_sign_mod;
  localparam int W = 8;
  logic [W-1:0] a;
  logic [W+3:0] apc;
  logic         x4;
  logic [W+4:0] product;
  int checks = 0, failures = 0;

  apc_oms_sign_mod #(.W(W)) dut (.a(a), .apc(apc), .x4(x4), .product(product));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int xp, expv;
      a   = W'($urandom);
      xp  = $urandom_range(0, 16);
      apc = (W+4)'(xp * int'(a));
      x4  = (xp == 16) ? 1'b0 : 1'($urandom);
      #1;
      expv = x4 ? 16 * int'(a) + xp * int'(a) : 16 * int'(a) - xp * int'(a);
      checks++;
      if (int'(product) != expv) begin
        failures++;
        $display("FAIL a=%0d xp=%0d x4=%b product=%0d expected %0d", a, xp, x4, product, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
