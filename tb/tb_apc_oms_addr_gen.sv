// tb_apc_oms_addr_gen: exhaustive check of the APC-OMS address generator.
// For every 5-bit X the expected APC address x' is X[3:0] when x4 = 1 and
// 16 - X[3:0] (mod 16) when x4 = 0. The generated address d must satisfy
// (2d + 1) * 2^s = x' for x' != 0 (an odd multiple shifted s places), and be
// 1000 for x' = 0. A few rows of the OMS table are also checked literally.
module tb_apc_oms_addr_gen;
  logic [4:0] x;
  logic [1:0] s;
  logic [3:0] d;
  int checks = 0, failures = 0;

  apc_oms_addr_gen dut (.x(x), .s(s), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_d(input logic [4:0] xv, input logic [3:0] dv);
    int tz;
    x = xv;
    tz = 0;
    while (tz < 3 && xv[tz] == 1'b0) tz++;
    s = 2'(tz);
    #1;
    checks++;
    if (d != dv) begin
      failures++;
      $display("FAIL table x=%b d=%b expected %b", xv, d, dv);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      int xp, tz;
      x = v[4:0];
      xp = x[4] ? int'(x[3:0]) : (16 - int'(x[3:0])) % 16;
      tz = 0;
      while (tz < 3 && x[tz] == 1'b0) tz++;
      s = 2'(tz);
      #1;
      checks++;
      if (xp == 0) begin
        if (d != 4'b1000) begin
          failures++;
          $display("FAIL x=%b d=%b expected 1000", x, d);
        end
      end else if (((2 * int'(d) + 1) << tz) != xp || d[3]) begin
        failures++;
        $display("FAIL x=%b xp=%0d d=%b s=%0d", x, xp, d, tz);
      end
    end
    // Rows of the OMS table (x4 = 1 so that x' = X[3:0]).
    expect_d(5'b10001, 4'b0000);
    expect_d(5'b10110, 4'b0001);
    expect_d(5'b11010, 4'b0010);
    expect_d(5'b11110, 4'b0011);
    expect_d(5'b11001, 4'b0100);
    expect_d(5'b11111, 4'b0111);
    // Anti-symmetric pair: X = 00001 uses address of 15A.
    expect_d(5'b00001, 4'b0111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
