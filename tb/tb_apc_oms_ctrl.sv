// tb_apc_oms_ctrl: exhaustive check of the APC-OMS control circuit.
// For every X and d3 the shift count must equal the number of trailing zeros
// of X[3:0] limited to 3 (the "# of shifts" column of the OMS table) and
// RESET must be x4 AND d3.
module tb_apc_oms_ctrl;
  logic [4:0] x;
  logic       d3, reset;
  logic [1:0] s;
  int checks = 0, failures = 0;

  apc_oms_ctrl dut (.x_lo(x[2:0]), .x4(x[4]), .d3(d3), .s(s), .reset(reset));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int tz;
      x  = v[4:0];
      d3 = v[5];
      #1;
      tz = 0;
      while (tz < 3 && x[tz] == 1'b0) tz++;
      checks++;
      if (s != 2'(tz)) begin
        failures++;
        $display("FAIL x=%b s=%0d expected %0d", x, s, tz);
      end
      checks++;
      if (reset != (x[4] && d3)) begin
        failures++;
        $display("FAIL x=%b d3=%b reset=%b", x, d3, reset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
