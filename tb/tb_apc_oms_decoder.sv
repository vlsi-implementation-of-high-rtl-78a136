// tb_apc_oms_decoder: checks the 4-to-9 decoder for all 16 addresses:
// exactly word d selected for d <= 8, no word for the unused codes.
module tb_apc_oms_decoder;
  logic [3:0] d;
  logic [8:0] wsel;
  int checks = 0, failures = 0;

  apc_oms_decoder dut (.d(d), .wsel(wsel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [8:0] exp_w;
      d = 4'(v);
      #1;
      exp_w = '0;
      if (v <= 8) exp_w[v] = 1'b1;
      checks++;
      if (wsel != exp_w) begin
        failures++;
        $display("FAIL d=%0d wsel=%b expected %b", v, wsel, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
