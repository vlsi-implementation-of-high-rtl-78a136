// tb_apc_oms_barrel_shifter: random words shifted by 0..3 places, compared
// with din * 2^s truncated to the word width.
module tb_apc_oms_barrel_shifter;
  localparam int WD = 12;
  logic [WD-1:0] din, dout;
  logic [1:0]    s;
  int checks = 0, failures = 0;

  apc_oms_barrel_shifter #(.WD(WD)) dut (.din(din), .s(s), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      longint unsigned expv;
      din = WD'($urandom);
      s   = 2'(i % 4);
      #1;
      expv = (longint'(din) * (64'd1 << s)) % (64'd1 << WD);
      checks++;
      if (dout != WD'(expv)) begin
        failures++;
        $display("FAIL din=%h s=%0d dout=%h", din, s, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
