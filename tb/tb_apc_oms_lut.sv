// tb_apc_oms_lut: loads random coefficients and reads every word through two
// read ports. Word i must be (2i+1)*A for i < 8 and 2A for word 8; RESET must
// give zero; no select gives zero; the words keep their value until the next
// load and are cleared by reset.
module tb_apc_oms_lut;
  localparam int W = 8;
  localparam int R = 2;
  logic           clk = 0, rst_n = 0, load = 0;
  logic [W-1:0]   a;
  logic [8:0]     wsel  [R];
  logic           reset [R];
  logic [W+3:0]   word  [R];
  int checks = 0, failures = 0;

  apc_oms_lut #(.W(W), .R(R)) dut (.clk(clk), .rst_n(rst_n), .load(load), .a(a),
                                  .wsel(wsel), .reset(reset), .word(word));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_words(input int av);
    for (int i = 0; i < 9; i++) begin
      int expv;
      expv = (i < 8) ? (2 * i + 1) * av : 2 * av;
      wsel[0] = 9'(1) << i;
      wsel[1] = 9'(1) << (8 - i);
      reset[0] = 1'b0;
      reset[1] = 1'b0;
      #1;
      checks++;
      if (int'(word[0]) != expv) begin
        failures++;
        $display("FAIL A=%0d word %0d = %0d expected %0d", av, i, word[0], expv);
      end
      checks++;
      if (int'(word[1]) != ((8 - i < 8) ? (2 * (8 - i) + 1) * av : 2 * av)) begin
        failures++;
        $display("FAIL port 1 A=%0d word %0d = %0d", av, 8 - i, word[1]);
      end
      reset[0] = 1'b1;
      #1;
      checks++;
      if (word[0] != '0) begin
        failures++;
        $display("FAIL RESET did not clear the output");
      end
    end
    wsel[0] = '0;
    reset[0] = 1'b0;
    #1;
    checks++;
    if (word[0] != '0) begin
      failures++;
      $display("FAIL no select gave %0d", word[0]);
    end
  endtask

  initial begin
    int prev;
    a = '0;
    wsel[0] = '0; wsel[1] = '0; reset[0] = 0; reset[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_words(0);
    prev = 0;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      a = (t == 0) ? W'((1 << W) - 1) : W'($urandom);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      prev = int'(a);
      a = W'($urandom);   // must not disturb the stored words
      @(negedge clk);
      check_words(prev);
    end
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check_words(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
