// Self-checking test of uart_tx (16 clocks per bit): each byte's line waveform is sampled
// in the middle of every bit and must be start 0, the 8 data bits LSB first, stop 1; a frame
// must take 10 bit times before ready returns.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b0, valid = 1'b0, ready, txd;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .valid, .data, .ready, .txd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(txd == 1'b1 && ready, "idle high and ready");
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      logic [9:0] got;
      int busy;
      b = (i == 0) ? 8'h55 : 8'($urandom);
      while (!ready) @(negedge clk);
      data = b; valid = 1'b1;
      @(negedge clk); valid = 1'b0;
      // line changes one cycle after the load; sample bit centres
      repeat (CPB / 2) @(negedge clk);
      for (int k = 0; k < 10; k++) begin
        got[k] = txd;
        if (k < 9) repeat (CPB) @(negedge clk);
      end
      check(got == {1'b1, b, 1'b0}, $sformatf("frame %h for byte %h", got, b));
      busy = 9 * CPB + CPB / 2 + 1;
      while (!ready) begin @(negedge clk); busy++; end
      check(busy >= 10 * CPB && busy <= 10 * CPB + 2, $sformatf("frame length %0d", busy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
