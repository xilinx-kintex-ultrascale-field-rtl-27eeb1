// Self-checking test of shift_clk_detect: a shift clock at 1/4 of the tester clock and then
// with random periods; every rising edge must give exactly one pulse 2 to 3 cycles later.
module tb_shift_clk_detect;
  logic clk = 1'b0, rst = 1'b0, shift_clk = 1'b0, sync_o, edge_o;
  int checks = 0, failures = 0, rises = 0, pulses = 0;
  int last_rise = -100, cyc = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  shift_clk_detect dut (.clk, .rst, .shift_clk, .sync_o, .edge_o);

  always @(posedge clk) begin
    cyc++;
    if (!rst && edge_o) begin
      pulses++;
      checks++;
      if (cyc - last_rise < 2 || cyc - last_rise > 4) begin
        failures++;
        $display("FAIL pulse %0d cycles after the edge", cyc - last_rise);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      int hi, lo;
      hi = (i < 100) ? 2 : $urandom_range(2, 6);
      lo = (i < 100) ? 2 : $urandom_range(2, 6);
      @(negedge clk); #($urandom_range(0, 4));
      shift_clk = 1'b1; rises++; last_rise = cyc;
      repeat (hi) @(posedge clk);
      @(negedge clk); shift_clk = 1'b0;
      repeat (lo - 1) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (pulses != rises) begin failures++; $display("FAIL %0d pulses for %0d edges", pulses, rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
