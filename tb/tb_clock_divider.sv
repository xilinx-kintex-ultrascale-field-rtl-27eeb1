// Self-checking test of clock_divider: with div = 0 the output follows the input clock; with
// div = 1, 3 and 7 the output period must be 2*div input cycles, measured between rising edges.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b0, clk_out;
  logic [15:0] div = '0;
  logic [23:0] period_x4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  clock_divider dut (.clk_in(clk), .rst, .div, .clk_out, .period_x4);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (5) begin
      @(posedge clk); #1 check(clk_out == 1'b1, "pass-through high");
      @(negedge clk); #1 check(clk_out == 1'b0, "pass-through low");
    end
    check(period_x4 == 24'd4, "period at div 0");
    for (int d = 1; d <= 7; d += 2) begin
      div = 16'(d);
      repeat (4) @(posedge clk_out);
      @(posedge clk_out) t0 = $realtime;
      @(posedge clk_out) t1 = $realtime;
      check(t1 - t0 == 10.0 * 2 * d, $sformatf("period for div %0d is %0t", d, t1 - t0));
      check(period_x4 == 24'(8 * d), "period_x4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
