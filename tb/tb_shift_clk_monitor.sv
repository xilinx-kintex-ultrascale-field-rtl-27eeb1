// Self-checking test of shift_clk_monitor: regular edges every 4 cycles give no event; a stop
// longer than two periods gives exactly one timeout event and in_timeout; the next edge gives
// one out-of-timeout event; hold clears without events.
module tb_shift_clk_monitor;
  import ku_pkg::*;
  logic clk = 1'b0, rst = 1'b0, hold = 1'b0, edge_i = 1'b0;
  logic evt_valid, in_timeout;
  status_e evt_status;
  int checks = 0, failures = 0, n_to = 0, n_out = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  shift_clk_monitor #(.PW(24)) dut (.clk, .rst, .hold, .edge_i, .period(24'd4),
                                    .evt_valid, .evt_status, .in_timeout);

  always @(posedge clk)
    if (evt_valid) begin
      if (evt_status == ST_TIMEOUT) n_to++;
      if (evt_status == ST_OUT_TIMEOUT) n_out++;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic edges(input int n);
    repeat (n) begin
      @(negedge clk) edge_i = 1'b1;
      @(negedge clk) edge_i = 1'b0;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    edges(20);
    check(n_to == 0 && n_out == 0 && !in_timeout, "no event while edges are regular");
    repeat (8) @(negedge clk);
    check(n_to == 0, "no timeout at two periods");
    repeat (4) @(negedge clk);
    check(n_to == 1 && in_timeout, "timeout after more than two periods");
    repeat (50) @(negedge clk);
    check(n_to == 1, "only one timeout event");
    edges(3);
    check(n_out == 1 && !in_timeout, "recovery event");
    repeat (20) @(negedge clk);
    hold = 1'b1;
    repeat (3) @(negedge clk);
    check(!in_timeout, "hold clears timeout");
    repeat (40) @(negedge clk);
    check(n_to == 2 && n_out == 1, "no event during hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
