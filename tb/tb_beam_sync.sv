// Self-checking test of beam_sync: each beam-on change must give exactly one event, status 6
// when the beam turns on and 4 when it turns off, within 3 cycles.
module tb_beam_sync;
  import ku_pkg::*;
  logic clk = 1'b0, rst = 1'b0, beam_on = 1'b0, beam_level, evt_valid;
  status_e evt_status;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  beam_sync dut (.clk, .rst, .beam_on, .beam_level, .evt_valid, .evt_status);

  always @(posedge clk)
    if (evt_valid) begin
      if (evt_status == ST_BEAM_ON) n_on++;
      else if (evt_status == ST_BEAM_OFF) n_off++;
    end

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
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 1; i <= 10; i++) begin
      #3 beam_on = 1'b1;
      repeat (4) @(negedge clk);
      check(n_on == i && n_off == i - 1 && beam_level, "beam on event");
      repeat ($urandom_range(1, 20)) @(negedge clk);
      #2 beam_on = 1'b0;
      repeat (4) @(negedge clk);
      check(n_on == i && n_off == i && !beam_level, "beam off event");
      repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    check(int'(ST_BEAM_ON) == 6 && int'(ST_BEAM_OFF) == 4, "status codes 6 and 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
