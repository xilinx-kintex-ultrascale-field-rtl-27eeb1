// Self-checking test of counter_array at its default size (200 counters x 8 bits).
// A reference model predicts every cycle's COUNTER and SHIFT_CLK value: after reset, edge t
// shows counter (t mod 800)/4 as it was at snapshot k = t/800, i.e. n + 800k (mod 256), and
// SHIFT_CLK is high in the first two cycles of every four. Two single-bit upsets are then
// written into the state (a counter bit, later a snapshot-register bit)
// and the outputs are checked against what the scheme should show.
module tb_counter_array;
  localparam int NCNT = 200, CW = 8, SHIFT = 4, PERIOD = NCNT * SHIFT;
  localparam int MASKED = 0;  // 1: upsets must not reach the pins
  localparam int BTMR   = 0;

  logic clk = 1'b0, rst = 1'b0;
  logic [CW-1:0] counter_out;
  logic shift_clk;
  logic [2:0] domain_err;
  int checks = 0, failures = 0;
  int t;                     // clock edges since reset release
  int delta7;                // offset of counter 7 caused by an unmasked upset
  int dom_err_seen = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets

  counter_array dut (.clk, .rst, .counter_out, .shift_clk);
  assign domain_err = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d %s", t, what);
    end
  endtask

  function automatic logic [CW-1:0] model_top(input int tt);
    int k, pos;
    k   = tt / PERIOD;
    pos = (tt % PERIOD) / SHIFT;
    return CW'(pos + PERIOD * k + ((pos == 7 && tt >= 1100) ? delta7 : 0))
         ^ CW'((!MASKED && k == 5 && pos == 50) ? 1 : 0);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] v;
    delta7 = 0;
    t = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(counter_out == 0 && shift_clk == 1'b0, "reset outputs");
    for (t = 0; t < 6 * PERIOD; t++) begin
      @(posedge clk);
      #1;
      check(counter_out == model_top(t), $sformatf("counter_out %0d exp %0d", counter_out, model_top(t)));
      check(shift_clk == ((t % SHIFT) < SHIFT / 2), "shift_clk phase");
      if (domain_err != 0) dom_err_seen++;
      // upset 1: bit 3 of counter 7 (its next snapshot is at edge 1600)
      if (t == 1000) begin
        @(negedge clk);
        v = dut.q[7*CW +: CW];
        dut.q[7*CW + 3] = ~dut.q[7*CW + 3];
        if (!MASKED) delta7 = int'(CW'(v ^ 8'h08) - v);
        @(negedge clk);
        t += 1;
      end
      // upset 2: bit 0 of snapshot entry 50 while it still waits to shift out
      if (t == 4000) begin
        @(negedge clk);
        dut.q[(NCNT + 50) * CW] = ~dut.q[(NCNT + 50) * CW];
        @(negedge clk);
        t += 1;
      end
    end
    if (!MASKED) begin
      check(delta7 != 0, "counter upset changed the counter");
    end
    if (BTMR) check(dom_err_seen > 0, "domain error reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
