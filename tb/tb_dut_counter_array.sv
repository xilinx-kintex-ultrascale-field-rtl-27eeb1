// Self-checking test of dut_counter_array: all four schemes are built side by side on a small
// array (10 counters) and each one's pins are compared every cycle with the reference
// sequence n + 40k (mod 256); a BTMR copy is upset and must be masked and flagged.
module tb_dut_counter_array;
  import ku_pkg::*;
  localparam int N = 10, CW = 8, SHIFT = 4, PERIOD = N * SHIFT;
  logic clk = 1'b0, rst = 1'b0;
  logic [CW-1:0] co [4];
  logic [3:0]    sc;
  logic [2:0]    de [4];
  int checks = 0, failures = 0, flagged = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets

  dut_counter_array #(.SCHEME(TMR_NONE), .NCNT(N)) d0 (.clk, .rst, .counter_out(co[0]), .shift_clk(sc[0]), .domain_err(de[0]));
  dut_counter_array #(.SCHEME(TMR_BTMR), .NCNT(N)) d1 (.clk, .rst, .counter_out(co[1]), .shift_clk(sc[1]), .domain_err(de[1]));
  dut_counter_array #(.SCHEME(TMR_LTMR), .NCNT(N)) d2 (.clk, .rst, .counter_out(co[2]), .shift_clk(sc[2]), .domain_err(de[2]));
  dut_counter_array #(.SCHEME(TMR_DTMR), .NCNT(N)) d3 (.clk, .rst, .counter_out(co[3]), .shift_clk(sc[3]), .domain_err(de[3]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 10 * PERIOD; t++) begin
      @(posedge clk); #1;
      for (int s = 0; s < 4; s++) begin
        logic [CW-1:0] e;
        e = CW'((t % PERIOD) / SHIFT + PERIOD * (t / PERIOD));
        checks++;
        if (co[s] != e || sc[s] != ((t % SHIFT) < 2)) begin
          failures++;
          if (failures < 10) $display("FAIL scheme %0d t=%0d got %0d exp %0d", s, t, co[s], e);
        end
      end
      if (de[1] != 0) flagged++;
      if (t == 100) d1.g_btmr.u_ca.g_copy[2].u_copy.q[3*CW + 5] = ~d1.g_btmr.u_ca.g_copy[2].u_copy.q[3*CW + 5];
    end
    checks++;
    if (flagged == 0) begin failures++; $display("FAIL BTMR upset not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
