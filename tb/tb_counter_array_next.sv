// Self-checking test of counter_array_next on a small array (6 counters, 4-bit, shift 4):
// random states are applied and each field of the next state is compared with the rules
// (increment, reload at cycle 0, shift up on multiples of 4, cycle wrap, shift-clock phase).
module tb_counter_array_next;
  localparam int N = 6, CW = 4, SHIFT = 4, CYC_W = $clog2(SHIFT * N);
  localparam int SW = 2 * N * CW + CYC_W + 1;
  logic [SW-1:0] q, d;
  logic [CW-1:0] top;
  logic sclk;
  int checks = 0, failures = 0;

  counter_array_next #(.NCNT(N), .CW(CW), .SHIFT(SHIFT)) dut (.q, .d, .top, .sclk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int cyc;
      q = '0;
      for (int w = 0; w < SW; w += 32) q[w +: 32] = $urandom;
      cyc = (i < 48) ? i % (SHIFT * N) : $urandom_range(SHIFT * N - 1);
      q[2*N*CW +: CYC_W] = CYC_W'(cyc);
      #1;
      check(top == q[N*CW +: CW], "top is snapshot entry 0");
      check(sclk == q[SW-1], "sclk is state bit");
      for (int n = 0; n < N; n++) begin
        logic [CW-1:0] exp_snap;
        check(d[n*CW +: CW] == CW'(q[n*CW +: CW] + 1), $sformatf("counter %0d increments", n));
        if (cyc == 0)               exp_snap = q[n*CW +: CW];
        else if (cyc % SHIFT == 0)  exp_snap = (n == N - 1) ? '0 : q[(N+n+1)*CW +: CW];
        else                        exp_snap = q[(N+n)*CW +: CW];
        check(d[(N+n)*CW +: CW] == exp_snap, $sformatf("snap %0d at cyc %0d", n, cyc));
      end
      check(int'(d[2*N*CW +: CYC_W]) == ((cyc + 1) % (SHIFT * N)), "cycle counter");
      check(d[SW-1] == ((cyc % SHIFT) < SHIFT / 2), "shift clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
