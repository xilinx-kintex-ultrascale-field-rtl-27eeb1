// End-to-end test of the whole test system, at reduced sizes (20 counters, 16 clocks per
// RS232 bit, alive message every 20000 clocks, 40-word scrub file). Two systems run side by
// side from the same host commands: one with the plain counter array, one with DTMR.
// The test follows the report's run procedure (01, 99, A0, 03, 02, 06) and then makes each
// mechanism happen: command echo, alive message, counter reset and start, a counter upset
// (reported by the plain system, masked by the DTMR one), shift-clock timeout and recovery,
// beam on/off status records, a slower DUT clock through the divider, blind scrubbing with
// flip-all error injection, and a tester soft reset. Each is counted; one that never happened
// counts as a failure.
module tb_ku_see_top;
  import ku_pkg::*;
  localparam int N = 20, CPB = 16, AW = 22, NW = 40;
  localparam int NMECH = 12;
  localparam string MECH [NMECH] = '{"echo", "alive", "counter reset", "start",
    "error record", "TMR masking", "timeout", "out of timeout", "beam on", "beam off",
    "clock divider", "scrub+inject"};

  logic clk = 1'b0, rst = 1'b0, beam_on = 1'b0;
  logic rxd;
  logic [1:0] txd;
  logic [AW-1:0] sram_addr [2];
  logic [1:0] sram_oe, csi_b, rdwr_b, cclk, dclk, drst, dsclk, running, in_timeout;
  logic [31:0] sram_rdata [2], smap_d [2], passes [2];
  logic [7:0] dcnt [2];
  logic [2:0] derr [2];
  logic [15:0] errc [2], dropped [2];
  int mech [NMECH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  host_model #(.CPB(CPB)) host0 (.clk, .txd(txd[0]), .rxd(rxd));
  host_model #(.CPB(CPB)) host1 (.clk, .txd(txd[1]), .rxd());

  for (genvar s = 0; s < 2; s++) begin : g_sys
    sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr[s]), .oe(sram_oe[s]), .rdata(sram_rdata[s]));
    ku_see_top #(.SCHEME(s == 0 ? TMR_NONE : TMR_DTMR), .NCNT(N), .CLKS_PER_BIT(CPB),
                 .ALIVE_CYCLES(20000), .GAP_CYCLES(2000)) u_top (
      .clk, .rst, .rxd, .txd(txd[s]), .beam_on, .scrub_words(AW'(NW)),
      .sram_addr(sram_addr[s]), .sram_oe(sram_oe[s]), .sram_rdata(sram_rdata[s]),
      .smap_csi_b(csi_b[s]), .smap_rdwr_b(rdwr_b[s]), .smap_cclk(cclk[s]), .smap_d(smap_d[s]),
      .dut_clk(dclk[s]), .dut_rst(drst[s]), .dut_counter(dcnt[s]), .dut_shift_clk(dsclk[s]),
      .dut_domain_err(derr[s]), .running(running[s]), .error_count(errc[s]),
      .in_timeout(in_timeout[s]), .records_dropped(dropped[s]), .scrub_passes(passes[s])
    );
  end

  // SelectMAP capture of system 0: words are compared with the golden file, inverted words
  // counted (flip-all injection over 32-bit words 5..6).
  function automatic logic [31:0] golden(input int a);
    return {16'(a) ^ 16'hC35A, ~16'(a) ^ 16'h0F0F};
  endfunction
  int smap_words = 0, smap_flipped = 0, smap_bad = 0;
  always @(posedge cclk[0])
    if (!csi_b[0]) begin
      int a;
      a = smap_words % NW;
      if (smap_d[0] == golden(a)) ;
      else if ((a == 5 || a == 6) && smap_d[0] == ~golden(a)) smap_flipped++;
      else smap_bad++;
      smap_words++;
    end

  // DUT reset pulses seen
  int dut_resets = 0;
  always @(posedge drst[0]) dut_resets++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nu;
    logic [31:0] echoes [$];
    err_record_t recs [$];
    err_record_t recs1 [$];
    int cmds;
    logic [7:0] v;
    foreach (mech[i]) mech[i] = 0;
    cmds = 0;
    wait_clk(3);
    rst = 1'b0;
    wait_clk(10);
    // run procedure
    host0.send_cmd(8'h01, 0, 0, 0); cmds++;
    host0.send_cmd(8'h99, 0, 0, 0); cmds++;
    host0.send_cmd(8'hA0, 0, 0, 0); cmds++;
    host0.send_cmd(8'h03, 0, 0, 0); cmds++;
    check(dut_resets >= 2, "DUT reset pulse from command 03");
    if (dut_resets >= 2) mech[2]++;
    host0.send_cmd(8'h02, 0, 0, 0); cmds++;
    check(running == 2'b11, "testing started");
    if (running == 2'b11) mech[3]++;
    host0.send_cmd(8'h06, 0, 0, 0); cmds++;
    wait_clk(20 * 4 * N);
    check(errc[0] == 0 && errc[1] == 0, "no errors without upsets");

    // counter upset: bit 2 of counter 5, in the plain design and in one DTMR domain
    @(negedge dclk[0]);
    g_sys[0].u_top.u_dut.g_none.u_ca.q[5*8 + 2] = ~g_sys[0].u_top.u_dut.g_none.u_ca.q[5*8 + 2];
    g_sys[1].u_top.u_dut.g_dtmr.u_ca.q[1][5*8 + 2] = ~g_sys[1].u_top.u_dut.g_dtmr.u_ca.q[1][5*8 + 2];
    wait_clk(3 * 4 * N + 40 * 10 * CPB);
    check(errc[0] == 1, $sformatf("plain design: one counter error (%0d)", errc[0]));
    check(errc[1] == 0, "DTMR design: upset masked");
    if (errc[0] == 1) mech[4]++;
    if (errc[1] == 0 && errc[0] == 1) mech[5]++;

    wait_clk(30 * 10 * CPB);  // let the error record go out

    // beam on / off
    beam_on = 1'b1; wait_clk(500);
    beam_on = 1'b0; wait_clk(500);

    // slower DUT clock: divide by 2*3, reset and restart
    host0.send_cmd(8'hA0, 8'd3, 0, 0); cmds++;
    host0.send_cmd(8'h04, 0, 0, 0); cmds++;
    wait_clk(3 * 6 * 4 * N);
    check(errc[0] == 0 && errc[1] == 0 && !in_timeout[0], "no errors at divided clock");
    check(dut_resets >= 3, "reset from command 04");
    begin
      realtime t0, t1;
      @(posedge dclk[0]) t0 = $realtime;
      @(posedge dclk[0]) t1 = $realtime;
      check(t1 - t0 == 60.0, "DUT clock divided by 6");
      // the DUT itself must run on the divided clock: its shift clock is 4 DUT clocks
      @(posedge dsclk[0]) t0 = $realtime;
      @(posedge dsclk[0]) t1 = $realtime;
      check(t1 - t0 == 240.0, "DUT shift clock at 4 divided clocks");
      if (t1 - t0 == 240.0 && errc[0] == 0) mech[10]++;
    end

    // scrubbing with flip-all injection over 16-bit words 10..13 (32-bit words 5 and 6)
    host0.send_cmd(8'h79, 8'd10, 0, 0); cmds++;
    host0.send_cmd(8'h7A, 8'd13, 0, 0); cmds++;
    host0.send_cmd(8'h7E, 8'd1, 0, 0); cmds++;
    host0.send_cmd(8'h0E, 0, 0, 0); cmds++;
    wait_clk(3 * 4 * NW);
    check(smap_flipped == 2 && smap_bad == 0 && smap_words > 10 * NW,
          $sformatf("scrub: %0d words, %0d injected, %0d wrong", smap_words, smap_flipped, smap_bad));
    if (smap_flipped == 2 && smap_bad == 0) mech[11]++;
    host0.send_cmd(8'h26, 0, 0, 0); cmds++;
    check(csi_b[0] == 1'b1, "scrubber stopped");

    // shift clock stops: timeout, then recovery
    force g_sys[0].u_top.dut_shift_clk = 1'b0;
    wait_clk(200);
    check(in_timeout[0] == 1'b1, "timeout flagged");
    release g_sys[0].u_top.dut_shift_clk;
    wait_clk(50);
    check(in_timeout[0] == 1'b0, "timeout cleared");
    // the missed shift clocks leave the tester's counter number behind: restart the test
    host0.send_cmd(8'h04, 0, 0, 0); cmds++;
    wait_clk(3 * 6 * 4 * N);
    check(errc[0] == 0, "restart after the timeout");

    // let the alive timer fire and the buffered records drain
    wait_clk(120000);
    host0.parse(na, nu, echoes, recs);
    host1.parse(na, nu, echoes, recs1);
    host0.parse(na, nu, echoes, recs);
    check(nu == 0, "no unknown bytes on the host link");
    mech[0] = echoes.size();
    check(echoes.size() == cmds, $sformatf("%0d echoes for %0d commands", echoes.size(), cmds));
    if (echoes.size() > 3) check(echoes[3] == 32'h0300_0000, "echo content");
    mech[1] = na;
    foreach (recs[i]) begin
      case (recs[i].status)
        ST_TIMEOUT:     mech[6]++;
        ST_OUT_TIMEOUT: mech[7]++;
        ST_BEAM_ON:     mech[8]++;
        ST_BEAM_OFF:    mech[9]++;
        ST_ERROR: ;
        default: check(0, "unexpected status");
      endcase
    end
    begin
      int n_err0, n_err1;
      bit after_timeout;
      n_err0 = 0; n_err1 = 0; after_timeout = 0;
      foreach (recs[i]) begin
        if (recs[i].status == ST_TIMEOUT) after_timeout = 1;
        if (recs[i].status == ST_ERROR && !after_timeout) begin
          n_err0++;
          check(recs[i].counter_num == 5, "error record names counter 5");
          check(8'(recs[i].data_n - recs[i].data_n1 - 1) inside {8'd4, 8'd252}, "error record data");
          check(recs[i].data_n1 == 16'(8'(recs[i].data_n2 + 1)), "error record history");
        end
      end
      foreach (recs1[i]) if (recs1[i].status == ST_ERROR) n_err1++;
      check(n_err0 == 1 && n_err1 == 0, $sformatf("error records: plain %0d, DTMR %0d", n_err0, n_err1));
    end
    // tester soft reset clears the error count and stops testing
    host0.send_cmd(8'h01, 0, 0, 0);
    check(running == 2'b00 && errc == '{16'd0, 16'd0}, "soft reset");

    foreach (mech[i]) begin
      $display("mechanism %-15s happened %0d times", MECH[i], mech[i]);
      check(mech[i] > 0, {"mechanism ", MECH[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
