// Self-checking test of blind_scrubber with a 20-word scrub file. Every word written on the
// SelectMAP port (captured at the rising CCLK edge) must be the golden word of its address,
// in order, looping forever, one word every 4 clocks. Then: flip-all injection over 16-bit
// words 4..7 must invert 32-bit words 2 and 3 in exactly one pass; single-bit injection at
// 16-bit word 9 must flip bit 0, then bit 1, then bit 2 of it (bits 15:0 of 32-bit word 4) in
// one pass each; stop must end the writes with CSI_B high.
module tb_blind_scrubber;
  localparam int AW = 22, NW = 20;
  logic clk = 1'b0, rst = 1'b0;
  logic scrub_reset = 0, start = 0, stop = 0, inject = 0, flip_all = 0;
  logic [23:0] inj_start = '0, inj_end = '0;
  logic [AW-1:0] sram_addr;
  logic sram_oe, smap_csi_b, smap_rdwr_b, smap_cclk, busy;
  logic [31:0] sram_rdata, smap_d, passes, words_written;
  int checks = 0, failures = 0;
  int nwords = 0;             // words captured since the last clear
  int bad_words = 0;          // words differing from golden in the current pass
  logic [31:0] diff [NW];     // xor against golden, current pass
  realtime last_rise = 0;
  int rate_bad = 0;
  logic [31:0] pass_diffs [$][NW];

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  blind_scrubber #(.AW(AW)) dut (
    .clk, .rst, .scrub_reset, .start, .stop, .scrub_words(AW'(NW)), .inject, .inj_start,
    .inj_end, .flip_all, .sram_addr, .sram_oe, .sram_rdata, .smap_csi_b, .smap_rdwr_b,
    .smap_cclk, .smap_d, .busy, .passes, .words_written
  );

  function automatic logic [31:0] golden(input int a);
    return {16'(a) ^ 16'hC35A, ~16'(a) ^ 16'h0F0F};
  endfunction

  always @(posedge smap_cclk)
    if (!smap_csi_b && !smap_rdwr_b) begin
      int a;
      a = nwords % NW;
      diff[a] = smap_d ^ golden(a);
      if (nwords > 0 && $realtime - last_rise != 40.0) rate_bad++;
      last_rise = $realtime;
      nwords++;
      if (a == NW - 1) pass_diffs.push_back(diff);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  // Count passes whose difference pattern matches `exp`, and passes that are not golden.
  task automatic tally(input logic [31:0] exp [NW], output int n_match, output int n_bad);
    n_match = 0; n_bad = 0;
    foreach (pass_diffs[p]) begin
      bit golden_pass, match;
      golden_pass = 1; match = 1;
      for (int a = 0; a < NW; a++) begin
        if (pass_diffs[p][a] != 0) golden_pass = 0;
        if (pass_diffs[p][a] != exp[a]) match = 0;
      end
      if (match) n_match++;
      if (!golden_pass) n_bad++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp [NW];
    int m, b;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    pulse(scrub_reset);
    pulse(start);
    repeat (4 * NW * 3 + 20) @(negedge clk);
    check(busy && !smap_csi_b, "scrubbing");
    check(pass_diffs.size() == 3, $sformatf("three passes, got %0d", pass_diffs.size()));
    foreach (exp[a]) exp[a] = '0;
    tally(exp, m, b);
    check(b == 0, "golden data in order");
    check(rate_bad == 0, "one word every 4 clocks");
    check(passes >= 3, "pass counter");

    // flip-all injection over 16-bit words 4..7 = 32-bit words 2 and 3
    pass_diffs.delete();
    inj_start = 24'd4; inj_end = 24'd7; flip_all = 1'b1;
    repeat (3) @(negedge clk);
    pulse(inject);
    repeat (4 * NW * 4) @(negedge clk);
    foreach (exp[a]) exp[a] = (a == 2 || a == 3) ? '1 : '0;
    tally(exp, m, b);
    check(m == 1 && b == 1, $sformatf("one flip-all pass (%0d matching, %0d not golden)", m, b));

    // single-bit injection at 16-bit word 9 = bits 15:0 of 32-bit word 4
    flip_all = 1'b0; inj_start = 24'd9; inj_end = 24'd9;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      pass_diffs.delete();
      pulse(inject);
      repeat (4 * NW * 3) @(negedge clk);
      foreach (exp[a]) exp[a] = (a == 4) ? (32'h1 << k) : '0;
      tally(exp, m, b);
      check(m == 1 && b == 1, $sformatf("single bit %0d injected once (%0d, %0d)", k, m, b));
    end

    // stop
    pulse(stop);
    repeat (8) @(negedge clk);
    m = nwords;
    repeat (100) @(negedge clk);
    check(nwords == m && smap_csi_b && !busy, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
