// Self-checking test of the tester (lcdt) alone, at reduced sizes (10 counters, 16 clocks per
// RS232 bit). The testbench plays the DUT from its pins: on each DUT clock it advances its own
// model of the counter array's output (value n + 40k for counter n in snapshot k, a new value
// and a shift-clock rise every 4 DUT clocks) and restarts it while the DUT reset is high.
// Checked: the DUT reset pulse is 16 DUT clocks long at divide 0 and divide 2; the DUT clock is
// divided by 4 after "A0 02 00"; a planted bad value for counter 3 produces exactly one error
// record with the right counter number and data on the host link; echoes arrive for every
// command; a beam pulse gives status records 6 then 4 in order.
module tb_lcdt;
  import ku_pkg::*;
  localparam int N = 10, CW = 8, CPB = 16, AW = 22;
  logic clk = 1'b0, rst = 1'b0, beam_on = 1'b0;
  logic rxd, txd, dut_clk, dut_rst, dut_shift_clk = 1'b0;
  logic [CW-1:0] dut_counter = '0;
  logic [AW-1:0] sram_addr;
  logic sram_oe, smap_csi_b, smap_rdwr_b, smap_cclk, running, in_timeout;
  logic [31:0] sram_rdata, smap_d, scrub_passes;
  logic [15:0] error_count, records_dropped;
  int checks = 0, failures = 0;
  bit plant = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  host_model #(.CPB(CPB)) host (.clk, .txd, .rxd);
  sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  lcdt #(.NCNT(N), .CLKS_PER_BIT(CPB), .ALIVE_CYCLES(1_000_000), .GAP_CYCLES(2000)) dut (
    .clk, .rst, .rxd, .txd, .beam_on, .dut_clk, .dut_rst, .dut_counter, .dut_shift_clk,
    .scrub_words(AW'(16)), .sram_addr, .sram_oe, .sram_rdata, .smap_csi_b, .smap_rdwr_b,
    .smap_cclk, .smap_d, .running, .error_count, .in_timeout, .records_dropped, .scrub_passes
  );

  // DUT pin model
  int t = 0;
  always @(posedge dut_clk or posedge dut_rst)
    if (dut_rst) begin
      t <= 0; dut_shift_clk <= 1'b0; dut_counter <= '0;
    end else begin
      int k, pos;
      k   = t / (4 * N);
      pos = (t % (4 * N)) / 4;
      dut_counter   <= CW'(pos + 4 * N * k) ^ ((plant && k >= 3 && pos == 3) ? 8'h80 : 8'h00);
      dut_shift_clk <= (t % 4) < 2;
      t <= t + 1;
    end

  // DUT reset length in DUT clocks
  int rst_len = 0, last_rst_len = 0;
  always @(posedge dut_clk) if (dut_rst) rst_len++;
  always @(negedge dut_rst) begin last_rst_len = rst_len; rst_len = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nu, n_err;
    logic [31:0] echoes [$];
    err_record_t recs [$];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    host.send_cmd(8'h03, 0, 0, 0);
    check(last_rst_len == 16, $sformatf("DUT reset 16 DUT clocks (%0d)", last_rst_len));
    host.send_cmd(8'h02, 0, 0, 0);
    check(running, "running after 02");
    repeat (8 * 4 * N) @(negedge clk);
    check(error_count == 0, "no errors on clean data");
    host.send_cmd(8'hA0, 8'd2, 0, 0);
    host.send_cmd(8'h04, 0, 0, 0);
    check(last_rst_len == 16, $sformatf("DUT reset 16 DUT clocks at divide 4 (%0d)", last_rst_len));
    begin
      realtime t0, t1;
      @(posedge dut_clk) t0 = $realtime;
      @(posedge dut_clk) t1 = $realtime;
      check(t1 - t0 == 40.0, "DUT clock divided by 4");
    end
    plant = 1;
    repeat (6 * 4 * 4 * N) @(negedge clk);
    check(error_count == 1, $sformatf("one error counted (%0d)", error_count));
    check(!in_timeout, "no timeout at divided clock");
    beam_on = 1'b1; repeat (100) @(negedge clk);
    beam_on = 1'b0; repeat (100) @(negedge clk);
    repeat (5 * 27 * 10 * CPB) @(negedge clk);
    host.parse(na, nu, echoes, recs);
    check(echoes.size() == 4 && echoes[2] == 32'hA002_0000, "echoes");
    n_err = 0;
    foreach (recs[i])
      if (recs[i].status == ST_ERROR) begin
        n_err++;
        check(recs[i].counter_num == 3 && recs[i].data_n == 16'(8'(3 + 4 * N * 3) ^ 8'h80),
              "error record contents");
        check(recs[i].data_n1 == 16'(8'(2 + 4 * N * 3)), "previous value in record");
      end
    check(n_err == 1, $sformatf("one error record (%0d)", n_err));
    check(recs.size() == 3 && recs[1].status == ST_BEAM_ON && recs[2].status == ST_BEAM_OFF
          && recs[2].timestamp > recs[1].timestamp, "beam records in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
