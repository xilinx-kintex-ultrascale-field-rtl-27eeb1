// Full-size run of the test system with every parameter at its default: 200 counters of
// 8 bits, 115200-baud host link at 100 MHz (868 clocks per bit), 16-deep record buffer.
// One complete operation: scrubber reset, counter reset, start testing, start scrubbing a
// 64-word file; one counter upset (bit 6 of counter 150) is planted in the DUT and must come
// back to the host as exactly one error record naming counter 150 with its old and new value;
// the scrubber must write the golden words in order; every command must be echoed.
module tb_ku_see_top_full;
  import ku_pkg::*;
  localparam int CPB = 868, AW = 22, NW = 64;
  logic clk = 1'b0, rst = 1'b0, beam_on = 1'b0;
  logic rxd, txd;
  logic [AW-1:0] sram_addr;
  logic sram_oe, smap_csi_b, smap_rdwr_b, smap_cclk, dut_clk, dut_rst, dut_shift_clk;
  logic running, in_timeout;
  logic [31:0] sram_rdata, smap_d, scrub_passes;
  logic [7:0] dut_counter;
  logic [2:0] dut_domain_err;
  logic [15:0] error_count, records_dropped;
  int checks = 0, failures = 0;
  int smap_words = 0, smap_bad = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;

  host_model #(.CPB(CPB)) host (.clk, .txd, .rxd);
  sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr), .oe(sram_oe), .rdata(sram_rdata));

  ku_see_top dut (
    .clk, .rst, .rxd, .txd, .beam_on, .scrub_words(AW'(NW)), .sram_addr, .sram_oe, .sram_rdata,
    .smap_csi_b, .smap_rdwr_b, .smap_cclk, .smap_d, .dut_clk, .dut_rst, .dut_counter,
    .dut_shift_clk, .dut_domain_err, .running, .error_count, .in_timeout, .records_dropped,
    .scrub_passes
  );

  function automatic logic [31:0] golden(input int a);
    return {16'(a) ^ 16'hC35A, ~16'(a) ^ 16'h0F0F};
  endfunction

  always @(posedge smap_cclk)
    if (!smap_csi_b) begin
      if (smap_d != golden(smap_words % NW)) smap_bad++;
      smap_words++;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nu, n_err;
    logic [31:0] echoes [$];
    err_record_t recs [$];
    logic [7:0] old_v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    host.send_cmd(8'h99, 0, 0, 0);
    host.send_cmd(8'h03, 0, 0, 0);
    host.send_cmd(8'h02, 0, 0, 0);
    host.send_cmd(8'h06, 0, 0, 0);
    check(running && !smap_csi_b, "testing and scrubbing");
    repeat (3 * 800) @(negedge clk);
    check(error_count == 0, "no errors before the upset");
    @(negedge clk);
    old_v = dut.u_dut.g_none.u_ca.q[150*8 +: 8];
    dut.u_dut.g_none.u_ca.q[150*8 + 6] = ~dut.u_dut.g_none.u_ca.q[150*8 + 6];
    repeat (4 * 800) @(negedge clk);
    check(error_count == 1, $sformatf("one error counted (%0d)", error_count));
    repeat (70 * 10 * CPB) @(negedge clk);
    host.parse(na, nu, echoes, recs);
    $display("host bytes %0d unknown %0d bad frames %0d", host.bytes.size(), nu, host.bad_frames);
    check(echoes.size() == 4 && echoes[1] == 32'h0300_0000, $sformatf("%0d echoes", echoes.size()));
    n_err = 0;
    foreach (recs[i])
      if (recs[i].status == ST_ERROR) begin
        n_err++;
        check(recs[i].counter_num == 150, "record names counter 150");
        check(8'(recs[i].data_n - recs[i].data_n1 - 1) inside {8'h40, 8'hC0},
              "record data shows the flipped bit against the neighbour");
        check(recs[i].error_count == 1, "record error count");
      end
    check(n_err == 1 && recs.size() == 1, $sformatf("one record (%0d)", recs.size()));
    check(smap_bad == 0 && smap_words > 10 * NW, $sformatf("scrub words %0d, wrong %0d", smap_words, smap_bad));
    check(!in_timeout && records_dropped == 0, "no timeout, nothing dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
