// Counter-array single-event-upset test system: the tester (lcdt) wired to the DUT design
// (dut_counter_array) as on the test bench. The tester drives the DUT's CLK and RESET and
// reads its COUNTER and COUNTER_SHIFT_CLK pins; the DUT's configuration port (SelectMAP),
// which belongs to the FPGA silicon, the scrub-file SRAM, the RS232 host link and the beam
// signal are the top's ports. DUT pins are also brought out for a logic analyzer.
// SCHEME selects the mitigation the DUT design is built with; everything else uses the sizes
// of the report (200 counters of 8 bits, 100 MHz tester clock).
module ku_see_top
  import ku_pkg::*;
#(
  parameter tmr_scheme_e SCHEME       = TMR_NONE,
  parameter int unsigned NCNT         = 200,
  parameter int unsigned CW           = 8,
  parameter int unsigned SHIFT        = 4,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned ALIVE_CYCLES = 100_000_000,
  parameter int unsigned GAP_CYCLES   = 1_000_000,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned SRAM_AW      = 22
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rxd,
  output logic               txd,
  input  logic               beam_on,
  input  logic [SRAM_AW-1:0] scrub_words,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe,
  input  logic [31:0]        sram_rdata,
  output logic               smap_csi_b,
  output logic               smap_rdwr_b,
  output logic               smap_cclk,
  output logic [31:0]        smap_d,
  // logic-analyzer view of the DUT pins
  output logic               dut_clk,
  output logic               dut_rst,
  output logic [CW-1:0]      dut_counter,
  output logic               dut_shift_clk,
  output logic [2:0]         dut_domain_err,
  // tester status
  output logic               running,
  output logic [15:0]        error_count,
  output logic               in_timeout,
  output logic [15:0]        records_dropped,
  output logic [31:0]        scrub_passes
);
  lcdt #(
    .NCNT(NCNT), .CW(CW), .SHIFT(SHIFT), .CLKS_PER_BIT(CLKS_PER_BIT),
    .ALIVE_CYCLES(ALIVE_CYCLES), .GAP_CYCLES(GAP_CYCLES), .FIFO_DEPTH(FIFO_DEPTH),
    .SRAM_AW(SRAM_AW)
  ) u_lcdt (
    .clk, .rst, .rxd, .txd, .beam_on,
    .dut_clk, .dut_rst, .dut_counter, .dut_shift_clk,
    .scrub_words, .sram_addr, .sram_oe, .sram_rdata,
    .smap_csi_b, .smap_rdwr_b, .smap_cclk, .smap_d,
    .running, .error_count, .in_timeout, .records_dropped, .scrub_passes
  );

  dut_counter_array #(.SCHEME(SCHEME), .NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_dut (
    .clk(dut_clk), .rst(dut_rst), .counter_out(dut_counter), .shift_clk(dut_shift_clk),
    .domain_err(dut_domain_err)
  );
endmodule
