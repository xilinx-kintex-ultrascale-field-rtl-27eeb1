// Low cost digital tester (LCDT) for the counter-array DUT: everything on the tester side.
//
//  host RS232 in -> uart_rx -> cmd_decoder -> test controls, DUT clock divider, scrubber
//  DUT pins      -> shift_clk_detect + counter_checker  -> error records
//                -> shift_clk_monitor (timeout / recovery) -> status records
//  beam signal   -> beam_sync (beam on / off)          -> status records
//  records -> record_fifo -> msg_tx -> uart_tx -> host RS232 out (alive, echo, record)
//  SRAM -> blind_scrubber -> DUT SelectMAP
//
// The DUT gets its clock from clock_divider and a reset pulse from this block: at hardware
// reset, on command 01 (tester soft reset), 03 and 04. The pulse lasts RST_LEN DUT clocks.
// Testing (comparing and reporting) runs after command 02 or 04 until reset. A 32-bit time
// stamp counts tester cycles since the last tester reset and goes into every record.
// All logic runs on `clk` (100 MHz in the report); DUT outputs are synchronised on entry.
// The block split follows the report's tester description; the reset pulse length, the
// record arbitration (data errors first, then shift-clock, then beam events) and which parts
// a soft reset clears (not the host link and not the scrubber) are this design's choices.
module lcdt
  import ku_pkg::*;
#(
  parameter int unsigned NCNT         = 200,
  parameter int unsigned CW           = 8,
  parameter int unsigned SHIFT        = 4,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned ALIVE_CYCLES = 100_000_000,
  parameter int unsigned GAP_CYCLES   = 1_000_000,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned SRAM_AW      = 22,
  parameter int unsigned RST_LEN      = 16
) (
  input  logic               clk,
  input  logic               rst,
  // host link
  input  logic               rxd,
  output logic               txd,
  // accelerator
  input  logic               beam_on,
  // DUT functional pins
  output logic               dut_clk,
  output logic               dut_rst,
  input  logic [CW-1:0]      dut_counter,
  input  logic               dut_shift_clk,
  // scrub-file SRAM
  input  logic [SRAM_AW-1:0] scrub_words,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe,
  input  logic [31:0]        sram_rdata,
  // DUT SelectMAP
  output logic               smap_csi_b,
  output logic               smap_rdwr_b,
  output logic               smap_cclk,
  output logic [31:0]        smap_d,
  // status
  output logic               running,
  output logic [15:0]        error_count,
  output logic               in_timeout,
  output logic [15:0]        records_dropped,
  output logic [31:0]        scrub_passes
);
  // ---- host commands ----
  logic        rx_valid;
  logic [7:0]  rx_data;
  logic        echo_valid;
  logic [31:0] echo_word;
  logic        c_soft, c_creset, c_start, c_sreset, c_sstart, c_sstop, c_inject, c_flip_all;
  logic [15:0] c_div;
  logic [23:0] c_inj_start, c_inj_end;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd, .valid(rx_valid), .data(rx_data)
  );

  cmd_decoder #(.GAP_CYCLES(GAP_CYCLES)) u_cmd (
    .clk, .rst, .byte_valid(rx_valid), .byte_data(rx_data),
    .echo_valid, .echo_word,
    .soft_reset(c_soft), .counter_reset(c_creset), .start_test(c_start),
    .scrub_reset(c_sreset), .scrub_start(c_sstart), .scrub_stop(c_sstop), .inject(c_inject),
    .clk_div(c_div), .inj_start(c_inj_start), .inj_end(c_inj_end), .flip_all(c_flip_all)
  );

  // ---- tester reset (hardware or command 01), registered ----
  logic trst;
  always_ff @(posedge clk or posedge rst)
    if (rst) trst <= 1'b1;
    else     trst <= c_soft;

  // ---- time stamp ----
  logic [31:0] timestamp;
  always_ff @(posedge clk or posedge trst)
    if (trst) timestamp <= '0;
    else      timestamp <= timestamp + 1;

  // ---- DUT clock and reset ----
  logic [23:0] period;
  logic [31:0] rst_cnt;
  logic [31:0] rst_len;

  clock_divider u_div (
    .clk_in(clk), .rst, .div(c_div), .clk_out(dut_clk), .period_x4(period)
  );

  // RST_LEN DUT clocks, counted in tester clocks.
  assign rst_len = 32'(RST_LEN) * ((c_div == '0) ? 32'd1 : {15'd0, c_div, 1'b0});

  always_ff @(posedge clk or posedge trst)
    if (trst) begin
      rst_cnt <= 32'(RST_LEN);
      running <= 1'b0;
    end else begin
      if (c_creset)             rst_cnt <= rst_len;
      else if (rst_cnt != '0)   rst_cnt <= rst_cnt - 1;
      if (c_start) running <= 1'b1;
    end

  assign dut_rst = (rst_cnt != '0);

  // ---- DUT output processing ----
  logic        sc_edge, sc_level;
  logic        chk_valid;
  err_record_t chk_rec;
  logic [31:0] checked;

  shift_clk_detect u_sdet (
    .clk, .rst(trst), .shift_clk(dut_shift_clk), .sync_o(sc_level), .edge_o(sc_edge)
  );

  counter_checker #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_chk (
    .clk, .rst(trst), .dut_rst, .run(running), .data_in(dut_counter), .edge_i(sc_edge),
    .timestamp, .rec_valid(chk_valid), .rec(chk_rec), .error_count, .checked
  );

  logic    mon_valid;
  status_e mon_status;
  shift_clk_monitor #(.PW(24)) u_mon (
    .clk, .rst(trst), .hold(dut_rst || !running), .edge_i(sc_edge), .period,
    .evt_valid(mon_valid), .evt_status(mon_status), .in_timeout
  );

  logic    beam_valid, beam_level;
  status_e beam_status;
  beam_sync u_beam (
    .clk, .rst(trst), .beam_on, .beam_level,
    .evt_valid(beam_valid), .evt_status(beam_status)
  );

  // ---- record arbitration ----
  err_record_t mon_rec, beam_rec, wr_rec;
  logic        mon_pend, beam_pend, wr_en;

  always_ff @(posedge clk or posedge trst)
    if (trst) begin
      mon_pend <= 1'b0; beam_pend <= 1'b0; mon_rec <= '0; beam_rec <= '0;
    end else begin
      if (mon_valid) begin
        mon_pend              <= 1'b1;
        mon_rec               <= '0;
        mon_rec.status        <= mon_status;
        mon_rec.timestamp     <= timestamp;
        mon_rec.error_count   <= error_count;
      end else if (!chk_valid && mon_pend) begin
        mon_pend <= 1'b0;
      end
      if (beam_valid) begin
        beam_pend             <= 1'b1;
        beam_rec              <= '0;
        beam_rec.status       <= beam_status;
        beam_rec.timestamp    <= timestamp;
        beam_rec.error_count  <= error_count;
      end else if (!chk_valid && !mon_pend && beam_pend) begin
        beam_pend <= 1'b0;
      end
    end

  always_comb begin
    wr_en  = chk_valid || mon_pend || beam_pend;
    wr_rec = chk_valid ? chk_rec : (mon_pend ? mon_rec : beam_rec);
  end

  // ---- host messages ----
  logic                rec_pop, fifo_empty, fifo_full;
  logic [REC_BITS-1:0] fifo_head;
  logic                tx_valid, tx_ready;
  logic [7:0]          tx_data;
  logic [31:0]         sent_alive, sent_echo, sent_record;

  record_fifo #(.W(REC_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst(trst), .wr_en, .wr_data(wr_rec), .rd_en(rec_pop), .rd_data(fifo_head),
    .empty(fifo_empty), .full(fifo_full), .dropped(records_dropped)
  );

  msg_tx #(.ALIVE_CYCLES(ALIVE_CYCLES)) u_msg (
    .clk, .rst, .echo_valid, .echo_word, .rec_avail(!fifo_empty), .rec_data(fifo_head),
    .rec_pop, .tx_valid, .tx_data, .tx_ready, .sent_alive, .sent_echo, .sent_record
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd
  );

  // ---- scrubber ----
  logic        scrub_busy;
  logic [31:0] scrub_words_written;

  blind_scrubber #(.AW(SRAM_AW)) u_scrub (
    .clk, .rst, .scrub_reset(c_sreset), .start(c_sstart), .stop(c_sstop),
    .scrub_words, .inject(c_inject), .inj_start(c_inj_start), .inj_end(c_inj_end),
    .flip_all(c_flip_all),
    .sram_addr, .sram_oe, .sram_rdata,
    .smap_csi_b, .smap_rdwr_b, .smap_cclk, .smap_d,
    .busy(scrub_busy), .passes(scrub_passes), .words_written(scrub_words_written)
  );

endmodule
