// Host command decoder. Commands from the host are 4 bytes with no header: command number,
// D0, D1, D2. Bytes are assembled in arrival order; if more than GAP_CYCLES pass between two
// bytes, a partial command is discarded so that the decoder realigns. Each complete command
// is echoed (echo_valid with the 32-bit word) and decoded:
//   01 tester soft reset            03 counter (DUT) reset
//   02 start counter testing        04 counter reset, then start testing
//   A0 DUT clock divider = {D1,D0}  99 reset scrubber control
//   06 start scrubbing              26 stop scrubbing
//   0E inject errors                79 / 7A injection start / end address = {D2,D1,D0}
//   7E flip-every-bit mode = D0[0]
// Unknown commands are echoed only. Pulses last one cycle; settings hold until changed.
// Command numbers and their meaning follow the report; byte order of multi-byte values,
// the realignment gap and the enable bit of 7E are this design's choices.
module cmd_decoder
  import ku_pkg::*;
#(
  parameter int unsigned GAP_CYCLES = 1_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  output logic        echo_valid,
  output logic [31:0] echo_word,
  output logic        soft_reset,
  output logic        counter_reset,
  output logic        start_test,
  output logic        scrub_reset,
  output logic        scrub_start,
  output logic        scrub_stop,
  output logic        inject,
  output logic [15:0] clk_div,
  output logic [23:0] inj_start,
  output logic [23:0] inj_end,
  output logic        flip_all
);
  logic [1:0]  nb;
  logic [23:0] word;  // bytes received so far (command, D0, D1)
  logic [31:0] gap;

  logic [31:0] cmd;   // complete command: {command, D0, D1, D2}
  logic        cmd_valid;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      nb <= '0; word <= '0; gap <= '0;
      cmd <= '0; cmd_valid <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      if (byte_valid) begin
        gap <= '0;
        if (nb == 2'd3) begin
          cmd       <= {word, byte_data};
          cmd_valid <= 1'b1;
          nb        <= '0;
        end else begin
          word <= {word[15:0], byte_data};
          nb   <= nb + 1'b1;
        end
      end else if (nb != '0) begin
        if (gap >= GAP_CYCLES) begin
          nb  <= '0;
          gap <= '0;
        end else gap <= gap + 1;
      end
    end

  logic [7:0] op, d0, d1, d2;
  assign {op, d0, d1, d2} = cmd;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      echo_valid <= 1'b0; echo_word <= '0;
      soft_reset <= 1'b0; counter_reset <= 1'b0; start_test <= 1'b0;
      scrub_reset <= 1'b0; scrub_start <= 1'b0; scrub_stop <= 1'b0; inject <= 1'b0;
      clk_div <= '0; inj_start <= '0; inj_end <= '0; flip_all <= 1'b0;
    end else begin
      echo_valid    <= cmd_valid;
      echo_word     <= cmd;
      soft_reset    <= 1'b0;
      counter_reset <= 1'b0;
      start_test    <= 1'b0;
      scrub_reset   <= 1'b0;
      scrub_start   <= 1'b0;
      scrub_stop    <= 1'b0;
      inject        <= 1'b0;
      if (cmd_valid)
        case (op)
          CMD_RESET_LCDT:    soft_reset    <= 1'b1;
          CMD_START_TEST:    start_test    <= 1'b1;
          CMD_RESET_COUNTER: counter_reset <= 1'b1;
          CMD_RESET_START:   begin counter_reset <= 1'b1; start_test <= 1'b1; end
          CMD_CLK_DIV:       clk_div   <= {d1, d0};
          CMD_SCRUB_RESET:   scrub_reset <= 1'b1;
          CMD_START_SCRUB:   scrub_start <= 1'b1;
          CMD_STOP_SCRUB:    scrub_stop  <= 1'b1;
          CMD_INJECT:        inject      <= 1'b1;
          CMD_INJ_START:     inj_start <= {d2, d1, d0};
          CMD_INJ_END:       inj_end   <= {d2, d1, d0};
          CMD_INJ_FLIP_ALL:  flip_all  <= d0[0];
          default: ;
        endcase
    end
endmodule
