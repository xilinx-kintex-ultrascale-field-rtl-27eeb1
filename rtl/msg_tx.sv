// Message framer for the tester-to-host RS232 link. Every message starts with a 4-byte
// header, sent most significant byte first:
//   00 FA F3 20  alive      - nothing follows; sent every ALIVE_CYCLES when the link is idle
//   00 FA F3 22  echo       - the 4 command bytes received from the host follow
//   00 FA F3 21  record     - the 23-byte record (err_record_t) follows, MSB first
// Priority when several are waiting: echo, then record, then alive. Echo words wait in a
// small queue of their own (ECHO_DEPTH), since the host can send commands twice as fast as
// their echoes go out. A record is popped from the record buffer (rec_pop) when its message
// starts. Bytes go to uart_tx through a
// valid/ready pair. Headers and lengths follow the report; the priority and the alive period
// (1 s at 100 MHz) are this design's choices.
module msg_tx
  import ku_pkg::*;
#(
  parameter int unsigned ALIVE_CYCLES = 100_000_000,
  parameter int unsigned ECHO_DEPTH   = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          echo_valid,   // pulse: a command was received
  input  logic [31:0]   echo_word,
  input  logic          rec_avail,    // record buffer not empty
  input  logic [REC_BITS-1:0] rec_data,
  output logic          rec_pop,
  output logic          tx_valid,
  output logic [7:0]    tx_data,
  input  logic          tx_ready,
  output logic [31:0]   sent_alive,
  output logic [31:0]   sent_echo,
  output logic [31:0]   sent_record
);
  localparam int unsigned MSG_BYTES = 4 + REC_BYTES;

  logic [MSG_BYTES*8-1:0] msg;     // message, next byte in the top 8 bits
  logic [4:0]             left;    // bytes still to send
  logic                   echo_empty, echo_pop;
  logic [31:0]            echo_head;
  logic [15:0]            echo_dropped;
  logic [31:0]            alive_cnt;

  record_fifo #(.W(32), .DEPTH(ECHO_DEPTH)) u_echo_q (
    .clk, .rst, .wr_en(echo_valid), .wr_data(echo_word), .rd_en(echo_pop),
    .rd_data(echo_head), .empty(echo_empty), .full(), .dropped(echo_dropped)
  );

  assign tx_valid = (left != '0);
  assign tx_data  = msg[MSG_BYTES*8-1 -: 8];

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      msg <= '0; left <= '0;
      alive_cnt <= '0; rec_pop <= 1'b0; echo_pop <= 1'b0;
      sent_alive <= '0; sent_echo <= '0; sent_record <= '0;
    end else begin
      rec_pop  <= 1'b0;
      echo_pop <= 1'b0;
      if (alive_cnt < ALIVE_CYCLES) alive_cnt <= alive_cnt + 1;

      if (left != '0) begin
        if (tx_ready) begin
          msg  <= {msg[MSG_BYTES*8-9:0], 8'h00};
          left <= left - 1'b1;
        end
      end else if (!echo_empty && !echo_pop && !rec_pop) begin
        msg       <= {HDR_ECHO, echo_head, {(REC_BYTES-4)*8{1'b0}}};
        left      <= 5'd8;
        echo_pop  <= 1'b1;
        sent_echo <= sent_echo + 1;
      end else if (rec_avail && !rec_pop && !echo_pop) begin
        msg         <= {HDR_RECORD, rec_data};
        left        <= 5'(MSG_BYTES);
        rec_pop     <= 1'b1;
        sent_record <= sent_record + 1;
      end else if (alive_cnt >= ALIVE_CYCLES) begin
        msg        <= {HDR_ALIVE, {REC_BYTES*8{1'b0}}};
        left       <= 5'd4;
        alive_cnt  <= '0;
        sent_alive <= sent_alive + 1;
      end
    end
endmodule
