// RS232 receiver, 8 data bits, no parity, one stop bit, LSB first. The input is synchronised
// by two flip-flops; a falling edge starts a frame, each bit is sampled in its middle, and a
// byte with a valid (high) stop bit is delivered as a one-cycle `valid` pulse about half a bit
// after the stop bit's middle. Frames with a low stop bit are discarded, and the receiver then
// waits for the line to return high before looking for the next start bit.
// Frame format and the CLKS_PER_BIT default (115200 baud at 100 MHz) are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [2:0] {IDLE, START, BITS, STOP, WAIT_HIGH} state_e;
  state_e      st;
  logic        r1, r2;
  logic [15:0] tick;
  logic [2:0]  idx;
  logic [7:0]  sh;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      {r1, r2} <= 2'b11;
      st    <= IDLE;
      tick  <= '0;
      idx   <= '0;
      sh    <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      {r1, r2} <= {rxd, r1};
      valid    <= 1'b0;
      case (st)
        IDLE: if (!r2) begin st <= START; tick <= '0; end
        START:
          if (tick == 16'(CLKS_PER_BIT / 2 - 1)) begin
            tick <= '0;
            if (!r2) begin st <= BITS; idx <= '0; end
            else           st <= IDLE;
          end else tick <= tick + 1'b1;
        BITS:
          if (tick == 16'(CLKS_PER_BIT - 1)) begin
            tick <= '0;
            sh   <= {r2, sh[7:1]};
            if (idx == 3'd7) st <= STOP;
            idx <= idx + 1'b1;
          end else tick <= tick + 1'b1;
        STOP:
          if (tick == 16'(CLKS_PER_BIT - 1)) begin
            tick <= '0;
            st   <= IDLE;
            if (r2) begin valid <= 1'b1; data <= sh; end
            else    st <= WAIT_HIGH;  // framing error: wait for the idle level
          end else tick <= tick + 1'b1;
        WAIT_HIGH: if (r2) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
endmodule
