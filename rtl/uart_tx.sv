// RS232 transmitter, 8 data bits, no parity, one stop bit, LSB first, idle high.
// Load a byte with `valid` while `ready` is high; the frame (start, 8 data, stop) then takes
// 10 * CLKS_PER_BIT clock cycles and `ready` returns high after the stop bit.
// The report only names the RS232 link; the frame format and the 115200 baud default
// (868 cycles of 100 MHz per bit) are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  logic [9:0]  shreg;
  logic [3:0]  nbits;
  logic [15:0] tick;

  assign ready = (nbits == '0);

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      shreg <= '1;
      nbits <= '0;
      tick  <= '0;
      txd   <= 1'b1;
    end else if (nbits == '0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        tick  <= '0;
      end
    end else begin
      txd <= shreg[0];
      if (tick == 16'(CLKS_PER_BIT - 1)) begin
        tick  <= '0;
        shreg <= {1'b1, shreg[9:1]};
        nbits <= nbits - 1'b1;
      end else begin
        tick <= tick + 1'b1;
      end
    end
endmodule
