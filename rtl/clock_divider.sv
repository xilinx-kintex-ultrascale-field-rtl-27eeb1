// DUT clock generator. With div = 0 the tester clock passes straight through (no division,
// the default); with div = D > 0 an internal flip-flop toggles every D tester cycles, giving
// clk_in / (2*D). `period_x4` returns the tester cycles per DUT shift-clock period
// (4 DUT clocks), used by the shift-clock watchdog.
// The 16-bit divide value from command A0 ({D1, D0}) and the pass-through default follow the
// report; the divide-by-2D rule is this design's reading of "clock frequency divider".
module clock_divider (
  input  logic        clk_in,
  input  logic        rst,
  input  logic [15:0] div,
  output logic        clk_out,
  output logic [23:0] period_x4
);
  logic [15:0] cnt;
  logic        tog;

  always_ff @(posedge clk_in or posedge rst)
    if (rst) begin
      cnt <= '0;
      tog <= 1'b0;
    end else if (div == '0) begin
      cnt <= '0;
    end else if (cnt >= div - 16'd1) begin
      cnt <= '0;
      tog <= ~tog;
    end else begin
      cnt <= cnt + 16'd1;
    end

  assign clk_out   = (div == '0) ? clk_in : tog;
  assign period_x4 = (div == '0) ? 24'd4 : {5'd0, div, 3'd0};
endmodule
