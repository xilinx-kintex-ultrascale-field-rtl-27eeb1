// Heart-beat watchdog on the DUT shift clock. It counts tester cycles since the last detected
// shift-clock edge. When the gap exceeds twice the expected period (`period` cycles, set from
// the DUT clock divider) it emits one "timeout" event; the next edge after that emits one
// "out of timeout" event. `hold` (DUT in reset, or test stopped) clears the count and any
// timeout state without events.
// Events are one-cycle pulses on evt_valid with the 3-bit status code of the report's error
// record (001 timeout, 011 out of timeout). The threshold of two periods is a choice.
module shift_clk_monitor
  import ku_pkg::*;
#(
  parameter int unsigned PW = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hold,
  input  logic             edge_i,
  input  logic [PW-1:0] period,     // expected tester cycles between edges
  output logic             evt_valid,
  output status_e          evt_status,
  output logic             in_timeout
);
  logic [PW:0] gap;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      gap        <= '0;
      in_timeout <= 1'b0;
      evt_valid  <= 1'b0;
      evt_status <= ST_TIMEOUT;
    end else begin
      evt_valid <= 1'b0;
      if (hold) begin
        gap        <= '0;
        in_timeout <= 1'b0;
      end else if (edge_i) begin
        gap <= '0;
        if (in_timeout) begin
          in_timeout <= 1'b0;
          evt_valid  <= 1'b1;
          evt_status <= ST_OUT_TIMEOUT;
        end
      end else begin
        if (gap != '1) gap <= gap + 1'b1;
        if (!in_timeout && gap > {period, 1'b0}) begin
          in_timeout <= 1'b1;
          evt_valid  <= 1'b1;
          evt_status <= ST_TIMEOUT;
        end
      end
    end
endmodule
