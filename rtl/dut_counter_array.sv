// The DUT design: the counter array built with the mitigation scheme chosen by SCHEME
// (none, block, local or distributed TMR), the variants compared in the heavy-ion study.
// Pins as in the counter test: CLK and RESET in, COUNTER (CW bits) and COUNTER_SHIFT_CLK out.
// domain_err reports BTMR copies that disagree with the vote and is 0 for other schemes.
// The report also tested DTMR and BTMR "with partitioning"; partitioning is a placement
// constraint and changes nothing in the RTL.
module dut_counter_array
  import ku_pkg::*;
#(
  parameter tmr_scheme_e SCHEME = TMR_NONE,
  parameter int unsigned NCNT   = 200,
  parameter int unsigned CW     = 8,
  parameter int unsigned SHIFT  = 4
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] counter_out,
  output logic          shift_clk,
  output logic [2:0]    domain_err
);
  if (SCHEME == TMR_BTMR) begin : g_btmr
    counter_array_btmr #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_ca (
      .clk(clk), .rst(rst), .counter_out(counter_out), .shift_clk(shift_clk),
      .domain_err(domain_err)
    );
  end else if (SCHEME == TMR_LTMR) begin : g_ltmr
    counter_array_ltmr #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_ca (
      .clk(clk), .rst(rst), .counter_out(counter_out), .shift_clk(shift_clk)
    );
    assign domain_err = '0;
  end else if (SCHEME == TMR_DTMR) begin : g_dtmr
    counter_array_dtmr #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_ca (
      .clk(clk), .rst(rst), .counter_out(counter_out), .shift_clk(shift_clk)
    );
    assign domain_err = '0;
  end else begin : g_none
    counter_array #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_ca (
      .clk(clk), .rst(rst), .counter_out(counter_out), .shift_clk(shift_clk)
    );
    assign domain_err = '0;
  end
endmodule
