// Counter array with block TMR (BTMR): three complete, independent counter arrays run side
// by side and only their outputs are voted. An upset inside one copy is masked at the pins but
// never corrected inside that copy; domain_err shows which copy disagrees with the vote, so
// the first domain failure can be told apart from the first system failure.
// Same interface, timing and reset values as counter_array plus domain_err (combinational
// from the registered copy outputs). Structure follows the report's description of BTMR;
// the domain_err output is this design's addition for observing domain failures.
module counter_array_btmr #(
  parameter int unsigned NCNT  = 200,
  parameter int unsigned CW    = 8,
  parameter int unsigned SHIFT = 4
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] counter_out,
  output logic          shift_clk,
  output logic [2:0]    domain_err
);
  logic [CW-1:0] top [3];
  logic [2:0]    sclk;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    counter_array #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_copy (
      .clk(clk), .rst(rst), .counter_out(top[i]), .shift_clk(sclk[i])
    );
  end

  tmr_vote #(.W(CW)) u_out_vote (.a(top[0]), .b(top[1]), .c(top[2]), .y(counter_out));
  tmr_vote #(.W(1))  u_clk_vote (.a(sclk[0]), .b(sclk[1]), .c(sclk[2]), .y(shift_clk));

  always_comb
    for (int i = 0; i < 3; i++)
      domain_err[i] = (top[i] != counter_out) || (sclk[i] != shift_clk);

endmodule
