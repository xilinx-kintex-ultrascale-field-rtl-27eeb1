// Counter array with distributed TMR (DTMR): the whole design is triplicated, only the clock
// and reset stay single. Each domain has its own state register, its own voter placed after
// the flip-flops (voting all three domains' state, which is the voter feedback that corrects
// an upset flip-flop on the next edge) and its own next-state logic. The three domains'
// outputs are voted once more at the pins.
// Same interface, timing and reset values as counter_array; the structure follows the
// report's description of DTMR. GTMR would differ only by a clock tree per domain.
module counter_array_dtmr #(
  parameter int unsigned NCNT  = 200,
  parameter int unsigned CW    = 8,
  parameter int unsigned SHIFT = 4
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] counter_out,
  output logic          shift_clk
);
  localparam int unsigned CYC_W = $clog2(SHIFT * NCNT);
  localparam int unsigned SW    = 2 * NCNT * CW + CYC_W + 1;
  `include "counter_array_init.svh"
  localparam logic [SW-1:0] INIT = counter_array_init_state();

  logic [SW-1:0] q [3];
  logic [SW-1:0] v [3];
  logic [SW-1:0] d [3];
  logic [CW-1:0] top [3];
  logic [2:0]    sclk;

  for (genvar i = 0; i < 3; i++) begin : g_dom
    tmr_vote #(.W(SW)) u_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(v[i]));

    counter_array_next #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_next (
      .q(v[i]), .d(d[i]), .top(top[i]), .sclk(sclk[i])
    );

    always_ff @(posedge clk or posedge rst)
      if (rst) q[i] <= INIT;
      else     q[i] <= d[i];
  end

  tmr_vote #(.W(CW)) u_out_vote (.a(top[0]), .b(top[1]), .c(top[2]), .y(counter_out));
  tmr_vote #(.W(1))  u_clk_vote (.a(sclk[0]), .b(sclk[1]), .c(sclk[2]), .y(shift_clk));

endmodule
