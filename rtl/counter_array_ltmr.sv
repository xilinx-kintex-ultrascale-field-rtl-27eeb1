// Counter array with local TMR (LTMR): only the flip-flops are triplicated. The three
// copies of the state are voted bit by bit, the single copy of the next-state logic works on
// the voted state, and its result is written back into all three copies. The voters therefore
// sit in front of the flip-flops' shared logic, and an upset in one copy is out-voted and
// overwritten on the next clock edge. The outputs are taken from the voted state.
// Same interface, timing and reset values as counter_array; the structure follows the
// report's description of LTMR.
module counter_array_ltmr #(
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
  logic [SW-1:0] v, d;

  tmr_vote #(.W(SW)) u_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(v));

  counter_array_next #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_next (
    .q(v), .d(d), .top(counter_out), .sclk(shift_clk)
  );

  for (genvar i = 0; i < 3; i++) begin : g_dom
    always_ff @(posedge clk or posedge rst)
      if (rst) q[i] <= INIT;
      else     q[i] <= d;
  end

endmodule
