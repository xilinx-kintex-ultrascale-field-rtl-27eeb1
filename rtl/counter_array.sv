// Counter array without mitigation: the design under analysis of the counter test.
//
// NCNT counters of CW bits count up every CLK cycle. Once every SHIFT*NCNT cycles all of them
// are copied at once into a bank of NCNT snapshot registers, which then shifts up one place
// every SHIFT cycles, so that every counter value passes through entry 0, the only one wired
// to the pins (COUNTER). This replaces a wide multiplexer with a shift register.
// SHIFT_CLK runs at 1/SHIFT of CLK and rises in the cycle a new value appears on COUNTER.
// After reset, counter n starts at n and the first snapshot is taken on the first clock edge,
// so COUNTER shows 0, 1, 2, ... NCNT-1 and then n + SHIFT*NCNT*k (mod 2^CW) in snapshot k.
// Interface: clk, asynchronous active-high rst, counter_out and shift_clk, all registered.
// Sizes and the scheme follow the report (200 x 8 bits, shift every 4, reload every 800).
module counter_array #(
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

  logic [SW-1:0] q, d;

  counter_array_next #(.NCNT(NCNT), .CW(CW), .SHIFT(SHIFT)) u_next (
    .q(q), .d(d), .top(counter_out), .sclk(shift_clk)
  );

  always_ff @(posedge clk or posedge rst)
    if (rst) q <= INIT;
    else     q <= d;

endmodule
