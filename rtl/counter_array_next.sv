// Next-state logic of the counter array: NCNT counters of CW bits and an NCNT-entry
// snapshot shift register, packed into one flat state vector so that the TMR variants can
// triplicate and vote the whole state without knowing its fields.
//
// State layout (LSB first): cnt[NCNT] (counter n at bits n*CW +: CW), snap[NCNT] (entry 0 is
// the one the tester sees), a cycle counter cyc in 0 .. SHIFT*NCNT-1, and the shift-clock bit.
// Every clock: every counter increments (wrapping at 2^CW). When cyc is 0 all counters are
// copied into their snapshot registers; on every other cycle that is a multiple of SHIFT the
// snapshot register shifts up one place (entry n-1 takes entry n; the bottom entry is a
// don't-care and takes 0). The shift clock is high for the first half of every SHIFT-cycle
// period, so it rises together with each new value at entry 0.
// INIT is the reset state: counter n holds n, the rest is 0.
// Follows the report: counter count, width, reset values, 4-cycle shift and the reload once
// every 4*200 = 800 cycles. The shift-clock duty cycle and the bottom fill value are choices.
module counter_array_next #(
  parameter int unsigned NCNT  = 200,
  parameter int unsigned CW    = 8,
  parameter int unsigned SHIFT = 4,
  // derived, not to be overridden
  parameter int unsigned CYC_W = $clog2(SHIFT * NCNT),
  parameter int unsigned SW    = 2 * NCNT * CW + CYC_W + 1
) (
  input  logic [SW-1:0] q,     // current state
  output logic [SW-1:0] d,     // next state
  output logic [CW-1:0] top,   // snapshot entry 0 of q (the COUNTER output)
  output logic          sclk   // shift-clock bit of q
);
  localparam int unsigned CNT_LO  = 0;
  localparam int unsigned SNAP_LO = NCNT * CW;
  localparam int unsigned CYC_LO  = 2 * NCNT * CW;
  localparam int unsigned SCLK_B  = CYC_LO + CYC_W;
  localparam int unsigned PERIOD  = SHIFT * NCNT;

  logic [CYC_W-1:0] cyc;
  logic [CYC_W-1:0] sub;  // position inside the current SHIFT-cycle period

  always_comb begin
    cyc  = q[CYC_LO +: CYC_W];
    sub  = cyc % CYC_W'(SHIFT);
    top  = q[SNAP_LO +: CW];
    sclk = q[SCLK_B];
    d    = q;
    for (int unsigned n = 0; n < NCNT; n++) begin
      d[CNT_LO + n*CW +: CW] = q[CNT_LO + n*CW +: CW] + CW'(1);
      if (cyc == '0)
        d[SNAP_LO + n*CW +: CW] = q[CNT_LO + n*CW +: CW];
      else if (sub == '0)
        d[SNAP_LO + n*CW +: CW] = (n == NCNT - 1) ? '0 : q[SNAP_LO + (n+1)*CW +: CW];
    end
    d[CYC_LO +: CYC_W] = (cyc == CYC_W'(PERIOD - 1)) ? '0 : cyc + CYC_W'(1);
    d[SCLK_B]          = (sub < CYC_W'(SHIFT / 2));
  end

endmodule
