// Beam-activation synchroniser. The accelerator's beam-on signal is asynchronous to the
// tester; two flip-flops synchronise it and a third detects changes. Turning the beam on
// emits a status event 6 (110), turning it off emits status 4 (100), each a one-cycle pulse,
// so that the host log brackets the exposure with two time-stamped records.
// Status codes follow the report; the synchroniser depth is this design's choice.
module beam_sync
  import ku_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    beam_on,
  output logic    beam_level,
  output logic    evt_valid,
  output status_e evt_status
);
  logic b1, b2, b3;

  always_ff @(posedge clk or posedge rst)
    if (rst) {b1, b2, b3} <= '0;
    else     {b1, b2, b3} <= {beam_on, b1, b2};

  assign beam_level = b2;
  assign evt_valid  = b2 ^ b3;
  assign evt_status = b2 ? ST_BEAM_ON : ST_BEAM_OFF;
endmodule
