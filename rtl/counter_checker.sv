// Counter processing in the tester. The DUT's counter output is registered twice before use
// (the shift-clock edge pulse arrives with the same delay), and on every detected shift-clock
// edge the registered value is taken as the snapshot of counter `idx`, the tester's own copy
// of the counter number, which steps 0 .. NCNT-1 and wraps.
//
// Each counter has a stored last value. The expected value is last + SHIFT*NCNT (mod 2^CW),
// i.e. +800 = +32 (mod 256) for 200 counters, because every counter advanced one count per
// cycle between two snapshots; the first snapshot after a counter reset is expected to equal n,
// the counter's reset value. Whatever value arrives is stored as the new last value, so the
// tester resynchronises after an upset and keeps counting errors afterwards. While `run` is
// high a mismatch increments the error count and emits one error record holding the last four
// DUT outputs, the counter number, the count and the time stamp (status 000).
// `dut_rst` (the counter reset sent to the DUT) clears the counter number, the stored values
// and the error count. Record fields follow the report's counter error record; their widths
// where the report gives none and the first-snapshot rule are this design's choices.
module counter_checker
  import ku_pkg::*;
#(
  parameter int unsigned NCNT  = 200,
  parameter int unsigned CW    = 8,
  parameter int unsigned SHIFT = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          dut_rst,
  input  logic          run,
  input  logic [CW-1:0] data_in,    // asynchronous DUT counter output
  input  logic          edge_i,     // shift-clock edge pulse from shift_clk_detect
  input  logic [31:0]   timestamp,
  output logic          rec_valid,
  output err_record_t   rec,
  output logic [15:0]   error_count,
  output logic [31:0]   checked     // snapshots compared while running
);
  localparam int unsigned IW = $clog2(NCNT);
  localparam logic [CW-1:0] STEP = CW'(SHIFT * NCNT);

  logic [CW-1:0] d1, d2;
  logic [CW-1:0] last [NCNT];
  logic [NCNT-1:0] seen;
  logic [IW-1:0] idx;
  logic [15:0]   h1, h2, h3;   // previous three outputs
  logic [CW-1:0] expected;
  logic          mismatch;

  always_comb begin
    expected = seen[idx] ? last[idx] + STEP : CW'(idx);
    mismatch = (d2 != expected);
  end

  always_ff @(posedge clk)
    if (edge_i) last[idx] <= d2;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      d1 <= '0; d2 <= '0;
      seen <= '0; idx <= '0;
      h1 <= '0; h2 <= '0; h3 <= '0;
      error_count <= '0;
      checked     <= '0;
      rec_valid   <= 1'b0;
      rec         <= '0;
    end else begin
      d1 <= data_in;
      d2 <= d1;
      rec_valid <= 1'b0;
      if (dut_rst) begin
        seen        <= '0;
        idx         <= '0;
        error_count <= '0;
      end else if (edge_i) begin
        seen[idx] <= 1'b1;
        idx       <= (idx == IW'(NCNT - 1)) ? '0 : idx + 1'b1;
        {h3, h2, h1} <= {h2, h1, 16'(d2)};
        if (run) begin
          checked <= checked + 1;
          if (mismatch) begin
            if (error_count != '1) error_count <= error_count + 1'b1;
            rec_valid       <= 1'b1;
            rec             <= '0;
            rec.status      <= ST_ERROR;
            rec.timestamp   <= timestamp;
            rec.error_count <= error_count + 1'b1;
            rec.counter_num <= 16'(idx);
            rec.data_n      <= 16'(d2);
            rec.data_n1     <= h1;
            rec.data_n2     <= h2;
            rec.data_n3     <= h3;
          end
        end
      end
    end
endmodule
