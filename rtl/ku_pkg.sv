// Shared constants and types of the counter-array single-event-upset test system.
//
// The device under test (DUT) runs an array of NCOUNTERS 8-bit counters whose values leave the
// chip one at a time through a snapshot shift register. The tester (LCDT) checks every value,
// packs each anomaly into an error record and sends it over RS232 to the host.
// The numbers below (200 counters, 8 bits, a shift every 4 clocks, the RS232 headers, the status
// codes and the command codes) follow the test report; the record layout beyond the listed
// fields, the baud rate and the buffer depths are this design's own choices.
package ku_pkg;

  // ---- counter array (DUT) ----
  localparam int unsigned NCOUNTERS   = 200;  // counters in the array
  localparam int unsigned CNT_W       = 8;    // counter width
  localparam int unsigned SHIFT_EVERY = 4;    // snapshot register shifts once every 4 clocks

  // Mitigation scheme the DUT design is built with.
  typedef enum logic [1:0] {
    TMR_NONE = 2'd0,  // plain design
    TMR_BTMR = 2'd1,  // block TMR: three copies, voters on outputs
    TMR_LTMR = 2'd2,  // local TMR: flip-flops triplicated, voters in front of them
    TMR_DTMR = 2'd3   // distributed TMR: everything triplicated, voters after each flip-flop
  } tmr_scheme_e;

  // ---- record status field (3 bits) ----
  typedef enum logic [2:0] {
    ST_ERROR       = 3'b000,  // data error (current value not as expected)
    ST_TIMEOUT     = 3'b001,  // shift clock not detected
    ST_DEBUG       = 3'b010,  // debug check
    ST_OUT_TIMEOUT = 3'b011,  // shift clock recovered
    ST_BEAM_OFF    = 3'b100,  // beam turned off
    ST_BEAM_ON     = 3'b110   // beam turned on
  } status_e;

  // Counter-array error record. 23 bytes are sent after the record header, so the fields
  // are packed into 184 bits, most significant byte first.
  localparam int unsigned REC_BYTES = 23;
  localparam int unsigned REC_BITS  = REC_BYTES * 8;

  typedef struct packed {
    logic [52:0] spare;         // zero
    status_e     status;        // record type
    logic [31:0] timestamp;     // tester clock cycles since tester reset
    logic [15:0] error_count;   // data errors seen since the counters were reset
    logic [15:0] counter_num;   // tester's expected counter number (0..NCOUNTERS-1)
    logic [15:0] data_n3;       // DUT output three shift periods earlier
    logic [15:0] data_n2;       // DUT output two shift periods earlier
    logic [15:0] data_n1;       // previous DUT output
    logic [15:0] data_n;        // current DUT output
  } err_record_t;

  // ---- RS232 framing ----
  localparam logic [31:0] HDR_ALIVE  = 32'h00FA_F320;
  localparam logic [31:0] HDR_RECORD = 32'h00FA_F321;
  localparam logic [31:0] HDR_ECHO   = 32'h00FA_F322;

  // ---- host commands (first byte of the 4-byte command word) ----
  localparam logic [7:0] CMD_RESET_LCDT    = 8'h01;
  localparam logic [7:0] CMD_START_TEST    = 8'h02;
  localparam logic [7:0] CMD_RESET_COUNTER = 8'h03;
  localparam logic [7:0] CMD_RESET_START   = 8'h04;
  localparam logic [7:0] CMD_START_SCRUB   = 8'h06;
  localparam logic [7:0] CMD_INJECT        = 8'h0E;
  localparam logic [7:0] CMD_STOP_SCRUB    = 8'h26;
  localparam logic [7:0] CMD_INJ_START     = 8'h79;
  localparam logic [7:0] CMD_INJ_END       = 8'h7A;
  localparam logic [7:0] CMD_INJ_FLIP_ALL  = 8'h7E;
  localparam logic [7:0] CMD_SCRUB_RESET   = 8'h99;
  localparam logic [7:0] CMD_CLK_DIV       = 8'hA0;

  // Majority of three.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
