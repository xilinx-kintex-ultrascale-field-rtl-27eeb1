// Self-checking test of cmd_decoder: every command of the counter and scrubbing tables is sent
// as 4 bytes; the echo word, the pulse it must raise and the settings it must store are
// checked. A partial command followed by a long gap must be discarded.
module tb_cmd_decoder;
  logic clk = 1'b0, rst = 1'b0, byte_valid = 1'b0;
  logic [7:0] byte_data = '0;
  logic echo_valid;
  logic [31:0] echo_word;
  logic soft_reset, counter_reset, start_test, scrub_reset, scrub_start, scrub_stop, inject;
  logic [15:0] clk_div;
  logic [23:0] inj_start, inj_end;
  logic flip_all;
  int checks = 0, failures = 0;
  logic [6:0] pulses;     // {soft, creset, start, sreset, sstart, sstop, inject} seen
  logic [31:0] last_echo;
  int echoes = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  cmd_decoder #(.GAP_CYCLES(50)) dut (.*);

  always @(posedge clk) begin
    pulses |= {soft_reset, counter_reset, start_test, scrub_reset, scrub_start, scrub_stop, inject};
    if (echo_valid) begin echoes++; last_echo = echo_word; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk) begin byte_valid = 1'b1; byte_data = b; end
    @(negedge clk) byte_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_cmd(input logic [7:0] op, d0, d1, d2, input logic [6:0] exp_pulses);
    int e0;
    e0 = echoes;
    pulses = '0;
    send_byte(op); send_byte(d0); send_byte(d1); send_byte(d2);
    repeat (3) @(negedge clk);
    check(echoes == e0 + 1 && last_echo == {op, d0, d1, d2}, $sformatf("echo of %h", op));
    check(pulses == exp_pulses, $sformatf("pulses %b for %h, expected %b", pulses, op, exp_pulses));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulses = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    send_cmd(8'h01, 0, 0, 0, 7'b1000000);
    send_cmd(8'h03, 0, 0, 0, 7'b0100000);
    send_cmd(8'h02, 0, 0, 0, 7'b0010000);
    send_cmd(8'h04, 0, 0, 0, 7'b0110000);
    send_cmd(8'hA0, 8'h34, 8'h12, 0, 7'b0000000);
    check(clk_div == 16'h1234, "clock divider D1:D0");
    send_cmd(8'h99, 0, 0, 0, 7'b0001000);
    send_cmd(8'h06, 0, 0, 0, 7'b0000100);
    send_cmd(8'h26, 0, 0, 0, 7'b0000010);
    send_cmd(8'h0E, 0, 0, 0, 7'b0000001);
    send_cmd(8'h79, 8'h56, 8'h34, 8'h12, 7'b0000000);
    send_cmd(8'h7A, 8'hBC, 8'h9A, 8'h78, 7'b0000000);
    check(inj_start == 24'h123456 && inj_end == 24'h789ABC, "injection addresses D2:D1:D0");
    send_cmd(8'h7E, 8'h01, 0, 0, 7'b0000000);
    check(flip_all, "flip-all on");
    send_cmd(8'h7E, 8'h00, 0, 0, 7'b0000000);
    check(!flip_all, "flip-all off");
    send_cmd(8'h55, 1, 2, 3, 7'b0000000);   // unknown: echo only
    // partial command, then silence: the decoder must realign
    send_byte(8'h03); send_byte(8'h00);
    repeat (80) @(negedge clk);
    send_cmd(8'h06, 0, 0, 0, 7'b0000100);
    check(clk_div == 16'h1234, "settings kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
