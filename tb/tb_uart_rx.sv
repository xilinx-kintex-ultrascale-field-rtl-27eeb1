// Self-checking test of uart_rx (16 clocks per bit): random bytes are sent as 8N1 frames with
// random idle gaps and must be received once each; a frame with a low stop bit must be dropped.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b0, rxd = 1'b1, valid;
  logic [7:0] data;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, got = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .valid, .data);

  always @(posedge clk)
    if (valid) begin
      checks++;
      got++;
      if (sent.size() == 0 || data != sent[0]) begin
        failures++;
        $display("FAIL received %h", data);
      end
      if (sent.size() != 0) void'(sent.pop_front());
    end

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = f[k];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (i == 30) begin
        send(8'hA5, 1'b0);          // broken frame: must be ignored
        repeat (3 * CPB) @(negedge clk);
      end
      sent.push_back(b);
      send(b, 1'b1);
      repeat ($urandom_range(0, 3 * CPB)) @(negedge clk);
    end
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (got != 60 || sent.size() != 0) begin
      failures++;
      $display("FAIL received %0d of 60 bytes", got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
