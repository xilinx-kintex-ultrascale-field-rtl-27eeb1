// Self-checking test of record_fifo (depth 16): random pushes and pops against a queue model,
// including writes into a full buffer, which must be dropped and counted.
module tb_record_fifo;
  localparam int W = 40, DEPTH = 16;
  logic clk = 1'b0, rst = 1'b0, wr_en = 1'b0, rd_en = 1'b0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [15:0] dropped;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, exp_drop = 0, saw_full = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  record_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data,
                                           .empty, .full, .dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      if (full) saw_full++;
      wr_en   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      rd_en   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      wr_data = {8'($urandom), 32'($urandom)};
      @(posedge clk);
      begin
        bit was_full;
        was_full = (model.size() == DEPTH);
        if (rd_en && model.size() != 0) void'(model.pop_front());
        if (wr_en) begin
          if (!was_full) model.push_back(wr_data);
          else exp_drop++;
        end
      end
      #1 check(int'(dropped) == exp_drop, "drop count");
    end
    check(saw_full > 0, "buffer became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
