// Self-checking test of counter_checker at its default size (200 counters x 8 bits).
// The testbench plays the DUT: every 4 clocks it puts the next snapshot value on the data pins
// and raises the shift clock, value n + 800k (mod 256) for counter n in snapshot k. Two faults
// are planted: in snapshot 2 counter 17 is off by +5 for that snapshot only (a snapshot
// register upset), from snapshot 4 on counter 100 has bit 4 flipped (a counter upset that
// keeps counting). The checker must report exactly three errors, at (k=2,n=17), (k=3,n=17)
// and (k=4,n=100), with the right record fields, and compare every snapshot while running.
module tb_counter_checker;
  import ku_pkg::*;
  localparam int NCNT = 200, CW = 8, SHIFT = 4, K = 7;
  logic clk = 1'b0, rst = 1'b0, dut_rst = 1'b1, run = 1'b0;
  logic [CW-1:0] data_in = '0;
  logic shift_clk = 1'b0, edge_o, sync_o;
  logic [31:0] timestamp = '0;
  logic rec_valid;
  err_record_t rec;
  logic [15:0] error_count;
  logic [31:0] checked;
  err_record_t recs [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;
  always @(posedge clk) timestamp <= timestamp + 1;

  shift_clk_detect u_det (.clk, .rst, .shift_clk, .sync_o, .edge_o);
  counter_checker dut (.clk, .rst, .dut_rst, .run, .data_in, .edge_i(edge_o), .timestamp,
                       .rec_valid, .rec, .error_count, .checked);

  always @(posedge clk) if (rec_valid) recs.push_back(rec);

  function automatic logic [CW-1:0] value(input int k, input int n);
    logic [CW-1:0] v;
    v = CW'(n + SHIFT * NCNT * k);
    if (k == 2 && n == 17) v = v + 8'd5;
    if (k >= 4 && n == 100) v = v ^ 8'h10;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    dut_rst = 1'b0;
    run = 1'b1;
    for (int k = 0; k < K; k++)
      for (int n = 0; n < NCNT; n++) begin
        @(posedge clk);
        data_in   <= value(k, n);
        shift_clk <= 1'b1;
        repeat (2) @(posedge clk);
        shift_clk <= 1'b0;
        @(posedge clk);
      end
    repeat (10) @(negedge clk);
    check(checked == K * NCNT, $sformatf("checked %0d snapshots", checked));
    check(error_count == 3, $sformatf("error count %0d", error_count));
    check(recs.size() == 3, $sformatf("%0d records", recs.size()));
    if (recs.size() == 3) begin
      check(recs[0].counter_num == 17 && recs[0].data_n == 16'(value(2, 17)), "record 1 counter and data");
      check(recs[0].data_n1 == 16'(value(2, 16)) && recs[0].data_n2 == 16'(value(2, 15))
            && recs[0].data_n3 == 16'(value(2, 14)), "record 1 history");
      check(recs[1].counter_num == 17 && recs[1].data_n == 16'(value(3, 17)), "record 2 (resynchronised)");
      check(recs[2].counter_num == 100 && recs[2].data_n == 16'(value(4, 100)), "record 3");
      check(recs[0].status == ST_ERROR && recs[0].error_count == 1 && recs[2].error_count == 3,
            "status and running count");
      // snapshot k=2, counter 17 reached the pins at about (2*200+17)*4 clocks after release
      check(recs[0].timestamp > (2 * NCNT + 17) * SHIFT && recs[0].timestamp < (2 * NCNT + 17) * SHIFT + 20,
            $sformatf("time stamp %0d", recs[0].timestamp));
      check(recs[0].spare == '0, "spare bits zero");
    end
    // counter reset clears the count
    @(negedge clk) dut_rst = 1'b1;
    @(negedge clk) dut_rst = 1'b0;
    check(error_count == 0, "counter reset clears the error count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
