// Self-checking test of msg_tx: a byte sink with a busy time per byte stands in for the
// transmitter. Alive headers must appear when idle, a command echo must be 00 FA F3 22 plus the
// 4 command bytes, and each buffered record must be 00 FA F3 21 plus its 23 bytes, MSB first.
module tb_msg_tx;
  import ku_pkg::*;
  logic clk = 1'b0, rst = 1'b0;
  logic echo_valid = 1'b0;
  logic [31:0] echo_word = '0;
  logic rec_avail;
  logic [REC_BITS-1:0] rec_data;
  logic rec_pop, tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [31:0] sent_alive, sent_echo, sent_record;
  logic [REC_BITS-1:0] recq [$];
  logic [7:0] stream [$];
  int checks = 0, failures = 0, busy = 0;

  always #5 clk = ~clk;
  initial #1 rst = 1'b1;  // a real edge for the asynchronous resets
  msg_tx #(.ALIVE_CYCLES(400)) dut (.*);

  assign rec_avail = (recq.size() != 0);
  assign rec_data  = (recq.size() != 0) ? recq[0] : '0;
  assign tx_ready  = (busy == 0);

  always @(posedge clk) begin
    if (rec_pop) void'(recq.pop_front());
    if (busy != 0) busy <= busy - 1;
    else if (tx_valid) begin stream.push_back(tx_data); busy <= 5; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Parse the captured stream: counts of alive / echo / record messages, with payload checks.
  task automatic parse(output int n_alive, output int n_echo, output int n_rec,
                       input logic [31:0] exp_echo, input logic [REC_BITS-1:0] exp_rec []);
    int i;
    n_alive = 0; n_echo = 0; n_rec = 0; i = 0;
    while (i + 4 <= stream.size()) begin
      logic [31:0] h;
      h = {stream[i], stream[i+1], stream[i+2], stream[i+3]};
      i += 4;
      if (h == HDR_ALIVE) n_alive++;
      else if (h == HDR_ECHO) begin
        check({stream[i], stream[i+1], stream[i+2], stream[i+3]} == exp_echo, "echo payload");
        n_echo++; i += 4;
      end else if (h == HDR_RECORD) begin
        logic [REC_BITS-1:0] r;
        for (int k = 0; k < REC_BYTES; k++) r[REC_BITS-1-8*k -: 8] = stream[i+k];
        check(n_rec < exp_rec.size() && r == exp_rec[n_rec], "record payload");
        n_rec++; i += REC_BYTES;
      end else begin
        check(0, $sformatf("unknown header %h", h));
        i = stream.size();
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [REC_BITS-1:0] recs [];
    int na, ne, nr;
    recs = new[3];
    foreach (recs[k]) for (int w = 0; w < REC_BITS; w += 8) recs[k][w +: 8] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (1000) @(negedge clk);
    parse(na, ne, nr, 32'h0, recs);
    check(na >= 2 && ne == 0 && nr == 0, $sformatf("alive messages when idle (%0d)", na));
    stream.delete();
    @(negedge clk);
    foreach (recs[k]) recq.push_back(recs[k]);
    echo_valid = 1'b1; echo_word = 32'h0E01_0203;
    @(negedge clk) echo_valid = 1'b0;
    repeat (1500) @(negedge clk);
    parse(na, ne, nr, 32'h0E01_0203, recs);
    check(ne == 1 && nr == 3, $sformatf("one echo and three records (%0d, %0d)", ne, nr));
    check(sent_record == 3 && sent_echo == 1, "message counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
