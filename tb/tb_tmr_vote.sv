// Self-checking test of tmr_vote: random 16-bit triples, expected majority computed bit by bit.
module tb_tmr_vote;
  logic [15:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_vote #(.W(16)) dut (.a, .b, .c, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] e;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if (i % 3 == 0) begin b = a; c = ~a; end  // one domain fully wrong
      #1;
      for (int k = 0; k < 16; k++) e[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 5) $display("FAIL a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
