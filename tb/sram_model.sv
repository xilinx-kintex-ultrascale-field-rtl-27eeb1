// Behavioural model of the tester's scrub-file SRAM (read side only), for simulation.
// Word a holds golden(a) = {a[15:0] ^ 16'hC35A, ~a[15:0] ^ 16'h0F0F}, a pattern that differs
// in every word so misplaced or dropped words are visible. Read latency is one clock: the
// word addressed while oe is high appears on rdata after the next rising edge.
module sram_model #(
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          oe,
  output logic [31:0]   rdata
);
  function automatic logic [31:0] golden(input logic [AW-1:0] a);
    return {a[15:0] ^ 16'hC35A, ~a[15:0] ^ 16'h0F0F};
  endfunction

  initial rdata = '0;
  always @(posedge clk) rdata <= oe ? golden(addr) : 32'h0;
endmodule
