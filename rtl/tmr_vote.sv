// Bitwise 2-of-3 majority voter, the element every TMR scheme of the counter-array study is
// built from. Each output bit is 1 when at least two of the three domain inputs are 1, so an
// upset confined to one domain is masked. Purely combinational, zero latency.
module tmr_vote #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  always_comb y = (a & b) | (a & c) | (b & c);
endmodule
