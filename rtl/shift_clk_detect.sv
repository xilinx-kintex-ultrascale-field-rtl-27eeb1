// Capture of the DUT's shift clock in the tester clock domain. The shift clock comes from the
// DUT, so it is treated as asynchronous: two flip-flops in series filter metastability, a
// third holds the previous synchronised level, and `edge_o` is a one-cycle pulse when the
// synchronised level goes from 0 to 1. The pulse comes 2 to 3 tester cycles after the real
// edge (1 to 2 cycles of synchroniser uncertainty plus the compare stage).
// The two-flop filter, the edge flop and the reset of all three follow the report's capture
// circuit; making that reset asynchronous and detecting the rising edge are this design's choices.
module shift_clk_detect (
  input  logic clk,
  input  logic rst,        // asynchronous clear
  input  logic shift_clk,  // asynchronous input from the DUT
  output logic sync_o,     // synchronised level
  output logic edge_o      // rising-edge pulse
);
  logic s1, s2, s3;

  always_ff @(posedge clk or posedge rst)
    if (rst) {s1, s2, s3} <= '0;
    else     {s1, s2, s3} <= {shift_clk, s1, s2};

  assign sync_o = s2;
  assign edge_o = s2 & ~s3;
endmodule
