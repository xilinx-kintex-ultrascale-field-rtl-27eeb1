// Synchronous first-in first-out buffer for error and status records waiting for the slow
// serial link. Write when wr_en and not full; read the head with rd_en when not empty
// (rd_data shows the head combinationally). A write into a full buffer is dropped and counted
// in `dropped`, so lost records stay visible. Width and depth are parameters; the depth of 16
// is this design's choice.
module record_fifo #(
  parameter int unsigned W     = 184,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [15:0]  dropped
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      wp      <= '0;
      rp      <= '0;
      count   <= '0;
      dropped <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full && dropped != '1) dropped <= dropped + 1'b1;
    end

  assert property (@(posedge clk) disable iff (rst) !(do_rd && empty));
endmodule
