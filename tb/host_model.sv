// Behavioural model of the host PC side of the RS232 link, for simulation.
// send_cmd() sends a 4-byte command (command number, D0, D1, D2) as 8N1 frames, LSB first,
// CPB clocks per bit. Every byte arriving on `txd` is decoded and kept; parse() splits the
// byte stream into messages by their 4-byte headers and returns the alive count, the echoed
// command words and the 23-byte records (as err_record_t).
module host_model
  import ku_pkg::*;
#(
  parameter int unsigned CPB = 868
) (
  input  logic clk,
  input  logic txd,      // from the tester
  output logic rxd       // to the tester
);
  logic [7:0] bytes [$];
  int         bad_frames = 0;

  initial rxd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = f[k];
      repeat (CPB) @(negedge clk);
    end
  endtask

  task automatic send_cmd(input logic [7:0] op, input logic [7:0] d0, input logic [7:0] d1,
                          input logic [7:0] d2);
    send_byte(op); send_byte(d0); send_byte(d1); send_byte(d2);
    repeat (2 * CPB) @(negedge clk);
  endtask

  // receiver
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (txd) bytes.push_back(b);
      else     bad_frames++;
    end
  end

  task automatic parse(output int n_alive, output int n_unknown, ref logic [31:0] echoes [$],
                       ref err_record_t recs [$]);
    int i;
    n_alive = 0; n_unknown = 0; i = 0;
    echoes.delete(); recs.delete();
    while (i + 4 <= bytes.size()) begin
      logic [31:0] h;
      h = {bytes[i], bytes[i+1], bytes[i+2], bytes[i+3]};
      if (h == HDR_ALIVE) begin
        n_alive++; i += 4;
      end else if (h == HDR_ECHO && i + 8 <= bytes.size()) begin
        echoes.push_back({bytes[i+4], bytes[i+5], bytes[i+6], bytes[i+7]});
        i += 8;
      end else if (h == HDR_RECORD && i + 4 + REC_BYTES <= bytes.size()) begin
        logic [REC_BITS-1:0] r;
        for (int k = 0; k < REC_BYTES; k++) r[REC_BITS-1-8*k -: 8] = bytes[i+4+k];
        recs.push_back(err_record_t'(r));
        i += 4 + REC_BYTES;
      end else if (h == HDR_ECHO || h == HDR_RECORD) begin
        i = bytes.size();           // message still arriving
      end else begin
        n_unknown++; i++;
      end
    end
  endtask
endmodule
