// Blind configuration scrubber. The golden scrub file (configuration words framed by the
// scrub header and footer) sits in the tester's SRAM; once started, the scrubber reads it word
// by word and writes every word to the DUT's 32-bit SelectMAP port, from word 0 to word
// scrub_words-1 and then again from word 0, until stopped. Nothing is read back or compared:
// the golden data simply overwrites whatever is in configuration memory, so any number of
// upset bits per word is corrected.
//
// Timing: one word every 4 clocks (25 MHz at 100 MHz). Phase 0 puts the address on the SRAM,
// phase 1 takes the SRAM data (one-cycle read latency) onto SMAP D with CCLK low, phases 2 and
// 3 hold CCLK high, so the DUT samples D on the rising CCLK edge. CSI_B is low and RDWR_B is
// low (write) while scrubbing.
//
// Error injection uses the scrubber as a fault injector. inj_start / inj_end are addresses of
// 16-bit words (a 32-bit word holds 16-bit word 2a in bits 31:16 and 2a+1 in bits 15:0).
// An `inject` request arms the next full pass: with flip_all set, that pass writes every bit
// of every 16-bit word in the range inverted; otherwise it flips one bit only, at a pointer
// that starts at bit 0 of inj_start (whenever inj_start changes) and moves on one bit per injection, wrapping after inj_end.
// The following pass writes golden data again, which removes the injected upsets.
// Commands: scrub_reset stops and rewinds everything, start, stop (at the end of the current
// word). The 4-clock word rate, endless looping, SRAM source, 32-bit SelectMAP and the
// injection commands follow the report; the SRAM timing, the phase split, the 16-bit word
// order and the injection pointer are this design's choices.
module blind_scrubber #(
  parameter int unsigned AW = 22   // SRAM word address width (4M x 32 bits)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          scrub_reset,
  input  logic          start,
  input  logic          stop,
  input  logic [AW-1:0] scrub_words,  // length of the scrub file in 32-bit words
  input  logic          inject,
  input  logic [23:0]   inj_start,
  input  logic [23:0]   inj_end,
  input  logic          flip_all,
  // SRAM read port
  output logic [AW-1:0] sram_addr,
  output logic          sram_oe,
  input  logic [31:0]   sram_rdata,
  // SelectMAP
  output logic          smap_csi_b,
  output logic          smap_rdwr_b,
  output logic          smap_cclk,
  output logic [31:0]   smap_d,
  // status
  output logic          busy,
  output logic [31:0]   passes,        // completed passes
  output logic [31:0]   words_written
);
  logic [1:0]  ph;
  logic        running, stop_req, armed, inj_pass;
  logic [23:0] ptr_w;   // single-bit mode pointer: 16-bit word address
  logic [3:0]  ptr_b;   //                          bit in that word
  logic [31:0] flip;
  logic [23:0] inj_start_q;  // last start address seen, to reload the pointer on a change

  // Flip mask for the word at sram_addr in the current pass.
  logic [24:0] a16;

  always_comb begin
    flip = '0;
    a16  = '0;
    if (inj_pass)
      for (int h = 0; h < 2; h++) begin
        a16 = 25'({sram_addr, 1'b0}) + 25'(h);  // h = 0: bits 31:16, h = 1: bits 15:0
        if (flip_all) begin
          if (a16 >= {1'b0, inj_start} && a16 <= {1'b0, inj_end})
            flip[(1-h)*16 +: 16] = 16'hFFFF;
        end else if (a16 == {1'b0, ptr_w}) begin
          flip[(1-h)*16 + 32'(ptr_b)] = 1'b1;
        end
      end
  end

  assign busy        = running;
  assign smap_rdwr_b = 1'b0;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      ph <= '0; running <= 1'b0; stop_req <= 1'b0; armed <= 1'b0; inj_pass <= 1'b0;
      ptr_w <= '0; ptr_b <= '0; inj_start_q <= '0;
      sram_addr <= '0; sram_oe <= 1'b0;
      smap_csi_b <= 1'b1; smap_cclk <= 1'b0; smap_d <= '0;
      passes <= '0; words_written <= '0;
    end else begin
      inj_start_q <= inj_start;
      if (inj_start != inj_start_q) begin ptr_w <= inj_start; ptr_b <= '0; end
      if (inject) armed <= 1'b1;
      if (stop) stop_req <= 1'b1;
      if (scrub_reset) begin
        ph <= '0; running <= 1'b0; stop_req <= 1'b0; armed <= 1'b0; inj_pass <= 1'b0;
        ptr_w <= inj_start; ptr_b <= '0;
        sram_addr <= '0; sram_oe <= 1'b0;
        smap_csi_b <= 1'b1; smap_cclk <= 1'b0;
      end else if (!running) begin
        smap_cclk <= 1'b0;
        if (start) begin
          running    <= 1'b1;
          stop_req   <= 1'b0;
          ph         <= '0;
          sram_oe    <= 1'b1;
          smap_csi_b <= 1'b0;
          if (sram_addr == '0) begin
            inj_pass <= armed || inject;
            armed    <= 1'b0;
          end
        end
      end else begin
        ph <= ph + 1'b1;
        case (ph)
          2'd0: smap_cclk <= 1'b0;
          2'd1: begin
            smap_d    <= sram_rdata ^ flip;
            smap_cclk <= 1'b0;
          end
          2'd2: smap_cclk <= 1'b1;
          2'd3: begin
            smap_cclk     <= 1'b1;
            words_written <= words_written + 1;
            if (sram_addr >= scrub_words - 1'b1) begin
              // end of the file: start the next pass
              sram_addr <= '0;
              passes    <= passes + 1;
              if (inj_pass && !flip_all) begin
                if (ptr_w >= inj_end && ptr_b == 4'd15) begin
                  ptr_w <= inj_start; ptr_b <= '0;
                end else begin
                  if (ptr_b == 4'd15) ptr_w <= ptr_w + 1'b1;
                  ptr_b <= ptr_b + 1'b1;
                end
              end
              inj_pass <= armed || inject;
              armed    <= 1'b0;
            end else begin
              sram_addr <= sram_addr + 1'b1;
            end
            if (stop_req || stop) begin
              running    <= 1'b0;
              stop_req   <= 1'b0;
              sram_oe    <= 1'b0;
              smap_csi_b <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
endmodule
