// read_master: Avalon-MM read master that streams an image from memory to the
// accelerator as one 24-bit pixel per cycle.
//
// The image sits in memory as packed bytes, three per pixel (channel 0 at the
// lowest byte address), four bytes per little-endian 32-bit word, so four
// pixels span three words. A pulse on `go` latches the first word address and
// the pixel count and starts one pass over the image; the accelerator runs
// two passes (histogram, then remapping).
// Reads are issued back to back, one word per cycle, as long as the word FIFO
// has room for the data still in flight; waitrequest from the interconnect
// holds the request. An unpacking buffer of up to six bytes turns words into
// pixels: it emits a pixel whenever it holds three bytes and the consumer is
// ready, and pulls the next word whenever two bytes or fewer would remain, so a
// steady stream gives one pixel per clock. `done` pulses for one cycle after
// the last pixel of the pass has been accepted.
// The text gives the block's task (addressing memory and delivering data to
// the accelerator in order); the packing and the buffer are this design's.
module read_master
  import he_pkg::*;
#(
  parameter int unsigned PIX_W  = 18,   // bits of a pixel count
  parameter int unsigned FIFO_D = 4     // words buffered ahead of the unpacker
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  word_t            base_addr,
  input  word_t            length,      // words available at base_addr
  input  logic [PIX_W-1:0] npix,
  // Avalon-MM master
  output avm_req_t         avm_req,
  input  avm_rsp_t         avm_rsp,
  // pixel stream
  output pixel_t           pix,
  output logic             pix_valid,
  input  logic             pix_ready,
  output logic             done
);

  localparam int unsigned FW = $clog2(FIFO_D + 1);
  localparam int unsigned WC = PIX_W + 1;          // word counts up to 3*npix/4

  addr_t               addr_q;
  logic [WC-1:0]       words_left;
  logic [PIX_W-1:0]    pix_left;
  logic                inflight;
  word_t               fifo [FIFO_D];
  logic [$clog2(FIFO_D)-1:0] wp, rp;
  logic [FW-1:0]       fcnt;
  logic [7:0]          bytes [6], bytes_nx [6];
  logic [2:0]          nb;

  logic issue, accept, push, pop, fire;
  logic [2:0] nb_after;
  logic [WC+1:0] need_words;

  // Words needed for npix packed pixels, limited by the configured length.
  always_comb begin
    need_words = ((WC+2)'(npix) * 3 + 3) >> 2;
    if (need_words > (WC+2)'(length)) need_words = (WC+2)'(length);
  end

  assign issue  = words_left != 0 && (32'(fcnt) + 32'(inflight)) < FIFO_D;
  assign accept = issue && !avm_rsp.waitrequest;
  assign push   = avm_rsp.readdatavalid;

  always_comb begin
    avm_req         = AVM_REQ_IDLE;
    avm_req.read    = issue;
    avm_req.address = addr_q;
    avm_req.byteenable = '1;
  end

  assign pix_valid = nb >= 3'd3 && pix_left != 0;
  assign pix       = {bytes[2], bytes[1], bytes[0]};
  assign fire      = pix_valid && pix_ready;
  assign nb_after  = fire ? nb - 3'd3 : nb;
  assign pop       = fcnt != 0 && nb_after <= 3'd2;

  // Byte buffer: drop the emitted pixel, then append the popped word.
  always_comb begin
    for (int i = 0; i < 6; i++) begin
      int src, k;
      src = fire ? i + 3 : i;
      k   = i - int'(nb_after);
      if (pop && k >= 0 && k < 4)
        bytes_nx[i] = fifo[rp][8*k +: 8];
      else if (src < 6)
        bytes_nx[i] = bytes[src];
      else
        bytes_nx[i] = bytes[i];
    end
  end

  // FIFO storage needs no reset.
  always_ff @(posedge clk) if (push && !go) fifo[wp] <= avm_rsp.readdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q     <= '0;
      words_left <= '0;
      pix_left   <= '0;
      inflight   <= 1'b0;
      wp         <= '0;
      rp         <= '0;
      fcnt       <= '0;
      nb         <= '0;
      done       <= 1'b0;
      for (int i = 0; i < 6; i++) bytes[i] <= '0;
    end else begin
      done <= fire && pix_left == 1;
      if (go) begin
        addr_q     <= addr_t'(base_addr);
        words_left <= WC'(need_words);
        pix_left   <= npix;
        inflight   <= 1'b0;
        wp         <= '0;
        rp         <= '0;
        fcnt       <= '0;
        nb         <= '0;
      end else begin
        if (accept) begin
          addr_q     <= addr_q + 1'b1;
          words_left <= words_left - 1'b1;
        end
        inflight <= accept;
        if (push) wp <= wp + 1'b1;
        if (pop) rp <= rp + 1'b1;
        fcnt <= fcnt + FW'(push) - FW'(pop);
        if (fire) pix_left <= pix_left - 1'b1;
        for (int i = 0; i < 6; i++) bytes[i] <= bytes_nx[i];
        nb <= nb_after + (pop ? 3'd4 : 3'd0);
      end
    end
  end

  // The FIFO never overflows: reads are only issued with room reserved.
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
                                !(push && !pop && 32'(fcnt) == FIFO_D));

endmodule
