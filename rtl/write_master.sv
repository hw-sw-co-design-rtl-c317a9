// write_master: Avalon-MM write master that takes the accelerator's 24-bit
// result pixels, packs them into 32-bit words and writes them to memory.
//
// A pulse on `go` latches the target word address and the pixel count. Each
// accepted pixel appends its three bytes (channel 0 first) to a packing buffer;
// whenever four bytes are there a full word enters the word FIFO, and after
// the last pixel any remaining bytes go out as a final word whose byteenable
// covers only them. The head of the FIFO is written to consecutive addresses,
// one word per cycle unless the interconnect raises waitrequest. The output
// format is the same packing the read master unpacks, so the result image has
// the layout of the source image.
// `full` tells the accelerator to pause: it rises while FIFO_D-2 or more words
// are queued, which leaves room for the pixels already in the accelerator's
// output stage. `done` pulses once when every byte has been written.
// The text gives the task (receive results, format them for memory, watch bus
// saturation to pause and resume the accelerator); the FIFO, its threshold
// and the packing are this design's.
module write_master
  import he_pkg::*;
#(
  parameter int unsigned PIX_W  = 18,
  parameter int unsigned FIFO_D = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  word_t            base_addr,
  input  logic [PIX_W-1:0] npix,
  // pixel stream from the accelerator
  input  pixel_t           pix,
  input  logic             pix_valid,
  output logic             full,
  // Avalon-MM master
  output avm_req_t         avm_req,
  input  avm_rsp_t         avm_rsp,
  output logic             done
);

  localparam int unsigned FW = $clog2(FIFO_D + 1);
  localparam int unsigned PW = $clog2(FIFO_D);

  typedef struct packed {
    word_t           data;
    logic [BE_W-1:0] be;
  } wentry_t;

  wentry_t          fifo [FIFO_D];
  logic [PW-1:0]    wp, rp;
  logic [FW-1:0]    fcnt;
  logic [7:0]       bytes [7];
  logic [2:0]       nb;
  logic [PIX_W-1:0] pix_left;
  addr_t            addr_q;
  logic             active;

  logic [2:0] nb_in;
  logic       push, pop, flush;
  wentry_t    push_e;
  logic [7:0] cat [7];

  // Buffer contents after appending this cycle's pixel.
  always_comb begin
    for (int i = 0; i < 7; i++) cat[i] = bytes[i];
    nb_in = nb;
    if (pix_valid) begin
      for (int j = 0; j < 3; j++) cat[int'(nb) + j] = pix[8*j +: 8];
      nb_in = nb + 3'd3;
    end
  end

  assign flush = active && pix_left == 0 && !pix_valid && nb != 0;
  assign push  = nb_in >= 3'd4 || flush;
  always_comb begin
    push_e.data = {cat[3], cat[2], cat[1], cat[0]};
    push_e.be   = flush ? BE_W'((1 << nb) - 1) : '1;
  end

  always_comb begin
    avm_req            = AVM_REQ_IDLE;
    avm_req.write      = fcnt != 0;
    avm_req.address    = addr_q;
    avm_req.writedata  = fifo[rp].data;
    avm_req.byteenable = fifo[rp].be;
  end
  assign pop  = avm_req.write && !avm_rsp.waitrequest;
  assign full = 32'(fcnt) >= FIFO_D - 2;

  // FIFO storage needs no reset.
  always_ff @(posedge clk) if (push && !go) fifo[wp] <= push_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      fcnt     <= '0;
      nb       <= '0;
      pix_left <= '0;
      addr_q   <= '0;
      active   <= 1'b0;
      done     <= 1'b0;
      for (int i = 0; i < 7; i++) bytes[i] <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        wp       <= '0;
        rp       <= '0;
        fcnt     <= '0;
        nb       <= '0;
        pix_left <= npix;
        addr_q   <= addr_t'(base_addr);
        active   <= 1'b1;
      end else begin
        if (pix_valid) pix_left <= pix_left - 1'b1;
        if (push) wp <= wp + 1'b1;
        if (pop) begin
          rp     <= rp + 1'b1;
          addr_q <= addr_q + 1'b1;
        end
        fcnt <= fcnt + FW'(push) - FW'(pop);
        // Keep what was not pushed, moved to the front of the buffer.
        if (flush) begin
          nb <= '0;
        end else if (push) begin
          for (int i = 0; i < 3; i++) bytes[i] <= cat[i + 4];
          nb <= nb_in - 3'd4;
        end else begin
          for (int i = 0; i < 7; i++) bytes[i] <= cat[i];
          nb <= nb_in;
        end
        if (active && pix_left == 0 && nb == 0 && fcnt == 0) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && !pop && 32'(fcnt) == FIFO_D));
  a_no_extra_pixel: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(pix_valid && (!active || pix_left == 0)));

endmodule
