// config_slave: Avalon-MM register file through which the host configures,
// starts and monitors the accelerator.
//
// Sixteen 32-bit registers at word offsets 0..15 of the register window:
//   0 source image address (memory word)   5 command (1 = equalize)
//   1 target image address (memory word)   6 start: writing 1 starts a run
//   2 image length in 32-bit words         7 process time in cycles (read only)
//   3 pixel height                         8 status (read only)
//   4 pixel width                          9..15 unused, read as 0
// The layout and meaning of the registers follow the host register map; the
// checks below and the status encoding are this design's own.
// A write of 1 to the start register while idle starts the accelerator only if
// the configuration is usable: command 1, at least one pixel, length*4 bytes
// covering the 3*height*width bytes of the packed 24-bit pixels, and both
// images inside the memory. Otherwise the error bit is set and nothing starts.
// Status: bit 0 busy, bit 1 done (set when a run ends, cleared by the next
// start), bit 2 error (set by a refused start, cleared by the next start).
// The process-time register counts the cycles from the start pulse to the end
// of the run. Reads return data one cycle after reg_rd.
module config_slave
  import he_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 131072,
  parameter int unsigned PIX_W     = 18        // bits of a pixel count
) (
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic              reg_rd,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] reg_addr,
  input  word_t             reg_wdata,
  output word_t             reg_rdata,
  // to the accelerator
  output logic              start,
  output word_t             src_addr,
  output word_t             dst_addr,
  output word_t             length,
  output logic [PIX_W-1:0]  npix,
  // from the accelerator
  input  logic              busy,
  input  logic              done
);

  word_t regs_src, regs_dst, regs_len, regs_h, regs_w, regs_cmd;
  word_t ptime;
  logic  st_done, st_err;
  logic [63:0] npix_full;      // height*width, registered
  logic  cfg_ok, start_req;

  assign src_addr = regs_src;
  assign dst_addr = regs_dst;
  assign length   = regs_len;
  assign npix     = npix_full[PIX_W-1:0];

  assign start_req = reg_wr && reg_addr == REG_START && reg_wdata[0] && !busy;

  // Usable configuration: all comparisons in 64 bits so nothing wraps.
  always_comb begin
    cfg_ok = (regs_cmd == CMD_EQUALIZE)
          && (npix_full != 64'd0)
          && (npix_full < (64'd1 << PIX_W))
          && (64'd3 * npix_full <= 64'd4 * 64'(regs_len))
          && (64'(regs_src) + 64'(regs_len) <= 64'(MEM_DEPTH))
          && (64'(regs_dst) + 64'(regs_len) <= 64'(MEM_DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs_src  <= '0;
      regs_dst  <= '0;
      regs_len  <= '0;
      regs_h    <= '0;
      regs_w    <= '0;
      regs_cmd  <= '0;
      npix_full <= '0;
      ptime     <= '0;
      st_done   <= 1'b0;
      st_err    <= 1'b0;
      start     <= 1'b0;
      reg_rdata <= '0;
    end else begin
      npix_full <= 64'(regs_h) * 64'(regs_w);
      start     <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_SRC_ADDR: regs_src <= reg_wdata;
          REG_DST_ADDR: regs_dst <= reg_wdata;
          REG_LENGTH:   regs_len <= reg_wdata;
          REG_HEIGHT:   regs_h   <= reg_wdata;
          REG_WIDTH:    regs_w   <= reg_wdata;
          REG_COMMAND:  regs_cmd <= reg_wdata;
          default: ;  // start handled below; the rest is read only or unused
        endcase
      end
      if (start_req) begin
        st_done <= 1'b0;
        st_err  <= !cfg_ok;
        start   <= cfg_ok;
        if (cfg_ok) ptime <= '0;
      end else if (busy) begin
        ptime <= ptime + 1'b1;
      end
      if (done) st_done <= 1'b1;
      if (reg_rd) begin
        unique case (reg_addr)
          REG_SRC_ADDR: reg_rdata <= regs_src;
          REG_DST_ADDR: reg_rdata <= regs_dst;
          REG_LENGTH:   reg_rdata <= regs_len;
          REG_HEIGHT:   reg_rdata <= regs_h;
          REG_WIDTH:    reg_rdata <= regs_w;
          REG_COMMAND:  reg_rdata <= regs_cmd;
          REG_PTIME:    reg_rdata <= ptime;
          REG_STATUS:   reg_rdata <= word_t'({st_err, st_done || done, busy || start});
          default:      reg_rdata <= '0;
        endcase
      end
    end
  end

endmodule
