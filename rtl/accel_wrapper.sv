// accel_wrapper: FPGA side of the PCIe accelerator framework with the
// histogram-equalization core plugged in.
//
// The host reaches this wrapper through the Avalon-MM master of the PCIe
// bridge, brought out here as host_req/host_rsp (word addresses):
//   0x00000-0x1FFFF  on-chip image memory (dual port, 32-bit words)
//   0x20000-0x2000F  configuration slave registers
// A run: the host writes the packed 24-bit image into memory, writes source
// and target address, length in words, height, width and command 1 into the
// registers, then writes 1 to the start register. The core makes two passes
// over the image through the read master (histogram, then remapping) and
// hands the remapped pixels to the write master, which stores them at the
// target address. The host polls the status register (bit 1 done) and reads
// back the result and the process-time register (cycles from start to done).
// Source and target may be the same region: the write master always trails
// the read master in the second pass.
// Host accesses take priority in the interconnect; a DMA master that collides
// with one waits. Host reads return one cycle after the request.
// The block structure follows the framework diagram; the PCIe hard IP and its
// Avalon-MM bridge are vendor parts outside this RTL.
module accel_wrapper
  import he_pkg::*;
#(
  parameter int unsigned MEM_DEPTH  = 131072,   // image memory words
  parameter int unsigned PIX_W      = 18,       // bits of a pixel count
  parameter int unsigned DIVIDEND_W = 40        // divider width and pipeline steps
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t host_req,
  output avm_rsp_t host_rsp,
  output logic     busy,
  output logic     done
);

  avm_req_t rm_req, wm_req;
  avm_rsp_t rm_rsp, wm_rsp;

  logic              mem_a_rd, mem_a_wr, mem_b_rd, mem_b_wr;
  logic [MEM_AW-1:0] mem_a_addr, mem_b_addr;
  logic [BE_W-1:0]   mem_a_be, mem_b_be;
  word_t             mem_a_wdata, mem_a_rdata, mem_b_wdata, mem_b_rdata;

  logic              reg_rd, reg_wr;
  logic [REG_AW-1:0] reg_addr;
  word_t             reg_wdata, reg_rdata;

  logic              start;
  word_t             src_addr, dst_addr, length;
  logic [PIX_W-1:0]  npix;

  logic   rd_go, wr_go, read_done, write_done, write_full;
  pixel_t pix_in, pix_out;
  logic   pix_in_valid, pix_in_ready, pix_out_valid;

  avalon_interconnect u_ic (
    .clk, .rst_n,
    .host_req, .host_rsp,
    .rm_req, .rm_rsp,
    .wm_req, .wm_rsp,
    .mem_a_rd, .mem_a_wr, .mem_a_addr, .mem_a_be, .mem_a_wdata, .mem_a_rdata,
    .mem_b_rd, .mem_b_wr, .mem_b_addr, .mem_b_be, .mem_b_wdata, .mem_b_rdata,
    .reg_rd, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata
  );

  onchip_memory #(.DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_mem (
    .clk,
    .a_rd(mem_a_rd), .a_wr(mem_a_wr), .a_addr(mem_a_addr[$clog2(MEM_DEPTH)-1:0]),
    .a_be(mem_a_be), .a_wdata(mem_a_wdata), .a_rdata(mem_a_rdata),
    .b_rd(mem_b_rd), .b_wr(mem_b_wr), .b_addr(mem_b_addr[$clog2(MEM_DEPTH)-1:0]),
    .b_be(mem_b_be), .b_wdata(mem_b_wdata), .b_rdata(mem_b_rdata)
  );

  config_slave #(.MEM_DEPTH(MEM_DEPTH), .PIX_W(PIX_W)) u_cfg (
    .clk, .rst_n,
    .reg_rd, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .start, .src_addr, .dst_addr, .length, .npix,
    .busy, .done
  );

  read_master #(.PIX_W(PIX_W)) u_rm (
    .clk, .rst_n,
    .go(rd_go), .base_addr(src_addr), .length, .npix,
    .avm_req(rm_req), .avm_rsp(rm_rsp),
    .pix(pix_in), .pix_valid(pix_in_valid), .pix_ready(pix_in_ready),
    .done(read_done)
  );

  write_master #(.PIX_W(PIX_W)) u_wm (
    .clk, .rst_n,
    .go(wr_go), .base_addr(dst_addr), .npix,
    .pix(pix_out), .pix_valid(pix_out_valid), .full(write_full),
    .avm_req(wm_req), .avm_rsp(wm_rsp),
    .done(write_done)
  );

  hist_equalizer #(.PIX_W(PIX_W), .DIVIDEND_W(DIVIDEND_W)) u_core (
    .clk, .rst_n,
    .start, .npix, .busy, .done,
    .rd_go, .pix_in, .pix_in_valid, .pix_in_ready, .read_done,
    .wr_go, .pix_out, .pix_out_valid, .write_full, .write_done
  );

endmodule
