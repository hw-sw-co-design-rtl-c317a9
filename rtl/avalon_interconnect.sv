// avalon_interconnect: the memory-mapped fabric that joins the PCIe bridge,
// the accelerator's two DMA masters, the dual-port memory and the
// configuration slave.
//
// Three Avalon-MM masters meet two slaves:
//   host (the PCIe Avalon-MM bridge) reaches both memory ports and the
//     configuration registers; words 0x00000-0x1FFFF decode to the memory,
//     words 0x20000-0x2000F (address bit 17 set) to the register file;
//   read master  reads the memory through port A;
//   write master writes the memory through port B.
// Host memory reads also use port A and host memory writes port B. When the
// host and a DMA master want the same port in the same cycle the host wins and
// the DMA master sees waitrequest, so the host is never stalled. This is how
// the write master observes bus saturation and pauses the accelerator.
// Reads of both slaves return exactly one cycle after the request is accepted
// and readdatavalid is routed back to the master that issued them.
// The text names the fabric and its endpoints; the port assignment, fixed
// host priority and address decode granularity are this design's choices.
module avalon_interconnect
  import he_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // master side
  input  avm_req_t host_req,
  output avm_rsp_t host_rsp,
  input  avm_req_t rm_req,
  output avm_rsp_t rm_rsp,
  input  avm_req_t wm_req,
  output avm_rsp_t wm_rsp,
  // memory port A
  output logic              mem_a_rd,
  output logic              mem_a_wr,
  output logic [MEM_AW-1:0] mem_a_addr,
  output logic [BE_W-1:0]   mem_a_be,
  output word_t             mem_a_wdata,
  input  word_t             mem_a_rdata,
  // memory port B
  output logic              mem_b_rd,
  output logic              mem_b_wr,
  output logic [MEM_AW-1:0] mem_b_addr,
  output logic [BE_W-1:0]   mem_b_be,
  output word_t             mem_b_wdata,
  input  word_t             mem_b_rdata,
  // configuration slave (readdata is registered inside the slave)
  output logic              reg_rd,
  output logic              reg_wr,
  output logic [REG_AW-1:0] reg_addr,
  output word_t             reg_wdata,
  input  word_t             reg_rdata
);

  logic host_reg, host_mem_rd, host_mem_wr;
  logic rm_grant, wm_grant;
  logic host_mem_rd_q, host_reg_rd_q, rm_rd_q;

  assign host_reg    = host_req.address[MEM_AW];
  assign host_mem_rd = host_req.read  && !host_reg;
  assign host_mem_wr = host_req.write && !host_reg;

  // Port A: host memory reads first, otherwise the read master.
  assign rm_grant = rm_req.read && !host_mem_rd;
  always_comb begin
    mem_a_rd    = host_mem_rd || rm_grant;
    mem_a_wr    = 1'b0;
    mem_a_addr  = host_mem_rd ? host_req.address[MEM_AW-1:0] : rm_req.address[MEM_AW-1:0];
    mem_a_be    = '1;
    mem_a_wdata = '0;
  end

  // Port B: host memory writes first, otherwise the write master.
  assign wm_grant = wm_req.write && !host_mem_wr;
  always_comb begin
    mem_b_rd    = 1'b0;
    mem_b_wr    = host_mem_wr || wm_grant;
    mem_b_addr  = host_mem_wr ? host_req.address[MEM_AW-1:0] : wm_req.address[MEM_AW-1:0];
    mem_b_be    = host_mem_wr ? host_req.byteenable : wm_req.byteenable;
    mem_b_wdata = host_mem_wr ? host_req.writedata  : wm_req.writedata;
  end

  // Register file.
  assign reg_rd    = host_req.read  && host_reg;
  assign reg_wr    = host_req.write && host_reg;
  assign reg_addr  = host_req.address[REG_AW-1:0];
  assign reg_wdata = host_req.writedata;

  // Track which master owns the word returning next cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_mem_rd_q <= 1'b0;
      host_reg_rd_q <= 1'b0;
      rm_rd_q       <= 1'b0;
    end else begin
      host_mem_rd_q <= host_mem_rd;
      host_reg_rd_q <= reg_rd;
      rm_rd_q       <= rm_grant;
    end
  end

  // mem_b_rdata is unused: port B only ever writes in this arrangement.
  always_comb begin
    host_rsp.readdata      = host_reg_rd_q ? reg_rdata : mem_a_rdata;
    host_rsp.readdatavalid = host_mem_rd_q || host_reg_rd_q;
    host_rsp.waitrequest   = 1'b0;

    rm_rsp.readdata        = mem_a_rdata;
    rm_rsp.readdatavalid   = rm_rd_q;
    rm_rsp.waitrequest     = rm_req.read && host_mem_rd;

    wm_rsp.readdata        = mem_b_rdata;
    wm_rsp.readdatavalid   = 1'b0;
    wm_rsp.waitrequest     = wm_req.write && host_mem_wr;
  end

  // Avalon-MM rules the masters must keep.
  a_host_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(host_req.read && host_req.write));
  a_rm_read_only: assert property (@(posedge clk) disable iff (!rst_n) !rm_req.write);
  a_wm_write_only: assert property (@(posedge clk) disable iff (!rst_n) !wm_req.read);

endmodule
