// onchip_memory: true dual-port image memory with byte enables.
//
// Holds the source image sent by the host and the result written back by the
// accelerator. The two ports are independent so that one pixel stream can be
// read while the result stream is written, as the framework requires. Each
// port reads and writes 32-bit words; a write updates only the bytes whose
// byteenable bit is set. Reads are synchronous: data for an address presented
// with rd=1 appears on rdata one clock later. A read and a write to the same
// word in the same cycle return the old contents. Writes to the same word from
// both ports in one cycle are not arbitrated (port B lands last); the
// interconnect never issues them.
//
// Default size 131072 words x 32 bits (512 KiB) matches the 0x00000-0x1FFFF
// word range of the host map; the port arrangement and read latency are this
// design's choice.
module onchip_memory #(
  parameter int unsigned DEPTH  = 131072,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned BE_W  = DATA_W / 8
) (
  input  logic              clk,
  // port A
  input  logic              a_rd,
  input  logic              a_wr,
  input  logic [AW-1:0]     a_addr,
  input  logic [BE_W-1:0]   a_be,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic              b_rd,
  input  logic              b_wr,
  input  logic [AW-1:0]     b_addr,
  input  logic [BE_W-1:0]   b_be,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  // One process for both ports: a variable may be written by one always_ff only.
  always_ff @(posedge clk) begin
    if (a_rd) a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
    for (int i = 0; i < int'(BE_W); i++) begin
      if (a_wr && a_be[i]) mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
      if (b_wr && b_be[i]) mem[b_addr][i*8 +: 8] <= b_wdata[i*8 +: 8];
    end
  end

endmodule
