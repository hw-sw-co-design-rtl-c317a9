// he_pkg: types and constants shared by the histogram-equalization accelerator
// and its memory-mapped framework.
//
// All bus addresses are 32-bit word addresses. The host map follows the
// register layout of the accelerator: words 0x00000-0x1FFFF are the on-chip
// image memory, words 0x20000-0x2000F the configuration slave. An Avalon-MM
// transfer is split into a request struct (master to slave) and a response
// struct (slave to master); every master/slave pair in the design uses the
// same pair of structs. Reads have a fixed latency of one cycle after the
// accepted request, with readdatavalid marking the returned word.
package he_pkg;

  // Pixel channel width (x in the text) and number of channels per pixel.
  localparam int unsigned X         = 8;
  localparam int unsigned W         = 1 << X;   // histogram bins per channel
  localparam int unsigned COLOR_NUM = 3;

  // Bus geometry.
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned BE_W      = DATA_W / 8;
  localparam int unsigned ADDR_W    = 18;       // word address, covers 0x00000-0x2000F
  localparam int unsigned MEM_AW    = 17;       // 0x00000-0x1FFFF
  localparam int unsigned REG_AW    = 4;        // 16 register words

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    addr_t             address;
    logic              read;
    logic              write;
    word_t             writedata;
    logic [BE_W-1:0]   byteenable;
  } avm_req_t;

  typedef struct packed {
    word_t             readdata;
    logic              readdatavalid;
    logic              waitrequest;
  } avm_rsp_t;

  localparam avm_req_t AVM_REQ_IDLE = '{address: '0, read: 1'b0, write: 1'b0,
                                        writedata: '0, byteenable: '0};

  // One pixel: three channels, channel 0 is the byte at the lowest address.
  typedef logic [COLOR_NUM*X-1:0] pixel_t;

  // Configuration slave register indices (word offsets from 0x20000).
  typedef enum logic [REG_AW-1:0] {
    REG_SRC_ADDR = 4'd0,
    REG_DST_ADDR = 4'd1,
    REG_LENGTH   = 4'd2,
    REG_HEIGHT   = 4'd3,
    REG_WIDTH    = 4'd4,
    REG_COMMAND  = 4'd5,
    REG_START    = 4'd6,
    REG_PTIME    = 4'd7,
    REG_STATUS   = 4'd8
  } reg_idx_e;

  localparam word_t CMD_EQUALIZE = 32'd1;

  // Status register bits.
  localparam int unsigned ST_BUSY    = 0;
  localparam int unsigned ST_DONE    = 1;
  localparam int unsigned ST_ERROR   = 2;

endpackage
