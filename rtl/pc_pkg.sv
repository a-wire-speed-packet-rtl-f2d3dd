// pc_pkg: types and constants shared by the packet capture modules.
//
// The packet bus carries one 64-bit data word and one 8-bit control word per
// clock, as in the NetFPGA user data path.  A control word of zero marks
// packet data; a non-zero control word before the data marks a module header
// (0xFF is the I/O queue header that carries the one-hot destination port in
// bits 63:48); a non-zero control word after the data has started marks the
// last word of the packet.  The field positions follow the NetFPGA
// framework's conventions; the register offsets are this design's own
// numbering of the six table registers and the hit counter, in the order the
// register map lists them.
package pc_pkg;

  localparam int unsigned DATA_W = 64;
  localparam int unsigned CTRL_W = 8;

  // Filter window: 8 words of 8 bytes, i.e. the first 64 bytes of the packet.
  localparam int unsigned FILTER_WORDS = 8;
  localparam int unsigned WORD_IDX_W   = $clog2(FILTER_WORDS);

  // I/O queue module header.
  localparam logic [CTRL_W-1:0] IO_QUEUE_STAGE_NUM = 8'hFF;
  localparam int unsigned       IOQ_DST_PORT_POS   = 48;   // bits 63:48
  localparam int unsigned       PORT_W             = 16;   // one-hot port field

  // Destination MAC address: the first six bytes of data word 0.
  localparam int unsigned DST_MAC_POS = 16;                // bits 63:16
  localparam int unsigned MAC_W       = 48;

  // One word of the packet bus as stored in the FIFO (72 bits).
  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;
    logic [DATA_W-1:0] data;
  } pkt_word_t;

  // Register bus (NetFPGA-style daisy chain of register blocks).
  localparam int unsigned REG_ADDR_W = 23;
  localparam int unsigned REG_DATA_W = 32;
  localparam int unsigned REG_SRC_W  = 2;
  localparam int unsigned REG_OFF_W  = 6;                  // 64-register block
  localparam int unsigned REG_TAG_W  = REG_ADDR_W - REG_OFF_W;

  typedef struct packed {
    logic                  req;
    logic                  ack;
    logic                  rd_wr_L;   // 1 = read, 0 = write
    logic [REG_ADDR_W-1:0] addr;
    logic [REG_DATA_W-1:0] data;
    logic [REG_SRC_W-1:0]  src;
  } reg_bus_t;

  // Register offsets within the block.
  typedef enum logic [REG_OFF_W-1:0] {
    REG_ENTRY_DATA_HI = 6'd0,
    REG_ENTRY_DATA_LO = 6'd1,
    REG_ENTRY_MASK_HI = 6'd2,
    REG_ENTRY_MASK_LO = 6'd3,
    REG_WR_ADDR       = 6'd4,
    REG_RD_ADDR       = 6'd5,
    REG_PORT_NUM_HITS = 6'd6
  } reg_off_e;

endpackage
