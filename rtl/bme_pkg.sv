// Shared types and constants of the bit movement engine subsystem.
// The engine moves an arbitrary-length bit field between two bit addresses
// over a 32-bit word bus. This package holds the word and address widths,
// the engine's controller state encoding, the register map, and the AHB
// transfer type and signal bundles used by the bridge, fabric and top.
// Register layout, field widths and the ten controller states follow the
// published description; the encodings and the struct bundling are local
// choices.
package bme_pkg;

  localparam int unsigned DW       = 32;  // bus data / memory word width
  localparam int unsigned OFFW     = 5;   // bit offset inside a word
  localparam int unsigned WAW      = 30;  // master word address width (mADDR)
  localparam int unsigned BAW      = 37;  // bit address width: 32 low + 5 high
  localparam int unsigned LENW     = 27;  // block length width, in bits
  localparam int unsigned CNTW     = 24;  // enough for ceil((31 + 2^27-1)/32) + 1 words

  // Register indices on the slave interface (word addresses).
  localparam logic [2:0] REG_SRC_LO  = 3'd0;
  localparam logic [2:0] REG_SRC_HI  = 3'd1;  // [31:27] src high bits, [26:0] length
  localparam logic [2:0] REG_DST_LO  = 3'd2;
  localparam logic [2:0] REG_DST_HI  = 3'd3;  // [31:27] dst high bits
  localparam logic [2:0] REG_CTRL    = 3'd4;  // [2] error, [1] busy, [0] START

  // Controller states, one per bubble of the state diagram.
  typedef enum logic [3:0] {
    ST_ADDR_DECODE    = 4'd0,
    ST_ADDR_COMPUTE   = 4'd1,
    ST_READ_FIFO      = 4'd2,
    ST_COMPARE_OFFSET = 4'd3,
    ST_COMPUTE_CORNER = 4'd4,
    ST_COMPUTE_NORMAL = 4'd5,
    ST_WRITE_FIRST    = 4'd6,
    ST_WRITE_INTER    = 4'd7,
    ST_WRITE_LAST     = 4'd8,
    ST_DONE           = 4'd9
  } bme_state_t;

  // Tag of an outstanding master read.
  typedef enum logic [1:0] {
    TAG_SRC   = 2'd0,  // source word, goes to the FIFO
    TAG_FIRST = 2'd1,  // old contents of the first destination word
    TAG_LAST  = 2'd2   // old contents of the last destination word
  } rd_tag_t;

  // AHB transfer types. Only IDLE and NONSEQ are ever driven.
  typedef enum logic [1:0] {
    HT_IDLE   = 2'b00,
    HT_BUSY   = 2'b01,
    HT_NONSEQ = 2'b10,
    HT_SEQ    = 2'b11
  } htrans_t;

  // Master-to-slave AHB signals. hwdata belongs to the data phase.
  typedef struct packed {
    htrans_t        htrans;
    logic [31:0]    haddr;
    logic           hwrite;   // 1 = write, 0 = read
    logic [DW-1:0]  hwdata;
  } ahb_m2s_t;

  // Slave-to-master AHB signals.
  typedef struct packed {
    logic [DW-1:0]  hrdata;
    logic           hready;
  } ahb_s2m_t;

endpackage
