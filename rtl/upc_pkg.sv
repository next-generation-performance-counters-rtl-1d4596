// upc_pkg: constants and types shared by the hybrid performance counter unit.
//
// Each 64-bit counter is split into a 12-bit low-order part held in flip-flops and a
// 52-bit high-order part held in a 256-entry SRAM. 256 counters each pick one of four
// event lines, so the unit watches 1024 events. The sizes below are the unit's own
// numbers; the bit layout of the configuration fields and the address map offsets of the
// start/stop and threshold registers are this design's choice.
package upc_pkg;

  localparam int unsigned UPC_N_COUNTERS   = 256; // concurrently counted events
  localparam int unsigned UPC_IN_PER_CNT   = 4;   // event lines each counter can select from
  localparam int unsigned UPC_LOW_W        = 12;  // low-order bits in flip-flops
  localparam int unsigned UPC_HIGH_W       = 52;  // high-order bits in the SRAM
  localparam int unsigned UPC_CNT_W        = UPC_LOW_W + UPC_HIGH_W; // 64
  localparam int unsigned UPC_DATA_W       = 64;  // memory-mapped register width
  localparam int unsigned UPC_ADDR_W       = 12;  // byte offset inside the unit
  localparam int unsigned UPC_CFG_FIELD_W  = 8;   // bits of a configuration register per counter

  // Byte offsets of the memory map.
  localparam logic [UPC_ADDR_W-1:0] UPC_ADDR_COUNTERS  = 12'h000; // 256 x 8 bytes, up to 0x7F8
  localparam logic [UPC_ADDR_W-1:0] UPC_ADDR_CONFIG    = 12'h800; // 32 x 8 bytes, up to 0x8F8
  localparam logic [UPC_ADDR_W-1:0] UPC_ADDR_STARTSTOP = 12'h900;
  localparam logic [UPC_ADDR_W-1:0] UPC_ADDR_THRESHOLD = 12'h910;

  // Signal-level mode of one counter's input.
  typedef enum logic [1:0] {
    MODE_LEVEL_HIGH = 2'b00, // count every cycle the event is 1
    MODE_LEVEL_LOW  = 2'b01, // count every cycle the event is 0
    MODE_RISE       = 2'b10, // count 0->1 transitions
    MODE_FALL       = 2'b11  // count 1->0 transitions
  } upc_mode_e;

  // One counter's configuration field; the low 5 bits of its 8-bit field in a
  // configuration register, int_en in the most significant of them.
  typedef struct packed {
    logic      int_en; // threshold interrupt enable
    upc_mode_e mode;   // signal-level mode
    logic [1:0] sel;   // which of the four associated event lines
  } upc_cfg_t;

  localparam int unsigned UPC_CFG_W = $bits(upc_cfg_t);

endpackage
