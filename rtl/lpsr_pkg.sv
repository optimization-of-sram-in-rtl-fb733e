// Shared types and constants of the low-power self-repair (LPSR) SRAM 64Kx32.
// The sizes follow the memory's name (65536 words of 32 bits); the number of
// redundant words and the fuse programming pulse length are this design's own
// choices, since the yield calculation that would fix them is not published.
package lpsr_pkg;
  localparam int unsigned ADDR_W      = 16;   // 64K words
  localparam int unsigned DATA_W      = 32;   // 32-bit words
  localparam int unsigned NUM_BANKS   = 8;    // 8 blocks of 8Kx32
  localparam int unsigned NUM_RAR     = 4;    // redundant words (own choice)
  localparam int unsigned ENTRY_W     = ADDR_W + 1;         // {valid, address}
  localparam int unsigned N_FUSE      = NUM_RAR * ENTRY_W;  // one fuse per RAR bit
  localparam int unsigned PRGM_CYCLES = 4;    // clocks per fuse blow pulse (own choice)

  // One memory access as seen at the SR SRAM boundary (Fig. 1: address,
  // control, data in). csb and the bits of wib are active low.
  typedef struct packed {
    logic              csb;   // chip select, 0 = access
    logic              rwb;   // 1 = read, 0 = write
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [DATA_W-1:0] wib;   // bit write mask, 0 = bit is written
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{csb: 1'b1, rwb: 1'b1, addr: '0, data: '0, wib: '1};

  // Operation modes of Table I.
  typedef enum logic [2:0] {
    MODE_MISSION      = 3'd0,
    MODE_SCAN         = 3'd1,
    MODE_MBIST_DEBUG  = 3'd2,
    MODE_MBIST_REPAIR = 3'd3,
    MODE_POWER_DOWN   = 3'd4
  } op_mode_t;

  // Power state of each domain of Table I (1 = on).
  typedef struct packed {
    logic mbist;      // mbist controller
    logic sram;       // SRAM + RDR
    logic rar;        // redundant address registers
    logic efuse;      // e-fuse box
    logic logic_on;   // surrounding logic
  } pwr_t;
endpackage
