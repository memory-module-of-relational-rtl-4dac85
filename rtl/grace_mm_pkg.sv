// grace_mm_pkg: constants and types shared by the bubble memory module controller.
//
// Geometry of the two-level bubble chip (buffer loop 128 bits, main loop 4096 bits,
// 140 loops per subchip, 32 subchips read in parallel) follows the pilot module. A record
// occupies two adjacent rows of a loop, so one record descriptor memory (RDM) word covers
// one "slot" of two field rotations: 64 slots in the buffer loop, 2048 in the main loop.
// Lengths named BL, BL0, GL and RL are counted in field rotations (major line bit
// positions); slot counts are half of them.
//
// The 16-bit RDM entry layout and the host command encoding are this design's own choice.
package grace_mm_pkg;

  // Loop geometry (field rotations)
  localparam int BL        = 128;  // buffer loop length
  localparam int BL0       = 40;   // swap gate to major line along the buffer loop
  localparam int GL        = 40;   // generator to leftmost loop (set equal to BL0)
  localparam int NB_SLOTS  = 64;   // RDM words for the buffer loop
  localparam int NM_SLOTS  = 2048; // RDM words for the main loop
  localparam int ML_SLOTS  = 2046; // record slots on a main loop (4092 bits / 2)
  localparam int LOOPS_MAX = 140;  // loops per subchip
  localparam int RLMAX     = 2 * LOOPS_MAX; // longest physical record, rotations
  localparam int NSUB      = 32;   // 16 chips x 2 subchips
  localparam int NOPS      = 16;   // search operands
  localparam int KEYW      = 12;   // descriptor (hash / logical address) width

  // RDM entry, 16 bits
  typedef struct packed {
    logic            valid;  // a record is stored in this slot
    logic            done;   // record already replicated out in the current read
    logic [1:0]      tag;    // memory management tag
    logic [KEYW-1:0] key;    // hash value or logical address
  } rdm_entry_t;

  localparam rdm_entry_t RDM_EMPTY = '0;

  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_READ  = 2'd1,
    MODE_WRITE = 2'd2,
    MODE_CLEAR = 2'd3
  } mode_e;

  // BR/T gate action
  typedef enum logic [1:0] {
    BRT_NONE = 2'd0,
    BRT_OUT  = 2'd1,  // transfer a buffer record onto the major line
    BRT_REPL = 2'd2,  // replicate it (record stays in the buffer loop)
    BRT_IN   = 2'd3   // transfer a record from the major line into the buffer loop
  } brt_op_e;

  // Host commands
  typedef enum logic [2:0] {
    CMD_NOP      = 3'd0,
    CMD_GEOMETRY = 3'd1, // arg: [7:0] loops per record, [23:8] bytes per record
    CMD_OPERAND  = 3'd2, // arg: [3:0] index, [15:4] key, [31:16] record count
    CMD_READ     = 3'd3, // arg: [4:0] number of operands, [5] replicate
    CMD_WRITE    = 3'd4, // arg: [15:0] number of records
    CMD_CLEAR    = 3'd5, // arg: [0] 1 = clear only the done flags
    CMD_ABORT    = 3'd6,
    CMD_PULSE    = 3'd7  // arg: [7:0] phase, [15:8] width of the gate pulses
  } cmd_e;

endpackage
