// Shared types and constants of the DETL instruction-fetch front end.
//
// The front end fetches 64-bit (8-byte) fetch blocks of a 32-bit RISC-V
// core with the compressed extension. A fetch request is the pair (PC, NPC)
// produced by the branch predictor: PC is where fetching starts inside an
// 8-byte block, NPC is the predicted start of the next block. The I-cache
// lookup modes (Parallel, Tag, ETL) are the three states of the DETL control
// path. Branch kinds and the branch-update record are this design's own
// encoding; the document does not give one.
package detl_pkg;

  localparam int unsigned XLEN        = 32;  // 32-bit processor
  localparam int unsigned FETCH_BYTES = 8;   // fetch width 8 bytes
  localparam int unsigned FETCH_BITS  = FETCH_BYTES * 8;
  localparam int unsigned FOFF_BITS   = $clog2(FETCH_BYTES);  // byte offset in a block

  typedef logic [XLEN-1:0]       addr_t;
  typedef logic [FETCH_BITS-1:0] fblock_t;

  // Lookup mode of the I-cache (states of the DETL control path)
  typedef enum logic [1:0] {
    MODE_PARALLEL = 2'd0,  // tag: PC, data: PC, all ways
    MODE_TAG      = 2'd1,  // tag: NPC, data: off
    MODE_ETL      = 2'd2   // tag: NPC, data: PC, matching way only
  } detl_mode_e;

  // Kind of control-transfer instruction recorded in the BTB
  typedef enum logic [1:0] {
    BR_COND = 2'd0,  // conditional branch, direction from the PHT
    BR_JUMP = 2'd1,  // unconditional jump
    BR_CALL = 2'd2,  // jump-and-link: pushes the return address
    BR_RET  = 2'd3   // return: target from the RAS
  } br_kind_e;

  // One entry of the look-ahead PC queue
  typedef struct packed {
    addr_t pc;   // first byte to fetch (2-byte aligned)
    addr_t npc;  // predicted start of the next fetch block
  } fetch_req_t;

  // One entry of the instruction queue
  typedef struct packed {
    addr_t   pc;    // first valid byte within the block
    addr_t   npc;   // predicted next PC, for the back end to verify
    fblock_t data;  // the 8-byte fetch block at pc & ~7
  } iq_entry_t;

  // Resolved control transfer reported by the back end
  typedef struct packed {
    addr_t    pc;      // address of the control-transfer instruction
    addr_t    target;  // its resolved target
    br_kind_e kind;
    logic     taken;
    logic     rvc;     // 1: 16-bit instruction, 0: 32-bit instruction
  } br_update_t;

endpackage
