// Shared types and constants of the out-of-order-commit back end.
//
// The back end replaces the reorder buffer with a small table of checkpoints
// and replaces a large instruction queue with a small queue plus an in-order
// Slow Lane Instruction Queue (SLIQ). This package holds the instruction
// records that travel between those blocks. Tag widths are fixed here at the
// sizes of the main configuration (4096 physical registers, 32 logical
// registers, 8 checkpoints); the blocks take their entry counts as parameters
// and may be built smaller than these widths allow, never larger.
//
// The instruction record is this design's own: it carries what the blocks
// need (register names, instruction class, a PC to restart from) and leaves
// the operation itself as opaque bits for the execution units.
package cooo_pkg;

  // Widths fixed at the main configuration.
  localparam int unsigned LREG_W = 5;    // 32 logical registers
  localparam int unsigned NLOG   = 32;
  localparam int unsigned PTAG_W = 12;   // up to 4096 physical registers
  localparam int unsigned CKPT_W = 3;    // up to 8 checkpoints
  localparam int unsigned NCKPT_MAX = 1 << CKPT_W;
  localparam int unsigned SEQ_W  = 16;   // instruction sequence number
  localparam int unsigned OP_W   = 8;    // opaque operation bits

  // Decode/rename/commit width of the main configuration.
  localparam int unsigned WIDTH  = 4;

  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [PTAG_W-1:0] ptag_t;
  typedef logic [CKPT_W-1:0] ckpt_id_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  // A decoded instruction as it arrives at rename.
  typedef struct packed {
    logic [31:0]   pc;
    logic [OP_W-1:0] op;
    logic          is_load;
    logic          is_store;
    logic          is_branch;
    logic          src1_v;
    lreg_t         src1;
    logic          src2_v;
    lreg_t         src2;
    logic          dst_v;
    lreg_t         dst;
  } dec_inst_t;

  // A renamed instruction: decoded fields plus physical tags, the checkpoint
  // it belongs to and its sequence number (its pseudo-ROB slot is the low
  // bits of the sequence number).
  typedef struct packed {
    dec_inst_t     d;
    ptag_t         psrc1;
    ptag_t         psrc2;
    ptag_t         pdst;
    ckpt_id_t      ckpt;
    seq_t          seq;
  } uop_t;

  // A completed instruction, reported by the execution units.
  typedef struct packed {
    logic          valid;
    logic          dst_v;
    ptag_t         pdst;
    ckpt_id_t      ckpt;
    seq_t          seq;
  } done_t;

endpackage
