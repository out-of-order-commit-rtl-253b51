// CAM register mapping with Future Free bits.
//
// Register renaming without a reorder buffer. Each physical register has an
// entry holding the logical register it is mapped to, a Valid bit (this is the
// current mapping of that logical register), a Future Free bit (the mapping
// was replaced by a younger instruction since the last checkpoint and the
// register can be released when the checkpoint before it commits) and a Free
// List bit. A source operand is renamed by a CAM search for the entry whose
// logical field matches and whose Valid bit is set. A destination takes the
// first free register; the entry that held the old mapping loses its Valid bit
// and gains its Future Free bit.
//
// A checkpoint is a copy of the Valid and Future Free vectors, two bits per
// physical register; the Future Free vector is cleared after the copy. The
// copy is taken in the middle of a rename group, before instruction
// ckpt_pos, and handed to the checkpoint table on snap_*.
//
// Interface and timing:
//  * n_acc instructions (a prefix of in_inst) are renamed in the cycle they
//    are presented; psrc*/pdst outputs are combinational. Instructions of one
//    group see each other's destinations (intra-group bypass).
//  * alloc_ok says that W free registers exist; the caller must not rename
//    when it is low.
//  * free_v/free_mask return registers at checkpoint commit (next cycle).
//  * rb_v restores the Valid vector of a checkpoint. Registers held by the
//    squashed instructions return to the free list: those valid now, or
//    carrying a Future Free bit of a squashed group, that are not valid in the
//    restored copy. Rollback has priority; the caller renames nothing then.
//
// Following the description: the CAM organisation, the Valid/Future
// Free/Free List bits, the two-bit-per-register checkpoint and the clearing of
// Future Free after a copy. This design's own choices: first-free allocation,
// the reset mapping (logical r on physical r, all others free) and the
// rollback formula for returning squashed registers.
module cam_rename
  import cooo_pkg::*;
#(
  parameter int unsigned NPHYS = 4096,
  parameter int unsigned W     = WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // rename group
  input  dec_inst_t            in_inst [W],
  input  logic [$clog2(W+1)-1:0] n_acc,
  input  logic                 ckpt_take,
  input  logic [$clog2(W)-1:0] ckpt_pos,
  output logic                 alloc_ok,
  output ptag_t                psrc1 [W],
  output ptag_t                psrc2 [W],
  output ptag_t                pdst  [W],
  // checkpoint copy
  output logic [NPHYS-1:0]     snap_valid,
  output logic [NPHYS-1:0]     snap_ff,
  // release at checkpoint commit
  input  logic                 free_v,
  input  logic [NPHYS-1:0]     free_mask,
  // rollback
  input  logic                 rb_v,
  input  logic [NPHYS-1:0]     rb_valid,
  input  logic [NPHYS-1:0]     rb_squashed_ff,
  // state, for observation
  output logic [NPHYS-1:0]     valid_o,
  output logic [NPHYS-1:0]     ff_o,
  output logic [NPHYS-1:0]     freelist_o
);

  lreg_t            logical_q [NPHYS];
  logic [NPHYS-1:0] valid_q, ff_q, free_q;

  // First W free registers.
  ptag_t     alloc_tag [W];
  logic [W-1:0] alloc_found;

  always_comb begin
    int unsigned k;
    k = 0;
    for (int i = 0; i < W; i++) begin
      alloc_tag[i]   = '0;
      alloc_found[i] = 1'b0;
    end
    for (int p = 0; p < NPHYS; p++) begin
      if (free_q[p] && k < W) begin
        alloc_tag[k]   = ptag_t'(p);
        alloc_found[k] = 1'b1;
        k++;
      end
    end
  end

  assign alloc_ok = &alloc_found;

  // CAM search on the state at the start of the cycle.
  function automatic ptag_t cam_lookup(input lreg_t l, input logic [NPHYS-1:0] v,
                                       input lreg_t lg [NPHYS]);
    ptag_t r;
    r = '0;
    for (int p = 0; p < NPHYS; p++)
      if (v[p] && lg[p] == l) r |= ptag_t'(p);
    return r;
  endfunction

  ptag_t            old_map [W];
  logic [NPHYS-1:0] valid_d, ff_d, free_d;
  logic [W-1:0]     wr_en;
  ptag_t            wr_tag [W];
  lreg_t            wr_lreg [W];

  always_comb begin
    logic [NPHYS-1:0] v, f, fr;
    int unsigned      a;
    v  = valid_q;
    f  = ff_q;
    fr = free_q;
    a  = 0;
    snap_valid = valid_q;
    snap_ff    = ff_q;
    for (int j = 0; j < W; j++) begin
      psrc1[j]   = cam_lookup(in_inst[j].src1, valid_q, logical_q);
      psrc2[j]   = cam_lookup(in_inst[j].src2, valid_q, logical_q);
      old_map[j] = cam_lookup(in_inst[j].dst,  valid_q, logical_q);
      pdst[j]    = '0;
      wr_en[j]   = 1'b0;
      wr_tag[j]  = '0;
      wr_lreg[j] = in_inst[j].dst;
      // intra-group bypass: the youngest older writer wins
      for (int k = 0; k < j; k++) begin
        if (k < int'(n_acc) && in_inst[k].dst_v) begin
          if (in_inst[k].dst == in_inst[j].src1) psrc1[j]   = pdst[k];
          if (in_inst[k].dst == in_inst[j].src2) psrc2[j]   = pdst[k];
          if (in_inst[k].dst == in_inst[j].dst)  old_map[j] = pdst[k];
        end
      end
      if (ckpt_take && int'(ckpt_pos) == j) begin
        snap_valid = v;
        snap_ff    = f;
        f          = '0;
      end
      if (j < int'(n_acc) && in_inst[j].dst_v) begin
        pdst[j]          = alloc_tag[a];
        wr_en[j]         = 1'b1;
        wr_tag[j]        = alloc_tag[a];
        v[old_map[j]]    = 1'b0;
        f[old_map[j]]    = 1'b1;
        v[alloc_tag[a]]  = 1'b1;
        fr[alloc_tag[a]] = 1'b0;
        a++;
      end
    end
    if (rb_v) begin
      valid_d = rb_valid;
      ff_d    = '0;
      free_d  = free_q | ((valid_q | ff_q | rb_squashed_ff) & ~rb_valid);
    end else begin
      valid_d = v;
      ff_d    = f;
      free_d  = fr | (free_v ? free_mask : '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPHYS; p++) begin
        logical_q[p] <= lreg_t'(p % NLOG);
        valid_q[p]   <= (p < NLOG);
        free_q[p]    <= (p >= NLOG);
      end
      ff_q <= '0;
    end else begin
      valid_q <= valid_d;
      ff_q    <= ff_d;
      free_q  <= free_d;
      if (!rb_v)
        for (int j = 0; j < W; j++)
          if (wr_en[j]) logical_q[wr_tag[j]] <= wr_lreg[j];
    end
  end

  assign valid_o    = valid_q;
  assign ff_o       = ff_q;
  assign freelist_o = free_q;

endmodule
