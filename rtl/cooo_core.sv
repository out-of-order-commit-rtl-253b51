// Out-of-order-commit back end (top level).
//
// The rename, scheduling and retirement part of a superscalar processor that
// keeps thousands of instructions in flight without a large reorder buffer
// or a large instruction queue:
//  * cam_rename renames with a CAM map whose Future Free bits remember which
//    registers to release; checkpoint_table keeps up to 8 copies of that
//    state and commits a whole group of instructions at once when all of its
//    instructions have finished (out-of-order commit); ckpt_policy decides
//    where the checkpoints go.
//  * Every renamed instruction enters both the small issue_queue and the
//    pseudo_rob FIFO. When an instruction leaves the pseudo-ROB, a load
//    still waiting for its value is a long-latency load; ll_dep_mask finds
//    the instructions that depend on one, and those are taken out of the
//    instruction queue and parked in order in the sliq. When the load's
//    register is written, the SLIQ puts them back into the queue.
//
// Interface and timing (W = 4 instructions per cycle):
//  * decode: dec_n instructions (a prefix of dec_inst) are offered; dec_take
//    of them are accepted in the same cycle (combinational).
//  * issue: iss_v/iss_uop, combinational, always accepted by the execution
//    side. Results return on fin (destination tag, checkpoint and sequence
//    number of the finished instruction).
//  * rb_req/rb_ckpt report a mis-speculated instruction and its checkpoint.
//    In that cycle the groups in squash_mask are squashed, rb_pc is where
//    fetch restarts and nothing is decoded. The execution side must drop
//    its in-flight instructions of those groups and report no fin for them.
//  * commit_v/commit_id/commit_stores: a checkpoint commits; its stores may
//    be written to memory.
//  * ev_* are one-cycle event pulses or counts for statistics.
//
// Following the description: the blocks and how they are connected,
// the sizes of the main configuration (8 checkpoints, 128-entry pseudo-ROB
// and instruction queue, 2048-entry SLIQ, 4096 physical registers, 4-wide).
// This design's own choices: a single unified instruction queue, SLIQ
// re-insertion served before decode in the queue (decode waits for four
// slots beyond the re-inserted ones, so re-insertion is never starved), a long-latency load treated as an
// ordinary one while the load table is full, forced pseudo-ROB extraction
// while decode waits for queue space, and the external interfaces.
module cooo_core
  import cooo_pkg::*;
#(
  parameter int unsigned NPHYS      = 4096,
  parameter int unsigned NCKPT      = 8,
  parameter int unsigned PROB_SIZE  = 128,
  parameter int unsigned IQ_SIZE    = 128,
  parameter int unsigned SLIQ_SIZE  = 2048,
  parameter int unsigned SLIQ_RATE  = 4,
  parameter int unsigned SLIQ_PEN   = 4,
  parameter int unsigned NLT        = 16,
  parameter int unsigned BR_THRESH  = 64,
  parameter int unsigned MAX_INSTS  = 512,
  parameter int unsigned MAX_STORES = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // decode
  input  dec_inst_t                  dec_inst [WIDTH],
  input  logic [$clog2(WIDTH+1)-1:0] dec_n,
  input  logic                       force_ckpt,
  input  logic                       drain,
  output logic [$clog2(WIDTH+1)-1:0] dec_take,
  // issue and completion
  output logic [WIDTH-1:0]           iss_v,
  output uop_t                       iss_uop [WIDTH],
  input  done_t                      fin [WIDTH],
  // mis-speculation
  input  logic                       rb_req,
  input  ckpt_id_t                   rb_ckpt,
  output logic [31:0]                rb_pc,
  output logic [NCKPT_MAX-1:0]       squash_mask,
  // commit
  output logic                       commit_v,
  output ckpt_id_t                   commit_id,
  output logic [11:0]                commit_stores,
  // events
  output logic                       ev_ckpt,
  output logic                       ev_ckpt_branch,
  output logic                       ev_ckpt_insts,
  output logic                       ev_ckpt_stores,
  output logic                       ev_ckpt_full_stall,
  output logic [$clog2(WIDTH+1)-1:0] ev_ll_loads,
  output logic [$clog2(WIDTH+1)-1:0] ev_moved,
  output logic [$clog2(SLIQ_RATE+1)-1:0] ev_reinserted,
  output logic                       ev_walk_start,
  output logic                       ev_second_walk
);

  localparam int unsigned W    = WIDTH;
  localparam int unsigned NW   = $clog2(W+1);
  localparam int unsigned NINS = W + SLIQ_RATE;

  // ---------------------------------------------------------------- state
  logic [NPHYS-1:0] ready;

  function automatic logic fin_now(input ptag_t t, input done_t f [W]);
    logic r;
    r = 1'b0;
    for (int k = 0; k < W; k++)
      if (f[k].valid && f[k].dst_v && f[k].pdst == t) r = 1'b1;
    return r;
  endfunction

  // ---------------------------------------------------------------- decode
  logic                 alloc_ok;
  ptag_t                psrc1 [W], psrc2 [W], pdst [W];
  logic [NPHYS-1:0]     snap_valid, snap_ff;
  logic [NW-1:0]        n_acc, n_old, st_old, n_new, st_new, n_lim;
  logic                 ckpt_take;
  logic [$clog2(W)-1:0] ckpt_pos;
  logic                 why_b, why_i, why_s;
  logic                 tbl_full;
  ckpt_id_t             youngest, next_id;
  seq_t                 next_seq;
  logic [$clog2(PROB_SIZE+1)-1:0] prob_space;
  logic [NW-1:0]        n_ext;

  logic [NINS-1:0]          iq_ins_v, iq_rdy1, iq_rdy2, iq_slot_ok;
  uop_t                     iq_ins_uop [NINS];
  logic [$clog2(IQ_SIZE)-1:0] iq_slot [NINS];
  logic [$clog2(IQ_SIZE+1)-1:0] iq_free;

  logic                 rb_any;
  assign rb_any = rb_req;

  // queue slots: SLIQ re-insertions take the first free slots, decode the
  // ones after them (all four or none)
  logic [$clog2(SLIQ_RATE+1)-1:0] n_re;
  logic                 room_iq, room_prob, decode_room;
  assign room_iq    = int'(iq_free) >= int'(n_re) + W;
  assign room_prob  = int'(prob_space) + int'(n_ext) >= W;
  assign decode_room = alloc_ok && room_iq && room_prob && !rb_any;
  assign n_lim      = decode_room ? NW'(W) : '0;

  ckpt_policy #(
    .W(W), .BR_THRESH(BR_THRESH), .MAX_INSTS(MAX_INSTS), .MAX_STORES(MAX_STORES)
  ) u_policy (
    .clk, .rst_n,
    .in_inst(dec_inst), .n_in(dec_n), .n_lim,
    .force_ckpt, .table_full(tbl_full), .rb(rb_any),
    .n_acc, .ckpt_take, .ckpt_pos, .n_old, .st_old, .n_new, .st_new,
    .why_branch(why_b), .why_insts(why_i), .why_stores(why_s)
  );

  assign dec_take = n_acc;

  // checkpoint table outputs used by rename
  logic                 cm_v;
  ckpt_id_t             cm_id;
  logic [NPHYS-1:0]     cm_free;
  logic [11:0]          cm_stores;
  logic [NPHYS-1:0]     rb_valid, rb_sq_ff;
  logic [NCKPT-1:0]     sq_mask;
  logic [$clog2(NCKPT+1)-1:0] n_live;
  logic [NCKPT-1:0]     live;

  logic [NPHYS-1:0] v_o, ff_o, fl_o;

  cam_rename #(.NPHYS(NPHYS), .W(W)) u_rename (
    .clk, .rst_n,
    .in_inst(dec_inst), .n_acc, .ckpt_take, .ckpt_pos,
    .alloc_ok, .psrc1, .psrc2, .pdst,
    .snap_valid, .snap_ff,
    .free_v(cm_v), .free_mask(cm_free),
    .rb_v(rb_any), .rb_valid, .rb_squashed_ff(rb_sq_ff),
    .valid_o(v_o), .ff_o(ff_o), .freelist_o(fl_o)
  );

  ckpt_id_t fin_ckpt [W];
  logic [W-1:0] fin_v;
  always_comb
    for (int k = 0; k < W; k++) begin
      fin_v[k]    = fin[k].valid;
      fin_ckpt[k] = fin[k].ckpt;
    end

  checkpoint_table #(.NCKPT(NCKPT), .NPHYS(NPHYS), .W(W), .CNT_W(12)) u_ckpt (
    .clk, .rst_n,
    .take(ckpt_take), .take_valid(snap_valid), .take_ff(snap_ff),
    .take_pc(dec_inst[ckpt_pos].pc),
    .full(tbl_full), .youngest, .next_id,
    .n_old, .st_old, .n_new, .st_new,
    .fin_v, .fin_ckpt,
    .commit_v(cm_v), .commit_id(cm_id), .commit_free(cm_free), .commit_stores(cm_stores),
    .rb_req(rb_any), .rb_ckpt, .rb_valid, .rb_squashed_ff(rb_sq_ff), .rb_pc,
    .squash_mask(sq_mask), .n_live, .live_o(live)
  );

  always_comb begin
    squash_mask = '0;
    squash_mask[NCKPT-1:0] = rb_any ? sq_mask : '0;
  end

  assign commit_v      = cm_v;
  assign commit_id     = cm_id;
  assign commit_stores = cm_stores;

  // renamed group
  uop_t         dec_uop [W];
  logic [W-1:0] alloc_v;
  always_comb begin
    for (int j = 0; j < W; j++) begin
      dec_uop[j].d     = dec_inst[j];
      dec_uop[j].psrc1 = psrc1[j];
      dec_uop[j].psrc2 = psrc2[j];
      dec_uop[j].pdst  = pdst[j];
      dec_uop[j].ckpt  = (ckpt_take && j >= int'(ckpt_pos)) ? next_id : youngest;
      dec_uop[j].seq   = next_seq + seq_t'(j);
      alloc_v[j]       = j < int'(n_acc) && dec_inst[j].dst_v && !rb_any;
    end
  end

  preg_ready #(.NPHYS(NPHYS), .W(W)) u_ready (
    .clk, .rst_n, .alloc_v, .alloc_tag(pdst), .fin, .ready
  );

  // operand readiness of a decoded instruction: not written by an older
  // instruction of the same group, and ready in the table or finishing now
  function automatic logic src_ready(input int j, input logic sv, input ptag_t t);
    logic r;
    r = !sv || ready[t] || fin_now(t, fin);
    for (int k = 0; k < W; k++)
      if (k < j && dec_inst[k].dst_v && pdst[k] == t && sv) r = 1'b0;
    return r;
  endfunction

  // ---------------------------------------------------------------- SLIQ side
  logic [SLIQ_RATE-1:0] re_v;
  uop_t                 re_uop [SLIQ_RATE];
  logic [$clog2(SLIQ_RATE+1)-1:0] iq_room;

  // The queue's insertion ports are filled in order: first the n_re
  // re-insertions (re_v is a prefix), then the decoded group, so insertion
  // port k always receives the k-th free slot.
  assign iq_room = (int'(iq_free) < SLIQ_RATE) ? $bits(iq_room)'(iq_free)
                                                : $bits(iq_room)'(SLIQ_RATE);
  always_comb begin
    n_re = '0;
    for (int i = 0; i < SLIQ_RATE; i++)
      if (re_v[i]) n_re++;
  end

  logic [$clog2(IQ_SIZE)-1:0] dec_slot [W];
  always_comb begin
    for (int i = 0; i < NINS; i++) begin
      iq_ins_v[i]   = 1'b0;
      iq_ins_uop[i] = '0;
      iq_rdy1[i]    = 1'b0;
      iq_rdy2[i]    = 1'b0;
    end
    for (int i = 0; i < SLIQ_RATE; i++)
      if (i < int'(n_re)) begin
        iq_ins_v[i]   = 1'b1;
        iq_ins_uop[i] = re_uop[i];
        iq_rdy1[i]    = !re_uop[i].d.src1_v || ready[re_uop[i].psrc1] ||
                        fin_now(re_uop[i].psrc1, fin);
        iq_rdy2[i]    = !re_uop[i].d.src2_v || ready[re_uop[i].psrc2] ||
                        fin_now(re_uop[i].psrc2, fin);
      end
    for (int j = 0; j < W; j++) begin
      dec_slot[j] = iq_slot[int'(n_re) + j];
      if (j < int'(n_acc) && !rb_any) begin
        iq_ins_v[int'(n_re) + j]   = 1'b1;
        iq_ins_uop[int'(n_re) + j] = dec_uop[j];
        iq_rdy1[int'(n_re) + j]    = src_ready(j, dec_inst[j].src1_v, psrc1[j]);
        iq_rdy2[int'(n_re) + j]    = src_ready(j, dec_inst[j].src2_v, psrc2[j]);
      end
    end
  end

  // ---------------------------------------------------------------- pseudo-ROB
  logic [W-1:0] ext_v, ext_done, ext_ll_raw, ext_ll;
  uop_t         ext_uop [W];
  logic [$clog2(IQ_SIZE)-1:0] ext_slot [W];
  logic [$clog2(SLIQ_SIZE+1)-1:0] sliq_space;
  logic [$clog2(NLT+1)-1:0] lt_space;
  logic ext_allow;

  assign ext_allow = int'(sliq_space) >= W && !rb_any;

  uop_t         push_uop [W];
  logic [$clog2(IQ_SIZE)-1:0] push_slot [W];
  always_comb
    for (int j = 0; j < W; j++) begin
      push_uop[j]  = dec_uop[j];
      push_slot[j] = dec_slot[j];
    end

  pseudo_rob #(.SIZE(PROB_SIZE), .W(W), .IQ_SIZE(IQ_SIZE)) u_prob (
    .clk, .rst_n,
    .next_seq, .space(prob_space),
    .n_push(rb_any ? '0 : n_acc), .push_uop, .push_iq_slot(push_slot),
    .fin,
    .ext_allow, .drain(drain || (!room_iq && dec_n != 0)),
    .ext_v, .ext_uop, .ext_iq_slot(ext_slot), .ext_done, .ext_ll_load(ext_ll_raw),
    .n_ext,
    .squash_mask, .squash(rb_any)
  );

  dec_inst_t ext_inst [W];
  ptag_t     ext_pdst [W];
  // a long-latency load needs a load-table entry; when the table is full it
  // is treated as an ordinary instruction and its dependents stay queued
  always_comb begin
    int unsigned nll;
    nll = 0;
    for (int j = 0; j < W; j++) begin
      ext_inst[j] = ext_uop[j].d;
      ext_pdst[j] = ext_uop[j].pdst;
      ext_ll[j]   = ext_v[j] && ext_ll_raw[j] && ext_uop[j].d.dst_v &&
                    !ready[ext_uop[j].pdst] && !fin_now(ext_uop[j].pdst, fin) &&
                    nll < int'(lt_space);
      if (ext_ll[j]) nll++;
    end
  end

  logic [W-1:0] dep, ll_new;
  ptag_t        dep_tag [W], ll_id [W];
  ll_dep_mask #(.W(W)) u_mask (
    .clk, .rst_n,
    .ext_v, .ext_inst, .ext_pdst(ll_id), .ext_ll_load(ext_ll), .ext_done,
    .rb(rb_any), .dep, .ll(ll_new), .dep_tag, .mask_o()
  );

  // move to the SLIQ: invalidate in the queue, insert from the pseudo-ROB
  logic [W-1:0] inv_v, inv_ok;
  seq_t         inv_seq [W];
  always_comb
    for (int j = 0; j < W; j++) begin
      inv_v[j]   = dep[j];
      inv_seq[j] = ext_uop[j].seq;
    end

  logic [NW-1:0] ll_pos [W];
  always_comb begin
    logic [NW-1:0] c;
    c = '0;
    for (int j = 0; j < W; j++) begin
      ll_pos[j] = c;
      if (inv_ok[j]) c++;
    end
  end

  ckpt_id_t ll_ckpt [W];
  always_comb
    for (int j = 0; j < W; j++) ll_ckpt[j] = ext_uop[j].ckpt;

  logic walking, walk_start, second_walk;
  sliq #(
    .SIZE(SLIQ_SIZE), .W(W), .RATE(SLIQ_RATE), .PENALTY(SLIQ_PEN), .NLT(NLT), .NPHYS(NPHYS)
  ) u_sliq (
    .clk, .rst_n,
    .ins_v(inv_ok), .ins_uop(ext_uop), .ins_tag(dep_tag), .space(sliq_space),
    .ll_cand(ext_ll), .ll_id, .ll_v(ll_new), .ll_tag(ext_pdst), .ll_ckpt, .ll_pos, .lt_space,
    .fin,
    .iq_room, .re_v, .re_uop,
    .squash(rb_any), .squash_mask,
    .walking, .wake_start(walk_start), .second_walk
  );

  // ---------------------------------------------------------------- queue
  logic [W-1:0] q_iss_v;
  uop_t         q_iss_uop [W];

  issue_queue #(.SIZE(IQ_SIZE), .W(W), .NINS(NINS)) u_iq (
    .clk, .rst_n,
    .ins_v(iq_ins_v), .ins_uop(iq_ins_uop), .ins_rdy1(iq_rdy1), .ins_rdy2(iq_rdy2),
    .ins_slot(iq_slot), .ins_slot_ok(iq_slot_ok), .n_free(iq_free),
    .fin,
    .iss_v(q_iss_v), .iss_uop(q_iss_uop),
    .inv_v, .inv_slot(ext_slot), .inv_seq, .inv_ok,
    .squash(rb_any), .squash_mask
  );

  always_comb
    for (int j = 0; j < W; j++) begin
      iss_v[j]   = q_iss_v[j] && !(rb_any && squash_mask[q_iss_uop[j].ckpt]);
      iss_uop[j] = q_iss_uop[j];
    end

  // ---------------------------------------------------------------- events
  always_comb begin
    ev_ckpt            = ckpt_take && !rb_any;
    ev_ckpt_branch     = ev_ckpt && why_b;
    ev_ckpt_insts      = ev_ckpt && why_i;
    ev_ckpt_stores     = ev_ckpt && why_s;
    ev_ckpt_full_stall = tbl_full && dec_n != 0 && n_acc != dec_n && decode_room;
    ev_ll_loads        = '0;
    ev_moved           = '0;
    ev_reinserted      = '0;
    for (int j = 0; j < W; j++) begin
      if (ll_new[j]) ev_ll_loads++;
      if (inv_ok[j]) ev_moved++;
    end
    for (int i = 0; i < SLIQ_RATE; i++)
      if (re_v[i]) ev_reinserted++;
    ev_walk_start  = walk_start;
    ev_second_walk = second_walk;
  end

endmodule
