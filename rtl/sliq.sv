// Slow Lane Instruction Queue (SLIQ).
//
// A large in-order buffer for instructions that depend on a long-latency
// load (a load that missed in L2). They are parked here instead of occupying
// the small instruction queue. The SLIQ needs no wakeup or select logic: it
// is a circular buffer written at the tail and read sequentially from one
// point, so it can be built as a RAM.
//
// Each entry carries the identifier of the long-latency load it waits for.
// A load table remembers, for each long-latency load, its destination
// register, its checkpoint and the tail position when it was found (its
// dependents can only be at or after that position). The identifier is the
// load-table slot plus a generation count of that slot, so it names one load
// instance even after its register has been freed and handed out again,
// which can happen while a dependent is still parked. An entry waits while
// its load is in the table. When the load's register is written (a fin
// broadcast), the load leaves the table and a wakening process starts: after
// PENALTY cycles (time to recompute operand availability) it walks from the
// load's position towards the tail, RATE entries per cycle, and sends every
// entry whose load has completed back to the instruction queue. A second
// load that completes during a walk is found by it if its position lies
// ahead of the walk; if it lies behind, the walk starts again from that
// position (after the penalty): every walk runs to the tail, so the new one
// also covers what the old one had still to visit. An entry written after
// its load has already completed is treated the same way, as a completion
// at its own position.
//
// An instruction can depend on two different long-latency loads but carries
// only one identifier. To keep it from going back to the instruction queue
// while its other producer is still parked (which could fill the queue with
// instructions that cannot issue), a bit per physical register marks the
// destinations of parked entries; the walk skips an entry whose source is
// marked, unless that producer is returned earlier in the same cycle. The
// producer is older, so the walk that returns it passes the entry later.
//
// Interface and timing:
//  * ins_v/ins_uop/ins_tag: up to W instructions per cycle, in program
//    order, written at the tail at the clock edge. space is the free count.
//  * ll_cand: loads that may become long-latency loads this cycle (at most
//    lt_space of them); ll_id gives, combinationally, the identifier each
//    would get, for the dependence mask to hand on to the dependents.
//  * ll_v/ll_tag/ll_ckpt: the long-latency loads actually entered (a subset
//    of ll_cand), in program order interleaved with ins_* (ll_pos gives, for
//    each, how many of this cycle's ins_v entries precede it). lt_space is the
//    free load-table count.
//  * fin: completion broadcast; a load leaves the table when its register is
//    written.
//  * re_v/re_uop: re-insertions to the instruction queue, combinational; at
//    most iq_room of them per cycle.
//  * squash: entries and loads of the checkpoints in squash_mask are removed.
//  * walking, wake_start, second_walk: status and one-cycle event pulses (a
//    walk is scheduled; a walk is restarted for an older load).
//
// Following the description: the in-order secondary buffer, the association
// of entries with the load's destination register, re-insertion at 4 per
// cycle after a 4-cycle start penalty, and a younger second load being
// found by the running walk. This design's own choices: restarting the walk
// for an older second load, the load table, its size and the identifiers, the walk examining RATE positions per cycle (an entry still
// waiting for another load is skipped and stays), the walk started for an
// entry whose load completed before it arrived, the parked-register bits,
// holes left by re-inserted or squashed entries until the head passes them.
module sliq
  import cooo_pkg::*;
#(
  parameter int unsigned SIZE    = 2048,
  parameter int unsigned W       = WIDTH,
  parameter int unsigned RATE    = 4,
  parameter int unsigned PENALTY = 4,
  parameter int unsigned NLT     = 16,
  parameter int unsigned NPHYS   = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // insertion
  input  logic [W-1:0]            ins_v,
  input  uop_t                    ins_uop [W],
  input  ptag_t                   ins_tag [W],
  output logic [$clog2(SIZE+1)-1:0] space,
  // long-latency loads
  input  logic [W-1:0]            ll_v,
  input  logic [W-1:0]            ll_cand,
  output ptag_t                   ll_id   [W],
  input  ptag_t                   ll_tag  [W],
  input  ckpt_id_t                ll_ckpt [W],
  input  logic [$clog2(W+1)-1:0]  ll_pos  [W],
  output logic [$clog2(NLT+1)-1:0] lt_space,
  // completion broadcast and register state
  input  done_t                   fin [W],
  // re-insertion
  input  logic [$clog2(RATE+1)-1:0] iq_room,
  output logic [RATE-1:0]         re_v,
  output uop_t                    re_uop [RATE],
  // squash
  input  logic                    squash,
  input  logic [NCKPT_MAX-1:0]    squash_mask,
  // status
  output logic                    walking,
  output logic                    wake_start,
  output logic                    second_walk
);

  localparam int unsigned AW = $clog2(SIZE);
  localparam int unsigned PW = AW + 1;
  localparam int unsigned CW = $clog2(PENALTY + 1);

  localparam int unsigned LW = (NLT > 1) ? $clog2(NLT) : 1;
  localparam int unsigned GW = PTAG_W - LW;

  typedef logic [PW-1:0] ptr_t;

  uop_t            ent_uop [SIZE];
  ptag_t           ent_tag [SIZE];
  logic [SIZE-1:0] vld_q;
  ptr_t            head_q, tail_q;

  // load table
  logic [NLT-1:0]  lt_v_q;
  ptag_t           lt_tag_q  [NLT];
  logic [GW-1:0]   lt_gen_q  [NLT];
  ptr_t            lt_pos_q  [NLT];
  ckpt_id_t        lt_ckpt_q [NLT];

  // one bit per physical register whose producer is parked here
  logic [NPHYS-1:0] pk_q;

  typedef enum logic [1:0] {IDLE, WAIT, WALK} wstate_e;
  wstate_e         st_q;
  logic [CW-1:0]   pen_q;
  ptr_t            walk_q;

  ptr_t count;
  assign count = tail_q - head_q;
  assign space = $bits(space)'(SIZE - int'(count));

  // positions relative to the head, for age comparisons
  function automatic ptr_t rel(input ptr_t p);
    return p - head_q;
  endfunction

  // a load's position once the head has moved past it: the head
  function automatic ptr_t clamp(input ptr_t p);
    return (rel(p) > count) ? head_q : p;
  endfunction

  always_comb begin
    lt_space = '0;
    for (int i = 0; i < NLT; i++) if (!lt_v_q[i]) lt_space++;
  end

  // an entry waits while the load instance its identifier names is pending
  function automatic logic waiting(input ptag_t id);
    logic [LW-1:0] sl;
    sl = id[LW-1:0];
    return int'(sl) < NLT && lt_v_q[sl] && lt_gen_q[sl] == id[PTAG_W-1:LW];
  endfunction

  // identifiers for this cycle's candidate loads: the k-th candidate gets
  // the k-th free load-table slot and that slot's next generation
  int unsigned ll_slot [W];
  always_comb begin
    int unsigned k, f;
    k = 0;
    for (int j = 0; j < W; j++) begin
      ll_slot[j] = 0;
      ll_id[j]   = '0;
      if (ll_cand[j]) begin
        f = 0;
        for (int i = 0; i < NLT; i++)
          if (!lt_v_q[i]) begin
            if (f == k) begin
              ll_slot[j] = i;
              ll_id[j]   = {lt_gen_q[i] + 1'b1, LW'(i)};
            end
            f++;
          end
        k++;
      end
    end
  end

  // walk: examine RATE positions from walk_q
  logic [RATE-1:0] re_hit;
  ptr_t            walk_next;

  // a source whose producer is still parked keeps an entry here, unless
  // the producer is returned earlier in the same cycle (rv/rd below)
  function automatic logic parked(input logic sv, input ptag_t r,
                                  input logic [RATE-1:0] rv, input ptag_t rd [RATE]);
    logic b;
    b = sv && pk_q[r];
    for (int k = 0; k < RATE; k++)
      if (rv[k] && rd[k] == r) b = 1'b0;
    return b;
  endfunction

  always_comb begin
    int unsigned n;
    ptr_t        p;
    logic [RATE-1:0] rv;
    ptag_t       rd [RATE];
    uop_t        u;
    n = 0;
    rv = '0;
    for (int i = 0; i < RATE; i++) rd[i] = '0;
    p = walk_q;
    walk_next = walk_q;
    re_hit = '0;
    for (int i = 0; i < RATE; i++) begin
      re_v[i]   = 1'b0;
      re_uop[i] = '0;
    end
    if (st_q == WALK && !squash) begin
      for (int i = 0; i < RATE; i++) begin
        p = walk_q + ptr_t'(i);
        if (rel(p) < count && walk_next == p) begin
          u = ent_uop[AW'(p)];
          if (vld_q[AW'(p)] && !waiting(ent_tag[AW'(p)]) &&
              !parked(u.d.src1_v, u.psrc1, rv, rd) && !parked(u.d.src2_v, u.psrc2, rv, rd)) begin
            if (n < int'(iq_room)) begin
              re_v[n]   = 1'b1;
              re_uop[n] = u;
              re_hit[i] = 1'b1;
              rv[i]     = u.d.dst_v;
              rd[i]     = u.pdst;
              n++;
              walk_next = p + 1'b1;
            end
          end else begin
            walk_next = p + 1'b1;
          end
        end
      end
    end
  end

  // load-table matches of this cycle's completions
  logic [NLT-1:0] lt_hit;
  always_comb begin
    lt_hit = '0;
    for (int i = 0; i < NLT; i++)
      for (int k = 0; k < W; k++)
        if (lt_v_q[i] && fin[k].valid && fin[k].dst_v && fin[k].pdst == lt_tag_q[i])
          lt_hit[i] = 1'b1;
  end

  // entries inserted this cycle whose load has already completed
  logic [W-1:0] ins_ready;
  always_comb
    for (int j = 0; j < W; j++) begin
      ins_ready[j] = !waiting(ins_tag[j]) || lt_hit[ins_tag[j][LW-1:0]];
    end

  assign walking = (st_q == WALK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q      <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      lt_v_q     <= '0;
      for (int i = 0; i < NLT; i++) lt_gen_q[i] <= '0;
      st_q       <= IDLE;
      pen_q      <= '0;
      walk_q     <= '0;
      wake_start <= 1'b0;
      second_walk <= 1'b0;
    end else begin
      logic [SIZE-1:0] v;
      logic [NLT-1:0]  ltv;
      logic            have;
      ptr_t            start, t;
      wstate_e         st;
      logic [CW-1:0]   pen;
      ptr_t            wk;

      v   = vld_q;
      ltv = lt_v_q;
      st  = st_q;
      pen = pen_q;
      wk  = walk_q;
      wake_start  <= 1'b0;
      second_walk <= 1'b0;

      // walk progress
      for (int i = 0; i < RATE; i++)
        if (re_hit[i]) v[AW'(walk_q + ptr_t'(i))] = 1'b0;
      if (st_q == WALK) begin
        wk = walk_next;
        if (rel(walk_next) >= count) st = IDLE;
      end else if (st_q == WAIT) begin
        if (pen_q <= 1) st = WALK;
        else pen = pen_q - 1'b1;
      end

      // completions of long-latency loads start walks
      have  = 1'b0;
      start = '0;
      for (int i = 0; i < NLT; i++)
        if (lt_hit[i]) begin
          ltv[i] = 1'b0;
          if (!have || rel(clamp(lt_pos_q[i])) < rel(start)) start = clamp(lt_pos_q[i]);
          have = 1'b1;
        end
      // so does an entry written when its load has already completed
      t = tail_q;
      if (!squash)
        for (int j = 0; j < W; j++)
          if (ins_v[j]) begin
            if (ins_ready[j] && (!have || rel(t) < rel(start))) begin
              start = t;
              have  = 1'b1;
            end
            t = t + 1'b1;
          end
      if (have) begin
        if (st == IDLE) begin
          st  = WAIT;
          pen = CW'(PENALTY);
          wk  = start;
          wake_start <= 1'b1;
        end else if (rel(start) < rel(wk)) begin
          // behind the walk: a new walk from there, which also covers
          // everything the current one had still to visit
          if (st == WALK) begin
            st  = WAIT;
            pen = CW'(PENALTY);
            second_walk <= 1'b1;
          end
          wk = start;
        end
        // ahead of the walk: it will be found
      end

      // insertion and load table
      t    = tail_q;
      if (!squash) begin
        for (int j = 0; j < W; j++)
          if (ins_v[j]) begin
            v[AW'(t)] = 1'b1;
            t = t + 1'b1;
          end
        for (int j = 0; j < W; j++)
          if (ll_v[j] && ll_cand[j]) begin
            ltv[ll_slot[j]]        = 1'b1;
            lt_tag_q[ll_slot[j]]  <= ll_tag[j];
            lt_gen_q[ll_slot[j]]  <= ll_id[j][PTAG_W-1:LW];
            lt_ckpt_q[ll_slot[j]] <= ll_ckpt[j];
            lt_pos_q[ll_slot[j]]  <= tail_q + ptr_t'(ll_pos[j]);
          end
      end else begin
        for (int e = 0; e < SIZE; e++)
          if (squash_mask[ent_uop[e].ckpt]) v[e] = 1'b0;
        for (int i = 0; i < NLT; i++)
          if (squash_mask[lt_ckpt_q[i]]) ltv[i] = 1'b0;
      end
      tail_q <= t;

      // the head passes holes
      begin
        ptr_t h;
        h = head_q;
        for (int i = 0; i < RATE; i++)
          if (h != t && !v[AW'(h)]) h = h + 1'b1;
        head_q <= h;
        // never let the walk fall behind the head
        if (st != IDLE && (wk - head_q) < (h - head_q)) wk = h;
      end

      vld_q      <= v;
      lt_v_q     <= ltv;
      st_q       <= st;
      pen_q      <= pen;
      walk_q     <= wk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_q <= '0;
    end else begin
      logic [NPHYS-1:0] pk;
      pk = pk_q;
      for (int i = 0; i < RATE; i++)
        if (re_hit[i] && ent_uop[AW'(walk_q + ptr_t'(i))].d.dst_v)
          pk[ent_uop[AW'(walk_q + ptr_t'(i))].pdst] = 1'b0;
      if (squash) begin
        for (int e = 0; e < SIZE; e++)
          if (vld_q[e] && squash_mask[ent_uop[e].ckpt] && ent_uop[e].d.dst_v)
            pk[ent_uop[e].pdst] = 1'b0;
      end else begin
        for (int j = 0; j < W; j++)
          if (ins_v[j] && ins_uop[j].d.dst_v) pk[ins_uop[j].pdst] = 1'b1;
      end
      pk_q <= pk;
    end
  end

  always_ff @(posedge clk) begin
    if (!squash) begin
      ptr_t t;
      t = tail_q;
      for (int j = 0; j < W; j++)
        if (ins_v[j]) begin
          ent_uop[AW'(t)] <= ins_uop[j];
          ent_tag[AW'(t)] <= ins_tag[j];
          t = t + 1'b1;
        end
    end
  end

endmodule
