// Checkpoint table: the replacement for the reorder buffer.
//
// The table is a circular list of checkpoints from the oldest to the
// youngest; there is always at least one. Each entry holds the Valid and
// Future Free vectors copied from the CAM register mapping when the
// checkpoint was taken (two bits per physical register), a counter of the
// instructions associated with it (every instruction belongs to the last
// checkpoint before it), the number of stores among them, and the PC of the
// first instruction after it, where execution resumes after a rollback.
//
// Commit: the oldest checkpoint commits when its counter is zero and a
// younger checkpoint exists. Its group of instructions is then complete and
// older than any possible rollback point, so the registers its instructions
// replaced can be released. Those are the Future Free bits copied into the
// next checkpoint, because the Future Free vector is cleared at every copy.
// The group's stores may be sent to memory (commit_stores). One checkpoint
// commits per cycle at most.
//
// Rollback to checkpoint c (the checkpoint of a mis-speculated instruction):
// every group from c to the youngest is squashed (squash_mask), c becomes the
// youngest with a zero counter and the restore values for the rename map are
// presented combinationally in the same cycle (rb_valid, rb_squashed_ff).
// Rollback wins over a commit, a new checkpoint and counter updates of the
// same cycle.
//
// Timing: everything updates on the clock edge; commit_* and rb_* outputs are
// combinational from the state and the inputs of the current cycle.
//
// Following the description: the two-bit-per-register copy, the per-checkpoint
// instruction counter decremented by finishing instructions, in-order commit
// at zero, release of Future Free registers and stores at commit, rollback to
// the checkpoint of the instruction. This design's own choices: a commit also
// needs a younger checkpoint to exist (its Future Free bits are only complete
// then), the store count kept per entry, the restart PC and the reset state
// (one checkpoint holding the reset mapping).
module checkpoint_table
  import cooo_pkg::*;
#(
  parameter int unsigned NCKPT    = 8,
  parameter int unsigned NPHYS    = 4096,
  parameter int unsigned W        = WIDTH,
  parameter int unsigned CNT_W    = 12,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // new checkpoint
  input  logic                   take,
  input  logic [NPHYS-1:0]       take_valid,
  input  logic [NPHYS-1:0]       take_ff,
  input  logic [31:0]            take_pc,
  output logic                   full,
  output ckpt_id_t               youngest,
  output ckpt_id_t               next_id,
  // instructions entering the groups this cycle: n_old/st_old join the
  // current youngest, n_new/st_new join the checkpoint taken this cycle
  input  logic [$clog2(W+1)-1:0] n_old,
  input  logic [$clog2(W+1)-1:0] st_old,
  input  logic [$clog2(W+1)-1:0] n_new,
  input  logic [$clog2(W+1)-1:0] st_new,
  // finished instructions
  input  logic [W-1:0]           fin_v,
  input  ckpt_id_t               fin_ckpt [W],
  // commit
  output logic                   commit_v,
  output ckpt_id_t               commit_id,
  output logic [NPHYS-1:0]       commit_free,
  output logic [CNT_W-1:0]       commit_stores,
  // rollback
  input  logic                   rb_req,
  input  ckpt_id_t               rb_ckpt,
  output logic [NPHYS-1:0]       rb_valid,
  output logic [NPHYS-1:0]       rb_squashed_ff,
  output logic [31:0]            rb_pc,
  output logic [NCKPT-1:0]       squash_mask,
  // state, for observation
  output logic [$clog2(NCKPT+1)-1:0] n_live,
  output logic [NCKPT-1:0]       live_o
);

  localparam int unsigned IW = $clog2(NCKPT);

  logic [NPHYS-1:0] snap_v  [NCKPT];
  logic [NPHYS-1:0] snap_ff [NCKPT];
  logic [CNT_W-1:0] cnt     [NCKPT];
  logic [CNT_W-1:0] stores  [NCKPT];
  logic [31:0]      pc      [NCKPT];
  logic [IW-1:0]    old_q, yng_q;
  logic [$clog2(NCKPT+1)-1:0] nlive_q;

  function automatic logic [IW-1:0] inc_id(input logic [IW-1:0] i);
    return (int'(i) == NCKPT - 1) ? '0 : i + 1'b1;
  endfunction

  // age of entry i counted from the oldest
  function automatic int unsigned age(input int unsigned i, input logic [IW-1:0] o);
    return (i + NCKPT - int'(o)) % NCKPT;
  endfunction

  assign full     = (int'(nlive_q) == NCKPT);
  assign youngest = ckpt_id_t'(yng_q);
  assign next_id  = ckpt_id_t'(inc_id(yng_q));
  assign n_live   = nlive_q;

  always_comb begin
    for (int i = 0; i < NCKPT; i++)
      live_o[i] = age(i, old_q) < int'(nlive_q);
  end

  // commit of the oldest
  assign commit_v      = !rb_req && nlive_q > 1 && cnt[old_q] == '0;
  assign commit_id     = ckpt_id_t'(old_q);
  assign commit_free   = snap_ff[inc_id(old_q)];
  assign commit_stores = stores[old_q];

  // rollback
  logic [IW-1:0] rb_idx;
  assign rb_idx   = rb_ckpt[IW-1:0];
  assign rb_valid = snap_v[rb_idx];
  assign rb_pc    = pc[rb_idx];

  always_comb begin
    rb_squashed_ff = '0;
    squash_mask    = '0;
    for (int i = 0; i < NCKPT; i++) begin
      if (age(i, old_q) < int'(nlive_q) && age(i, old_q) >= age(int'(rb_idx), old_q))
        squash_mask[i] = 1'b1;
      if (age(i, old_q) < int'(nlive_q) && age(i, old_q) > age(int'(rb_idx), old_q))
        rb_squashed_ff |= snap_ff[i];
    end
  end

  logic [IW-1:0] new_idx;
  assign new_idx = inc_id(yng_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      old_q   <= '0;
      yng_q   <= '0;
      nlive_q <= 1;
      for (int i = 0; i < NCKPT; i++) begin
        cnt[i]     <= '0;
        stores[i]  <= '0;
        pc[i]      <= RESET_PC;
        snap_ff[i] <= '0;
        for (int p = 0; p < NPHYS; p++) snap_v[i][p] <= (p < NLOG);
      end
    end else if (rb_req) begin
      yng_q        <= rb_idx;
      nlive_q      <= $bits(nlive_q)'(age(int'(rb_idx), old_q) + 1);
      cnt[rb_idx]    <= '0;
      stores[rb_idx] <= '0;
      for (int i = 0; i < NCKPT; i++)
        if (age(i, old_q) < int'(nlive_q) && age(i, old_q) < age(int'(rb_idx), old_q))
          cnt[i] <= cnt[i] - fin_count(i);
    end else begin
      for (int i = 0; i < NCKPT; i++) begin
        logic [CNT_W-1:0] c, s;
        c = cnt[i] - fin_count(i);
        s = stores[i];
        if (i == int'(yng_q)) begin
          c += CNT_W'(n_old);
          s += CNT_W'(st_old);
        end
        if (take && i == int'(new_idx)) begin
          c = CNT_W'(n_new);
          s = CNT_W'(st_new);
        end
        cnt[i]    <= c;
        stores[i] <= s;
      end
      if (take) begin
        snap_v[new_idx]  <= take_valid;
        snap_ff[new_idx] <= take_ff;
        pc[new_idx]      <= take_pc;
        yng_q            <= new_idx;
      end
      if (commit_v) old_q <= inc_id(old_q);
      nlive_q <= nlive_q + $bits(nlive_q)'(take) - $bits(nlive_q)'(commit_v);
    end
  end

  function automatic logic [CNT_W-1:0] fin_count(input int unsigned i);
    logic [CNT_W-1:0] n;
    n = '0;
    for (int k = 0; k < W; k++)
      if (fin_v[k] && int'(fin_ckpt[k]) == int'(i)) n++;
    return n;
  endfunction

  // A new checkpoint needs a free entry; counters never go below zero.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) (take && !rb_req) |-> !full || commit_v;
  endproperty
  a_no_overflow: assert property (p_no_overflow);

endmodule
