// End-to-end test environment for cooo_core, shared by the reduced-size and
// the full-size testbench.
//
// It generates a random program, fetches it into the core four instructions
// a cycle, executes what the core issues and reports results on fin, and
// plays the roles of the parts around the back end:
//  * execution units: 1 cycle for ALU operations, branches and stores; loads
//    hit the first-level cache (2 cycles), the second level (12 cycles) or go
//    to memory (MISS_LAT cycles);
//  * branch resolution: a branch marked mispredicted is, when it executes the
//    first time, reported as a rollback to its checkpoint instead of a
//    result; fetch restarts at rb_pc and every in-flight instruction of a
//    squashed group is dropped. The second time the branch is correct;
//  * end of program: the last fetched instruction gets a forced checkpoint so
//    that everything before it can commit; the pseudo-ROB is drained.
// The program runs in phases (ordinary code with frequent branches, long
// branch-free stretches, store-heavy code) so that each of the three
// checkpoint rules is used.
//
// Checks, independent of the core's internals:
//  * an instruction issues only after every instruction it reads a register
//    from has finished (producer found in the program text, not via renaming),
//    so renaming, rollback recovery, wakeup and SLIQ re-insertion are checked
//    together; an instruction finishes at most once per fetch;
//  * every commit releases exactly the next instructions in program order,
//    all finished, and reports their number of stores;
//  * the whole program commits, and no instruction is left in flight;
//  * every mechanism happened: checkpoints for each of the three reasons, a
//    stall on a full checkpoint table, commits, rollbacks, long-latency loads,
//    moves to the SLIQ, re-insertions, walks and a second walk.
// FULL selects the core's default parameters (no parameter list at all);
// otherwise the reduced sizes below are used.
module cooo_core_env
  import cooo_pkg::*;
#(
  parameter bit          FULL       = 1'b0,
  parameter int unsigned NPHYS      = 512,
  parameter int unsigned NCKPT      = 8,
  parameter int unsigned PROB_SIZE  = 32,
  parameter int unsigned IQ_SIZE    = 32,
  parameter int unsigned SLIQ_SIZE  = 256,
  parameter int unsigned NLT        = 16,
  parameter int unsigned BR_THRESH  = 16,
  parameter int unsigned MAX_INSTS  = 64,
  parameter int unsigned MAX_STORES = 16,
  parameter int unsigned MISS_LAT   = 150,
  parameter int unsigned NPROG      = 4000,
  parameter int unsigned MAXCYC     = 200000
) ();

  localparam int unsigned W = WIDTH;
  localparam int unsigned NW = $clog2(W+1);

  logic clk = 0, rst_n = 0;
  dec_inst_t dec_inst [W];
  logic [NW-1:0] dec_n, dec_take;
  logic force_ckpt, drain;
  logic [W-1:0] iss_v;
  uop_t iss_uop [W];
  done_t fin [W];
  logic rb_req;
  ckpt_id_t rb_ckpt;
  logic [31:0] rb_pc;
  logic [NCKPT_MAX-1:0] squash_mask;
  logic commit_v;
  ckpt_id_t commit_id;
  logic [11:0] commit_stores;
  logic ev_ckpt, ev_b, ev_i, ev_s, ev_full, ev_walk, ev_second;
  logic [NW-1:0] ev_ll, ev_moved;
  logic [2:0] ev_re;

  if (FULL) begin : g_full
    cooo_core dut (
      .clk, .rst_n, .dec_inst, .dec_n, .force_ckpt, .drain, .dec_take,
      .iss_v, .iss_uop, .fin, .rb_req, .rb_ckpt, .rb_pc, .squash_mask,
      .commit_v, .commit_id, .commit_stores,
      .ev_ckpt, .ev_ckpt_branch(ev_b), .ev_ckpt_insts(ev_i), .ev_ckpt_stores(ev_s),
      .ev_ckpt_full_stall(ev_full), .ev_ll_loads(ev_ll), .ev_moved,
      .ev_reinserted(ev_re), .ev_walk_start(ev_walk), .ev_second_walk(ev_second)
    );
  end else begin : g_small
    cooo_core #(
      .NPHYS(NPHYS), .NCKPT(NCKPT), .PROB_SIZE(PROB_SIZE), .IQ_SIZE(IQ_SIZE),
      .SLIQ_SIZE(SLIQ_SIZE), .NLT(NLT), .BR_THRESH(BR_THRESH), .MAX_INSTS(MAX_INSTS),
      .MAX_STORES(MAX_STORES)
    ) dut (
      .clk, .rst_n, .dec_inst, .dec_n, .force_ckpt, .drain, .dec_take,
      .iss_v, .iss_uop, .fin, .rb_req, .rb_ckpt, .rb_pc, .squash_mask,
      .commit_v, .commit_id, .commit_stores,
      .ev_ckpt, .ev_ckpt_branch(ev_b), .ev_ckpt_insts(ev_i), .ev_ckpt_stores(ev_s),
      .ev_ckpt_full_stall(ev_full), .ev_ll_loads(ev_ll), .ev_moved,
      .ev_reinserted(ev_re), .ev_walk_start(ev_walk), .ev_second_walk(ev_second)
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------------------------------------------------------- program
  dec_inst_t prog    [NPROG+1];
  int        prod1   [NPROG+1];   // producer of each source, -1: initial value
  int        prod2   [NPROG+1];
  bit        mispred [NPROG+1];
  int        fin_cyc [NPROG+1];   // cycle of the last finish, -1: not finished

  task automatic gen_program();
    int last_wr [NLOG];
    for (int r = 0; r < NLOG; r++) last_wr[r] = -1;
    for (int p = 0; p <= NPROG; p++) begin
      int phase, k;
      dec_inst_t d;
      phase = (p / int'(2 * MAX_INSTS)) % 3;
      k = $urandom % 100;
      d = '0;
      d.pc = 32'(p);
      d.op = 8'($urandom);
      // 0: ordinary code, 1: no branches, 2: store heavy
      if (phase == 0) begin
        d.is_branch = k < 12;
        d.is_load   = k >= 12 && k < 40;
        d.is_store  = k >= 40 && k < 50;
      end else if (phase == 1) begin
        d.is_load   = k < 30;
        d.is_store  = k >= 30 && k < 36;
      end else begin
        d.is_branch = k < 1;
        d.is_load   = k >= 1 && k < 20;
        d.is_store  = k >= 20 && k < 70;
      end
      d.src1_v = !d.is_load || ($urandom % 2 == 0);
      d.src1   = lreg_t'($urandom % 16);
      d.src2_v = !d.is_branch && ($urandom % 3 != 0);
      d.src2   = lreg_t'($urandom % 16);
      d.dst_v  = !d.is_branch && !d.is_store;
      d.dst    = lreg_t'($urandom % 16);
      if (p == NPROG) d = '{pc: 32'(p), default: '0};   // end marker
      prog[p]    = d;
      prod1[p]   = d.src1_v ? last_wr[d.src1] : -1;
      prod2[p]   = d.src2_v ? last_wr[d.src2] : -1;
      mispred[p] = d.is_branch && ($urandom % 10 == 0);
      fin_cyc[p] = -1;
      if (d.dst_v) last_wr[d.dst] = p;
    end
  endtask

  // ---------------------------------------------------------------- execution
  typedef struct {
    uop_t uop;
    int   done;
  } flight_t;
  flight_t flight [$];
  int      grp [NCKPT_MAX][$];    // finished program positions per group
  int      fp = 0;                // fetch position
  int      next_commit = 0;

  int n_ckpt = 0, n_b = 0, n_i = 0, n_s = 0, n_full = 0, n_commit = 0, n_rb = 0;
  int n_ll = 0, n_moved = 0, n_re = 0, n_walk = 0, n_second = 0, n_fin = 0;
  int last_commit = 0;

  function automatic int load_lat();
    int k;
    k = $urandom % 100;
    if (k < 8) return int'(MISS_LAT) + int'($urandom % 50);
    if (k < 20) return 12;
    return 2;
  endfunction

  task automatic cycle();
    done_t f [W];
    int nf, br, take, rpc;
    bit rb;
    // results that are due, oldest-due first, at most W
    nf = 0; br = -1; rb = 0;
    for (int k = 0; k < W; k++) f[k] = '0;
    rb_req = 0; rb_ckpt = '0;
    foreach (flight[i])
      if (flight[i].done <= cyc && nf < W) begin
        int p;
        p = int'(flight[i].uop.d.pc);
        if (mispred[p] && (br < 0 || p < br)) br = p;
        nf++;
      end
    if (br >= 0) begin
      foreach (flight[i])
        if (int'(flight[i].uop.d.pc) == br) rb_ckpt = flight[i].uop.ckpt;
      rb_req = 1;
      rb = 1;
      mispred[br] = 0;
    end
    #1;
    // drop squashed in-flight work, then pick the results of this cycle
    if (rb) begin
      for (int i = flight.size() - 1; i >= 0; i--)
        if (squash_mask[flight[i].uop.ckpt]) flight.delete(i);
    end
    nf = 0;
    for (int i = 0; i < flight.size() && nf < W; ) begin
      if (flight[i].done <= cyc) begin
        uop_t u;
        u = flight[i].uop;
        f[nf] = '{valid: 1'b1, dst_v: u.d.dst_v, pdst: u.pdst, ckpt: u.ckpt, seq: u.seq};
        check(fin_cyc[int'(u.d.pc)] < 0, "finishes once per fetch");
        fin_cyc[int'(u.d.pc)] = cyc;
        grp[u.ckpt].push_back(int'(u.d.pc));
        n_fin++;
        nf++;
        flight.delete(i);
      end else i++;
    end
    fin = f;
    // fetch
    dec_n = '0; force_ckpt = 0;
    for (int j = 0; j < W; j++) begin
      dec_inst[j] = '0;
      if (fp + j < NPROG || (fp == NPROG && j == 0)) begin
        dec_inst[j] = prog[fp + j];
        dec_n++;
      end
    end
    force_ckpt = (fp == NPROG);
    drain = (fp >= NPROG);
    #1;
    // issue: operands must have been produced in an earlier cycle
    for (int j = 0; j < W; j++)
      if (iss_v[j]) begin
        int p;
        flight_t e;
        p = int'(iss_uop[j].d.pc);
        check(p <= NPROG && iss_uop[j].d == prog[p], "issued instruction is the program's");
        check(prod1[p] < 0 || (fin_cyc[prod1[p]] >= 0 && fin_cyc[prod1[p]] < cyc),
              "first source produced before issue");
        check(prod2[p] < 0 || (fin_cyc[prod2[p]] >= 0 && fin_cyc[prod2[p]] < cyc),
              "second source produced before issue");
        e.uop  = iss_uop[j];
        e.done = cyc + (prog[p].is_load ? load_lat() : 1);
        flight.push_back(e);
      end
    // commit: the next instructions in program order, all finished
    if (commit_v) begin
      int g [$];
      int st;
      g = grp[commit_id];
      g.sort();
      st = 0;
      check(g.size() > 0, "a committed group is not empty");
      foreach (g[i]) begin
        check(g[i] == next_commit + i, "commit in program order");
        if (prog[g[i]].is_store) st++;
      end
      check(int'(commit_stores) == st, "store count of the group");
      next_commit += g.size();
      grp[commit_id].delete();
      n_commit++;
      last_commit = cyc;
    end
    if (rb) begin
      for (int c = 0; c < NCKPT_MAX; c++)
        if (squash_mask[c]) grp[c].delete();
      for (int p = int'(rb_pc); p <= NPROG; p++) fin_cyc[p] = -1;
      check(int'(rb_pc) <= br && int'(rb_pc) >= next_commit, "restart point");
      n_rb++;
    end
    if (ev_ckpt) n_ckpt++;
    if (ev_b) n_b++;
    if (ev_i) n_i++;
    if (ev_s) n_s++;
    if (ev_full) n_full++;
    n_ll += int'(ev_ll);
    n_moved += int'(ev_moved);
    n_re += int'(ev_re);
    if (ev_walk) n_walk++;
    if (ev_second) n_second++;
    take = int'(dec_take);
    rpc  = int'(rb_pc);
    @(posedge clk);
    #1;
    cyc++;
    if (rb) fp = rpc;
    else fp += take;
  endtask

  initial begin
    #(64'(MAXCYC) * 10 + 1000);
    failures++;
    $display("watchdog expired at cycle %0d, committed %0d of %0d", cyc, next_commit, NPROG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen_program();
    for (int k = 0; k < W; k++) begin fin[k] = '0; dec_inst[k] = '0; end
    dec_n = '0; force_ckpt = 0; drain = 0; rb_req = 0; rb_ckpt = '0;
    #12 rst_n = 1;
    @(posedge clk);
    #1;
    while (next_commit < NPROG && cyc - last_commit < 20000) cycle();
    check(next_commit == NPROG, "whole program committed");
    check(flight.size() == 0, "nothing left in flight");
    check(n_b > 0, "checkpoint at a branch");
    check(n_i > 0, "checkpoint after the instruction limit");
    check(n_s > 0, "checkpoint after the store limit");
    check(n_full > 0, "stall on a full checkpoint table");
    check(n_commit > 0 && n_rb > 0, "commits and rollbacks");
    check(n_ll > 0 && n_moved > 0 && n_re > 0, "long-latency loads, moves, re-insertions");
    check(n_walk > 0 && n_second > 0, "walks and a second walk");
    $display("cycles=%0d committed=%0d finished=%0d IPC=%0d.%02d", cyc, next_commit, n_fin,
             next_commit / cyc, (100 * next_commit / cyc) % 100);
    $display("checkpoints=%0d (branch %0d, insts %0d, stores %0d) full-table stalls=%0d",
             n_ckpt, n_b, n_i, n_s, n_full);
    $display("commits=%0d rollbacks=%0d ll loads=%0d moved=%0d reinserted=%0d walks=%0d second=%0d",
             n_commit, n_rb, n_ll, n_moved, n_re, n_walk, n_second);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
