// Self-checking testbench for cam_rename.
//
// An independent reference keeps a conventional map table (logical to
// physical), the set of registers replaced since the last checkpoint and the
// free set, plus a list of checkpoints (map copy and replaced set). Random
// rename groups with random checkpoint positions, checkpoint commits and
// rollbacks are applied to both; every source and destination tag and, after
// each clock edge, the Valid, Future Free and Free List vectors are compared.
// A directed start reproduces the Future Free behaviour of a redefinition:
// the old mapping loses Valid and gains Future Free, and two mappings of the
// same logical register are released together at commit.
module tb_cam_rename;
  import cooo_pkg::*;

  localparam int unsigned NPHYS = 64;
  localparam int unsigned W     = 4;

  typedef struct packed {
    logic [NPHYS-1:0]       v;
    logic [NPHYS-1:0]       ff;
    logic [NLOG*PTAG_W-1:0] map;
  } ck_t;

  logic clk = 0, rst_n = 0;
  dec_inst_t in_inst [W];
  logic [2:0] n_acc;
  logic ckpt_take;
  logic [1:0] ckpt_pos;
  logic alloc_ok;
  ptag_t psrc1 [W], psrc2 [W], pdst [W];
  logic [NPHYS-1:0] snap_valid, snap_ff, free_mask, rb_valid, rb_sq, valid_o, ff_o, fl_o;
  logic free_v, rb_v;

  cam_rename #(.NPHYS(NPHYS), .W(W)) dut (
    .clk, .rst_n, .in_inst, .n_acc, .ckpt_take, .ckpt_pos, .alloc_ok,
    .psrc1, .psrc2, .pdst, .snap_valid, .snap_ff,
    .free_v, .free_mask, .rb_v, .rb_valid, .rb_squashed_ff(rb_sq),
    .valid_o, .ff_o, .freelist_o(fl_o)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ckpts = 0, n_commits = 0, n_rbs = 0, n_redef = 0;

  // reference
  ptag_t            map [NLOG];
  logic [NPHYS-1:0] r_ff, r_free;
  ck_t              cks [$];

  function automatic logic [NPHYS-1:0] map_bits();
    logic [NPHYS-1:0] b;
    b = '0;
    for (int l = 0; l < NLOG; l++) b[map[l]] = 1'b1;
    return b;
  endfunction

  function automatic ck_t snapshot();
    ck_t c;
    c.v  = map_bits();
    c.ff = r_ff;
    for (int l = 0; l < NLOG; l++) c.map[l*PTAG_W +: PTAG_W] = map[l];
    return c;
  endfunction

  function automatic int free_count();
    int n;
    n = 0;
    for (int p = 0; p < NPHYS; p++) if (r_free[p]) n++;
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    n_acc = 0; ckpt_take = 0; ckpt_pos = 0; free_v = 0; rb_v = 0;
    free_mask = '0; rb_valid = '0; rb_sq = '0;
  endtask

  task automatic compare_state();
    check(valid_o == map_bits(), "valid vector");
    check(ff_o == r_ff, "future free vector");
    check(fl_o == r_free, "free list");
  endtask

  // One rename group: n instructions, optional checkpoint before position cp.
  task automatic rename_group(input int n, input bit take, input int cp);
    logic [NPHYS-1:0] fr;
    n_acc = 3'(n); ckpt_take = take; ckpt_pos = 2'(cp);
    #1;
    check(alloc_ok == (free_count() >= W), "alloc_ok");
    fr = r_free;
    for (int j = 0; j < W; j++) begin
      if (take && j == cp) begin
        cks.push_back(snapshot());
        check(snap_valid == map_bits() && snap_ff == r_ff, "checkpoint copy");
        r_ff = '0;
        n_ckpts++;
      end
      if (j < n) begin
        if (in_inst[j].src1_v) check(psrc1[j] == map[in_inst[j].src1], "psrc1");
        if (in_inst[j].src2_v) check(psrc2[j] == map[in_inst[j].src2], "psrc2");
        if (in_inst[j].dst_v) begin
          int lo;
          lo = -1;
          for (int p = NPHYS - 1; p >= 0; p--) if (fr[p]) lo = p;
          check(int'(pdst[j]) == lo, "pdst is lowest free");
          fr[pdst[j]] = 1'b0;
          r_ff[map[in_inst[j].dst]] = 1'b1;
          r_free[pdst[j]] = 1'b0;
          map[in_inst[j].dst] = pdst[j];
          n_redef++;
        end
      end
    end
    @(posedge clk); #1;
    idle();
    compare_state();
  endtask

  task automatic commit_oldest();
    free_v = 1; free_mask = cks[1].ff;
    r_free |= cks[1].ff;
    void'(cks.pop_front());
    @(posedge clk); #1;
    idle();
    compare_state();
    n_commits++;
  endtask

  task automatic rollback(input int c);
    logic [NPHYS-1:0] sq;
    sq = '0;
    for (int i = c + 1; i < cks.size(); i++) sq |= cks[i].ff;
    rb_v = 1; rb_valid = cks[c].v; rb_sq = sq;
    r_free |= (map_bits() | r_ff | sq) & ~cks[c].v;
    for (int l = 0; l < NLOG; l++) map[l] = cks[c].map[l*PTAG_W +: PTAG_W];
    r_ff = '0;
    while (cks.size() > c + 1) void'(cks.pop_back());
    @(posedge clk); #1;
    idle();
    compare_state();
    n_rbs++;
  endtask

  task automatic rand_inst(input int j);
    in_inst[j] = '0;
    in_inst[j].pc     = $urandom;
    in_inst[j].src1_v = 1'($urandom);
    in_inst[j].src1   = 5'($urandom);
    in_inst[j].src2_v = 1'($urandom);
    in_inst[j].src2   = 5'($urandom);
    in_inst[j].dst_v  = ($urandom % 4) != 0;
    in_inst[j].dst    = 5'($urandom % 8);   // few registers: many redefinitions
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    for (int j = 0; j < W; j++) in_inst[j] = '0;
    for (int l = 0; l < NLOG; l++) map[l] = ptag_t'(l);
    r_ff = '0;
    r_free = '0;
    for (int p = NLOG; p < NPHYS; p++) r_free[p] = 1'b1;
    cks.push_back(snapshot());
    #12 rst_n = 1;
    @(posedge clk); #1;
    compare_state();

    // Directed: two redefinitions of logical 1 around a checkpoint.
    in_inst[0] = '0; in_inst[0].dst_v = 1; in_inst[0].dst = 1;
    in_inst[0].src1_v = 1; in_inst[0].src1 = 4; in_inst[0].src2_v = 1; in_inst[0].src2 = 1;
    in_inst[1] = in_inst[0];
    rename_group(2, 0, 0);      // physical 1 and the first new one both Future Free
    check(ff_o[1] == 1'b1 && valid_o[1] == 1'b0, "old mapping of r1 future free");
    in_inst[0] = '0;
    rename_group(1, 1, 0);      // checkpoint, nothing else renamed
    check(ff_o == '0, "future free cleared at checkpoint");
    commit_oldest();            // both replaced mappings of r1 released together
    check(fl_o[1] == 1'b1 && fl_o[NLOG] == 1'b1, "both r1 mappings freed at commit");

    // Random
    for (int it = 0; it < 3000; it++) begin
      int r;
      r = $urandom % 10;
      if (r < 6) begin
        int n;
        bit take;
        for (int j = 0; j < W; j++) rand_inst(j);
        n = $urandom % (W + 1);
        if (free_count() < W) n = 0;
        take = (n > 0) && ($urandom % 4 == 0);
        rename_group(n, take, take ? int'($urandom % n) : 0);
      end else if (r < 8 && cks.size() > 1) begin
        commit_oldest();
      end else if (r == 8 && cks.size() > 0) begin
        rollback($urandom % cks.size());
      end
    end
    check(n_ckpts > 50 && n_commits > 50 && n_rbs > 50 && n_redef > 500, "coverage");
    $display("ckpts=%0d commits=%0d rollbacks=%0d renames=%0d", n_ckpts, n_commits, n_rbs, n_redef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
