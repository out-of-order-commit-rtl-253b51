// Self-checking testbench for checkpoint_table.
//
// A reference list of live checkpoints (copies, instruction and store
// counters, restart PC) is driven alongside the table with random new
// checkpoints, random instruction arrivals, finishing instructions drawn
// from those still outstanding, and random rollbacks. Every cycle the
// expected commit (oldest, counter zero, a younger checkpoint present), the
// registers it releases (the Future Free copy of the next checkpoint), its
// store count, the full flag, and on rollback the restore vectors, squash
// mask and restart PC are compared. It also checks that a commit follows the
// last finishing instruction of a group by exactly one cycle.
module tb_checkpoint_table;
  import cooo_pkg::*;

  localparam int unsigned NPHYS = 64;
  localparam int unsigned NCKPT = 8;
  localparam int unsigned W     = 4;

  typedef struct packed {
    logic [2:0]       id;
    logic [NPHYS-1:0] v;
    logic [NPHYS-1:0] ff;
    logic [11:0]      cnt;   // instructions not yet finished
    logic [11:0]      st;
    logic [31:0]      pc;
  } ck_t;

  logic clk = 0, rst_n = 0;
  logic take, full, commit_v, rb_req;
  logic [NPHYS-1:0] take_valid, take_ff, commit_free, rb_valid, rb_sq;
  logic [31:0] take_pc, rb_pc;
  ckpt_id_t youngest, next_id, commit_id, rb_ckpt;
  logic [2:0] n_old, st_old, n_new, st_new;
  logic [W-1:0] fin_v;
  ckpt_id_t fin_ckpt [W];
  logic [11:0] commit_stores;
  logic [NCKPT-1:0] squash_mask, live;
  logic [3:0] n_live;

  checkpoint_table #(.NCKPT(NCKPT), .NPHYS(NPHYS), .W(W)) dut (
    .clk, .rst_n, .take, .take_valid, .take_ff, .take_pc, .full, .youngest, .next_id,
    .n_old, .st_old, .n_new, .st_new, .fin_v, .fin_ckpt,
    .commit_v, .commit_id, .commit_free, .commit_stores,
    .rb_req, .rb_ckpt, .rb_valid, .rb_squashed_ff(rb_sq), .rb_pc, .squash_mask,
    .n_live, .live_o(live)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_commit = 0, n_rb = 0, n_take = 0, n_full = 0, n_lat = 0;
  ck_t cks [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ck_t c0;
    int last_zero;   // index of group whose counter reached zero last cycle
    take = 0; rb_req = 0; rb_ckpt = 0; take_valid = '0; take_ff = '0; take_pc = 0;
    n_old = 0; st_old = 0; n_new = 0; st_new = 0; fin_v = '0;
    for (int k = 0; k < W; k++) fin_ckpt[k] = '0;
    c0 = '0;
    for (int p = 0; p < NLOG; p++) c0.v[p] = 1'b1;
    cks.push_back(c0);
    #12 rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit exp_commit, last_fin_here;
      int nf, c;
      // ---- drive
      take = 0; rb_req = 0; fin_v = '0; n_old = 0; st_old = 0; n_new = 0; st_new = 0;
      rb_req = ($urandom % 40) == 0;
      c = $urandom % cks.size();
      rb_ckpt = cks[c].id;
      if (!rb_req) begin
        take = (cks.size() < NCKPT) && ($urandom % 5 == 0);
        n_old = 3'($urandom % 5);
        st_old = 3'($urandom % (n_old + 1));
        if (take) begin
          n_new = 3'($urandom % 5);
          st_new = 3'($urandom % (n_new + 1));
          take_valid = {$urandom, $urandom};
          take_ff = {$urandom, $urandom};
          take_pc = $urandom;
        end
      end
      // finishing instructions, only from the outstanding ones
      nf = 0;
      last_fin_here = 0;
      for (int k = 0; k < W; k++) begin
        int i;
        i = $urandom % cks.size();
        if (cks[i].cnt > 0 && ($urandom % 2)) begin
          fin_v[k] = 1; fin_ckpt[k] = cks[i].id;
          cks[i].cnt--;
          if (i == 0 && cks[i].cnt == 0) last_fin_here = 1;
        end
      end
      #1;
      // ---- compare combinational outputs
      check(full == (cks.size() == NCKPT), "full");
      check(youngest == cks[cks.size()-1].id, "youngest id");
      // The table sees the counter before this cycle's finishes.
      begin
        int cnt_before;
        cnt_before = cks[0].cnt;
        for (int k = 0; k < W; k++) if (fin_v[k] && fin_ckpt[k] == cks[0].id) cnt_before++;
        exp_commit = !rb_req && cks.size() > 1 && cnt_before == 0;
      end
      check(commit_v == exp_commit, "commit_v");
      if (exp_commit) begin
        check(commit_id == cks[0].id, "commit id");
        check(commit_free == cks[1].ff, "released registers");
        check(commit_stores == cks[0].st, "commit stores");
        if (last_zero == 1) n_lat++;
      end
      if (rb_req) begin
        logic [NPHYS-1:0] sq;
        logic [NCKPT-1:0] m;
        sq = '0; m = '0;
        for (int i = c + 1; i < cks.size(); i++) sq |= cks[i].ff;
        for (int i = c; i < cks.size(); i++) m[cks[i].id] = 1'b1;
        check(rb_valid == cks[c].v, "restore valid");
        check(rb_sq == sq, "squashed future free");
        check(squash_mask == m, "squash mask");
        check(rb_pc == cks[c].pc, "restart pc");
      end
      // ---- update reference
      last_zero = 0;
      if (rb_req) begin
        while (cks.size() > c + 1) void'(cks.pop_back());
        cks[c].cnt = 0; cks[c].st = 0;
        n_rb++;
      end else begin
        ck_t n;
        cks[cks.size()-1].cnt += 12'(n_old);
        cks[cks.size()-1].st  += 12'(st_old);
        if (take) begin
          n.id = (cks[cks.size()-1].id == NCKPT - 1) ? 3'd0 : cks[cks.size()-1].id + 3'd1;
          check(next_id == n.id, "next id");
          n.v = take_valid; n.ff = take_ff; n.cnt = 12'(n_new); n.st = 12'(st_new);
          n.pc = take_pc;
          cks.push_back(n);
          n_take++;
        end
        if (exp_commit) begin
          void'(cks.pop_front());
          n_commit++;
        end
        if (cks.size() > 1 && cks[0].cnt == 0 && last_fin_here) last_zero = 1;
      end
      if (cks.size() == NCKPT) n_full++;
      @(negedge clk);
    end
    check(n_commit > 100 && n_rb > 50 && n_take > 200 && n_full > 10 && n_lat > 5,
          "coverage");
    $display("takes=%0d commits=%0d rollbacks=%0d full=%0d next-cycle commits=%0d",
             n_take, n_commit, n_rb, n_full, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
