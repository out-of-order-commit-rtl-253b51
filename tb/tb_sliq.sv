// Self-checking testbench for sliq.
//
// Directed parts:
//  * twelve dependents of one long-latency load: nothing comes back before
//    the load's register is written; the first re-insertion comes exactly
//    PENALTY (4) cycles after the register becomes ready and then 4 per
//    cycle, in program order;
//  * a second load younger than the walk position is picked up by the same
//    walk; a load older than the walk position starts a second walk;
//  * a full queue (iq_room 0) holds the walk back without losing entries;
//  * an entry written after its load has completed is still returned.
// Random part: random insertions tied to random pending loads, random load
// completions, queue room and squashes. A scoreboard checks that every entry
// comes back exactly once, only after its load's register is ready, never
// after being squashed, and that all come back once all loads are complete.
module tb_sliq;
  import cooo_pkg::*;

  localparam int unsigned SIZE  = 64;
  localparam int unsigned W     = 4;
  localparam int unsigned RATE  = 4;
  localparam int unsigned PEN   = 4;
  localparam int unsigned NLT   = 8;
  localparam int unsigned NPHYS = 128;   // register numbers used by the test

  logic clk = 0, rst_n = 0;
  logic [W-1:0] ins_v, ll_v;
  uop_t ins_uop [W];
  ptag_t ins_tag [W], ll_tag [W], ll_id [W];
  ckpt_id_t ll_ckpt [W];
  logic [2:0] ll_pos [W];
  logic [6:0] space;
  logic [3:0] lt_space;
  done_t fin [W];
  logic [NPHYS-1:0] tag_ready;
  logic [2:0] iq_room;
  logic [RATE-1:0] re_v;
  uop_t re_uop [RATE];
  logic squash, walking, wake_start, second_walk;
  logic [NCKPT_MAX-1:0] squash_mask;

  sliq #(.SIZE(SIZE), .W(W), .RATE(RATE), .PENALTY(PEN), .NLT(NLT)) dut (
    .clk, .rst_n, .ins_v, .ins_uop, .ins_tag, .space, .ll_cand(ll_v), .ll_id, .ll_v, .ll_tag,
    .ll_ckpt, .ll_pos, .lt_space, .fin, .iq_room, .re_v, .re_uop, .squash, .squash_mask,
    .walking, .wake_start, .second_walk
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_second = 0, n_back = 0, n_sq = 0;

  // scoreboard indexed by sequence number
  int   sb_state [int];   // 1 parked, 2 returned, 3 squashed
  int   sb_tag   [int];
  int   sb_ckpt  [int];
  int   ready_at [NPHYS]; // cycle the register became ready
  int   ann_ck   [NPHYS]; // checkpoint of the load last announced for a tag
  ptag_t ann_id  [NPHYS]; // identifier the block gave that load
  seq_t r_seq = 0;
  int   back_cyc [$];
  seq_t back_seq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic quiet();
    ins_v = '0; ll_v = '0; squash = 0; squash_mask = '0;
    for (int k = 0; k < W; k++) begin fin[k] = '0; ll_pos[k] = '0; ll_ckpt[k] = '0; end
  endtask

  // one clock: score the re-insertions of this cycle, apply register writes
  task automatic step();
    #1;
    for (int i = 0; i < RATE; i++)
      if (re_v[i]) begin
        int s;
        s = int'(re_uop[i].seq);
        check(sb_state.exists(s) && sb_state[s] == 1, "returned once, not squashed");
        // a walk already running may pick up a load completed meanwhile
        // without a new start penalty; the penalty itself is checked above
        check(tag_ready[sb_tag[s]] && cyc >= ready_at[sb_tag[s]],
              "not before its load's register is ready");
        check(i < int'(iq_room), "respects queue room");
        sb_state[s] = 2;
        back_cyc.push_back(cyc);
        back_seq.push_back(re_uop[i].seq);
        n_back++;
      end
    if (second_walk) n_second++;
    if (squash)
      foreach (sb_state[s])
        if (sb_state[s] == 1 && squash_mask[sb_ckpt[s]]) begin sb_state[s] = 3; n_sq++; end
    @(posedge clk);
    cyc++;
    #1;   // the register table changes after the edge, like a flip-flop
    for (int k = 0; k < W; k++)
      if (fin[k].valid && fin[k].dst_v && !tag_ready[fin[k].pdst]) begin
        tag_ready[fin[k].pdst] = 1'b1;
        ready_at[fin[k].pdst] = cyc;
      end
  endtask

  // park n dependents of load tag t (the load itself is announced first)
  task automatic park(input int t, input int n, input bit announce, input int ck);
    int left;
    left = n;
    quiet();
    if (announce) begin
      ll_v[0] = 1; ll_tag[0] = ptag_t'(t); ll_ckpt[0] = ckpt_id_t'(ck); ll_pos[0] = 0;
      tag_ready[t] = 1'b0;
      #0 ann_id[t] = ll_id[0];
    end
    while (left > 0) begin
      for (int j = 0; j < W; j++)
        if (left > 0) begin
          ins_v[j] = 1;
          ins_uop[j] = '0;
          ins_uop[j].seq = r_seq;
          ins_uop[j].ckpt = ckpt_id_t'(ck);
          ins_tag[j] = ann_id[t];
          sb_state[int'(r_seq)] = 1;
          sb_tag[int'(r_seq)] = t;
          sb_ckpt[int'(r_seq)] = ck;
          r_seq++;
          left--;
        end
      step();
      quiet();
    end
  endtask

  task automatic complete(input int t);
    quiet();
    fin[0] = '{valid: 1'b1, dst_v: 1'b1, pdst: ptag_t'(t), ckpt: '0, seq: '0};
    step();
    quiet();
  endtask

  task automatic run(input int n);
    quiet();
    for (int i = 0; i < n; i++) step();
  endtask

  function automatic bit waiting(input int t);
    foreach (sb_state[s]) if (sb_state[s] == 1 && sb_tag[s] == t) return 1;
    return 0;
  endfunction

  function automatic bit all_back();
    foreach (sb_state[s]) if (sb_state[s] == 1) return 0;
    return 1;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    tag_ready = '1;
    // generation 0 is never handed out first: such an identifier is complete
    for (int p = 0; p < NPHYS; p++) begin ready_at[p] = 0; ann_ck[p] = 0; ann_id[p] = '0; end
    iq_room = 3'(RATE);
    for (int j = 0; j < W; j++) begin ins_uop[j] = '0; ins_tag[j] = '0; ll_tag[j] = '0; end
    quiet();
    #12 rst_n = 1;
    @(posedge clk); #1;

    // ---- twelve dependents, start penalty and rate
    park(50, 12, 1, 0);
    run(10);
    check(n_back == 0, "nothing returns before the load");
    complete(50);
    c0 = cyc;                       // register ready from this cycle on
    run(12);
    check(back_cyc.size() == 12, "all twelve returned");
    if (back_cyc.size() == 12) begin
      check(back_cyc[0] == c0 + PEN, "first return PENALTY cycles after ready");
      check(back_cyc[4] == c0 + PEN + 1 && back_cyc[8] == c0 + PEN + 2 &&
            back_cyc[3] == c0 + PEN, "four per cycle");
      for (int i = 1; i < 12; i++) check(back_seq[i] == back_seq[i-1] + 1, "program order");
    end

    // ---- younger second load found by the same walk
    back_cyc.delete(); back_seq.delete();
    park(60, 8, 1, 1);
    park(61, 8, 1, 1);
    complete(60);
    complete(61);
    run(20);
    check(back_cyc.size() == 16 && n_second == 0, "younger load found by the running walk");

    // ---- older second load needs a walk of its own
    back_cyc.delete(); back_seq.delete();
    park(70, 8, 1, 2);
    park(71, 24, 1, 2);
    complete(71);
    run(PEN + 2);                   // walk of 71 has started past 70's entries
    c0 = n_second;
    complete(70);
    run(30);
    check(n_second == c0 + 1, "older load starts a second walk");
    check(back_cyc.size() == 32, "both loads' dependents returned");

    // ---- no queue room holds the walk back
    back_cyc.delete(); back_seq.delete();
    park(80, 6, 1, 3);
    iq_room = 0;
    complete(80);
    run(10);
    check(back_cyc.size() == 0, "held back by a full queue");
    iq_room = 1;
    run(10);
    check(back_cyc.size() == 6, "released one per cycle");
    iq_room = 3'(RATE);

    // ---- an entry whose load has already completed starts its own walk
    back_cyc.delete(); back_seq.delete();
    run(5);
    park(85, 2, 0, 4);              // tag 85 is ready
    c0 = cyc - 1;                   // written at the end of that cycle
    run(PEN + 4);
    check(back_cyc.size() == 2 && back_cyc[0] == c0 + PEN + 1,
          "late entry returns after the start penalty");

    // ---- random
    for (int it = 0; it < 4000; it++) begin
      int t, ck;
      quiet();
      iq_room = 3'($urandom % (RATE + 1));
      t = 90 + ($urandom % 20);
      // dependents share their load's checkpoint, as younger instructions do
      ck = tag_ready[t] ? int'($urandom % 8) : ann_ck[t];
      if (int'(space) >= W && int'(lt_space) >= 1 && ($urandom % 3 == 0)) begin
        bit ann;
        // announce a new load for a completed tag; in the core a register
        // is not reused while instructions still wait for its old value
        ann = tag_ready[t] && !waiting(t);
        if (ann) begin
          ll_v[0] = 1; ll_tag[0] = ptag_t'(t); ll_ckpt[0] = ckpt_id_t'(ck); ll_pos[0] = 0;
          tag_ready[t] = 1'b0;
          ann_ck[t] = ck;
          #0 ann_id[t] = ll_id[0];
        end
        if (!tag_ready[t] || ($urandom % 8 == 0))
          for (int j = 0; j < W; j++)
            if ($urandom % 2) begin
              ins_v[j] = 1; ins_uop[j] = '0; ins_uop[j].seq = r_seq;
              ins_uop[j].ckpt = ckpt_id_t'(ck); ins_tag[j] = ann_id[t];
              sb_state[int'(r_seq)] = 1; sb_tag[int'(r_seq)] = t; sb_ckpt[int'(r_seq)] = ck;
              r_seq++;
            end
      end
      if ($urandom % 6 == 0) begin
        int u;
        u = 90 + ($urandom % 20);
        if (!tag_ready[u] && !(ll_v[0] && int'(ll_tag[0]) == u) &&
            !(ins_v != '0 && t == u)) begin
          fin[1] = '{valid: 1'b1, dst_v: 1'b1, pdst: ptag_t'(u), ckpt: '0, seq: '0};
        end
      end
      if ($urandom % 150 == 0 && ins_v == '0 && ll_v == '0) begin
        squash = 1; squash_mask = NCKPT_MAX'($urandom);
      end
      step();
      // a squashed load is gone; its register may be handed out again
      if (squash)
        for (int u = 90; u < 110; u++)
          if (!tag_ready[u] && squash_mask[ann_ck[u]]) begin
            tag_ready[u] = 1'b1;
            ready_at[u] = cyc;
          end
    end
    // complete everything and drain
    quiet();
    iq_room = 3'(RATE);
    for (int u = 90; u < 110; u++)
      if (!tag_ready[u]) complete(u);
    run(200);
    check(all_back(), "every parked entry returned");
    check(n_back > 500 && n_sq > 10 && n_second > 3, "coverage");
    $display("returned=%0d squashed=%0d second walks=%0d", n_back, n_sq, n_second);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
