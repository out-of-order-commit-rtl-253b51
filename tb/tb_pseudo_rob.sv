// Self-checking testbench for pseudo_rob.
//
// A reference FIFO of (sequence number, checkpoint, load flag, queue slot,
// valid, done) follows random pushes, finishing instructions (including
// stale sequence numbers whose slot has been reused, which must not mark
// anything), squashes of random checkpoint sets, drain requests and
// extraction stalls. Each cycle the number of extracted entries (as late as
// capacity allows, at most W, all of them on drain) and every extracted
// entry's sequence number, queue slot, valid, done and long-latency-load
// flags are compared.
module tb_pseudo_rob;
  import cooo_pkg::*;

  localparam int unsigned SIZE = 16;
  localparam int unsigned W    = 4;
  localparam int unsigned IQS  = 16;

  typedef struct packed {
    seq_t     seq;
    ckpt_id_t ckpt;
    logic     ld;
    logic [3:0] slot;
    logic     v;
    logic     done;
  } ent_t;

  logic clk = 0, rst_n = 0;
  seq_t next_seq;
  logic [4:0] space;
  logic [2:0] n_push, n_ext;
  uop_t push_uop [W], ext_uop [W];
  logic [3:0] push_slot [W], ext_slot [W];
  done_t fin [W];
  logic ext_allow, drain, squash;
  logic [W-1:0] ext_v, ext_done, ext_ll;
  logic [NCKPT_MAX-1:0] squash_mask;

  pseudo_rob #(.SIZE(SIZE), .W(W), .IQ_SIZE(IQS)) dut (
    .clk, .rst_n, .next_seq, .space, .n_push, .push_uop, .push_iq_slot(push_slot),
    .fin, .ext_allow, .drain, .ext_v, .ext_uop, .ext_iq_slot(ext_slot), .ext_done,
    .ext_ll_load(ext_ll), .n_ext, .squash_mask, .squash
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pop = 0, n_sq = 0, n_ll = 0, n_stale = 0;
  ent_t q [$];
  seq_t r_seq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_push = 0; ext_allow = 0; drain = 0; squash = 0; squash_mask = '0;
    for (int j = 0; j < W; j++) begin push_uop[j] = '0; push_slot[j] = '0; fin[j] = '0; end
    #12 rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int want, cnt, np;
      cnt = q.size();
      // drive
      ext_allow = ($urandom % 8) != 0;
      drain = ($urandom % 10) == 0;
      squash = ($urandom % 50) == 0;
      squash_mask = NCKPT_MAX'($urandom) & NCKPT_MAX'($urandom);
      want = drain ? ((cnt < W) ? cnt : W) : ((cnt + W > SIZE) ? cnt + W - SIZE : 0);
      if (!ext_allow) want = 0;
      np = $urandom % (W + 1);
      if (cnt - want + np > SIZE) np = SIZE - cnt + want;
      n_push = 3'(np);
      for (int j = 0; j < W; j++) begin
        push_uop[j] = '0;
        push_uop[j].seq = r_seq + seq_t'(j);
        push_uop[j].ckpt = ckpt_id_t'($urandom);
        push_uop[j].d.is_load = 1'($urandom);
        push_slot[j] = 4'($urandom);
        fin[j] = '0;
        if (cnt > 0 && ($urandom % 2)) begin
          int i;
          i = $urandom % cnt;
          fin[j].valid = 1;
          fin[j].seq = q[i].seq;
          if ($urandom % 4 == 0) begin
            fin[j].seq = q[i].seq - seq_t'(SIZE);   // stale: slot reused since
            n_stale++;
          end
        end
      end
      #1;
      check(next_seq == r_seq, "next_seq");
      check(int'(space) == SIZE - cnt, "space");
      check(int'(n_ext) == want, "extract count");
      for (int j = 0; j < want; j++) begin
        check(ext_v[j] == q[j].v, "ext valid");
        if (q[j].v) begin
          check(ext_uop[j].seq == q[j].seq && ext_slot[j] == q[j].slot, "ext entry");
          check(ext_done[j] == q[j].done, "ext done");
          check(ext_ll[j] == (q[j].ld && !q[j].done), "ext long-latency load");
          if (ext_ll[j]) n_ll++;
        end
      end
      // reference update (same edge)
      for (int k = 0; k < W; k++)
        if (fin[k].valid)
          foreach (q[i]) if (q[i].v && q[i].seq == fin[k].seq) q[i].done = 1;
      for (int j = 0; j < want; j++) void'(q.pop_front());
      n_pop += want;
      if (squash) begin
        foreach (q[i]) if (squash_mask[q[i].ckpt]) q[i].v = 0;
        n_sq++;
      end else begin
        for (int j = 0; j < np; j++) begin
          ent_t e;
          e.seq = push_uop[j].seq; e.ckpt = push_uop[j].ckpt; e.ld = push_uop[j].d.is_load;
          e.slot = push_slot[j]; e.v = 1; e.done = 0;
          q.push_back(e);
        end
        r_seq += seq_t'(np);
      end
      @(negedge clk);
    end
    check(n_pop > 5000 && n_sq > 100 && n_ll > 1000 && n_stale > 1000, "coverage");
    $display("extracted=%0d squashes=%0d ll=%0d stale=%0d", n_pop, n_sq, n_ll, n_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
