// Self-checking testbench for issue_queue.
//
// A slot-by-slot reference (valid, two ready bits, source tags, sequence
// number, checkpoint) follows random inserts with random initial readiness,
// wakeup broadcasts, invalidation requests (matching and stale), and
// squashes. Each cycle the offered free slots, the free count, the issued
// instructions (lowest-numbered entries with both operands ready, at most W)
// and the invalidation answers are compared. A directed start checks that a
// waiting instruction issues the cycle after its last operand is broadcast.
module tb_issue_queue;
  import cooo_pkg::*;

  localparam int unsigned SIZE = 16;
  localparam int unsigned W    = 4;
  localparam int unsigned NINS = 8;

  logic clk = 0, rst_n = 0;
  logic [NINS-1:0] ins_v, ins_rdy1, ins_rdy2, ins_slot_ok;
  uop_t ins_uop [NINS];
  logic [3:0] ins_slot [NINS];
  logic [4:0] n_free;
  done_t fin [W];
  logic [W-1:0] iss_v, inv_v, inv_ok;
  uop_t iss_uop [W];
  logic [3:0] inv_slot [W];
  seq_t inv_seq [W];
  logic squash;
  logic [NCKPT_MAX-1:0] squash_mask;

  issue_queue #(.SIZE(SIZE), .W(W), .NINS(NINS)) dut (
    .clk, .rst_n, .ins_v, .ins_uop, .ins_rdy1, .ins_rdy2, .ins_slot, .ins_slot_ok, .n_free,
    .fin, .iss_v, .iss_uop, .inv_v, .inv_slot, .inv_seq, .inv_ok, .squash, .squash_mask
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_iss = 0, n_inv = 0, n_wake = 0;
  bit   m_v [SIZE], m_r1 [SIZE], m_r2 [SIZE];
  uop_t m_u [SIZE];
  seq_t r_seq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic quiet();
    ins_v = '0; inv_v = '0; squash = 0; squash_mask = '0;
    for (int k = 0; k < W; k++) fin[k] = '0;
  endtask

  // compare, then apply one clock edge to the reference
  task automatic step();
    int fs [NINS];
    int nf, k;
    bit issuing [SIZE];
    #1;
    nf = 0; k = 0;
    for (int e = 0; e < SIZE; e++) begin
      if (!m_v[e]) begin
        if (nf < NINS) fs[nf] = e;
        nf++;
      end
      issuing[e] = 0;
    end
    check(int'(n_free) == nf, "free count");
    for (int i = 0; i < NINS; i++) begin
      check(ins_slot_ok[i] == (i < nf), "slot ok");
      if (i < nf) check(int'(ins_slot[i]) == fs[i], "slot number");
    end
    for (int e = 0; e < SIZE; e++)
      if (m_v[e] && m_r1[e] && m_r2[e] && k < W) begin
        check(iss_v[k] && iss_uop[k].seq == m_u[e].seq, "issue");
        issuing[e] = 1;
        k++;
        n_iss++;
      end
    for (int i = k; i < W; i++) check(!iss_v[i], "no extra issue");
    for (int j = 0; j < W; j++) begin
      bit ok;
      ok = inv_v[j] && m_v[inv_slot[j]] && !issuing[inv_slot[j]] &&
           m_u[inv_slot[j]].seq == inv_seq[j];
      check(inv_ok[j] == ok, "invalidate answer");
      if (ok) n_inv++;
    end
    // reference edge
    for (int e = 0; e < SIZE; e++) if (issuing[e]) m_v[e] = 0;
    for (int j = 0; j < W; j++) if (inv_ok[j]) m_v[inv_slot[j]] = 0;
    for (int e = 0; e < SIZE; e++)
      for (int f = 0; f < W; f++)
        if (fin[f].valid && fin[f].dst_v) begin
          if (m_u[e].psrc1 == fin[f].pdst) m_r1[e] = 1;
          if (m_u[e].psrc2 == fin[f].pdst) m_r2[e] = 1;
        end
    if (squash) begin
      for (int e = 0; e < SIZE; e++) if (squash_mask[m_u[e].ckpt]) m_v[e] = 0;
    end else begin
      for (int i = 0; i < NINS; i++)
        if (ins_v[i] && i < nf) begin
          m_v[fs[i]] = 1; m_r1[fs[i]] = ins_rdy1[i]; m_r2[fs[i]] = ins_rdy2[i];
          m_u[fs[i]] = ins_uop[i];
        end
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < SIZE; e++) begin m_v[e] = 0; m_r1[e] = 0; m_r2[e] = 0; m_u[e] = '0; end
    for (int i = 0; i < NINS; i++) ins_uop[i] = '0;
    ins_rdy1 = '0; ins_rdy2 = '0;
    for (int j = 0; j < W; j++) begin inv_slot[j] = '0; inv_seq[j] = '0; end
    quiet();
    #12 rst_n = 1;
    @(posedge clk); #1;

    // directed: one instruction waiting on tag 100 and 101
    ins_v = 8'b1;
    ins_uop[0].seq = 16'd999; ins_uop[0].psrc1 = 12'd100; ins_uop[0].psrc2 = 12'd101;
    ins_rdy1 = 8'b0; ins_rdy2 = 8'b0;
    step();
    quiet();
    fin[0] = '{valid: 1'b1, dst_v: 1'b1, pdst: 12'd100, ckpt: '0, seq: '0};
    step();
    quiet();
    check(iss_v == '0, "still waits for second operand");
    fin[1] = '{valid: 1'b1, dst_v: 1'b1, pdst: 12'd101, ckpt: '0, seq: '0};
    step();
    quiet();
    #0 check(iss_v[0] && iss_uop[0].seq == 16'd999, "issues the cycle after wakeup");
    step();

    for (int it = 0; it < 20000; it++) begin
      quiet();
      for (int i = 0; i < NINS; i++) begin
        ins_uop[i] = '0;
        ins_uop[i].seq = r_seq++;
        ins_uop[i].psrc1 = ptag_t'($urandom % 32);
        ins_uop[i].psrc2 = ptag_t'($urandom % 32);
        ins_uop[i].ckpt = ckpt_id_t'($urandom);
      end
      ins_v = NINS'($urandom) & NINS'($urandom);
      ins_rdy1 = NINS'($urandom);
      ins_rdy2 = NINS'($urandom);
      for (int k = 0; k < W; k++) begin
        if ($urandom % 3 == 0) begin
          fin[k].valid = 1; fin[k].dst_v = 1; fin[k].pdst = ptag_t'($urandom % 32);
          n_wake++;
        end
        inv_v[k] = ($urandom % 4) == 0;
        inv_slot[k] = 4'($urandom);
        inv_seq[k] = ($urandom % 2) ? m_u[inv_slot[k]].seq : seq_t'($urandom);
      end
      squash = ($urandom % 60) == 0;
      squash_mask = NCKPT_MAX'($urandom);
      step();
    end
    check(n_iss > 5000 && n_inv > 500 && n_wake > 5000, "coverage");
    $display("issued=%0d invalidated=%0d wakeups=%0d", n_iss, n_inv, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
