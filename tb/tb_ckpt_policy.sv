// Self-checking testbench for ckpt_policy.
//
// Directed part: a stream of non-branch instructions must get its
// checkpoint exactly in front of instruction 513; a branch arriving after 64
// instructions gets one in front of it (a branch after 63 does not); the
// instruction after the 64th store gets one. Random part: random groups with
// branches, stores, caps, a full table, forced checkpoints and rollbacks are
// compared with an instruction-by-instruction reference of the three
// thresholds and the one-checkpoint-per-cycle rule.
module tb_ckpt_policy;
  import cooo_pkg::*;

  localparam int unsigned W = 4;

  logic clk = 0, rst_n = 0;
  dec_inst_t in_inst [W];
  logic [2:0] n_in, n_lim, n_acc, n_old, st_old, n_new, st_new;
  logic force_ckpt, table_full, rb, ckpt_take, wb, wi, ws;
  logic [1:0] ckpt_pos;

  ckpt_policy #(.W(W)) dut (
    .clk, .rst_n, .in_inst, .n_in, .n_lim, .force_ckpt, .table_full, .rb,
    .n_acc, .ckpt_take, .ckpt_pos, .n_old, .st_old, .n_new, .st_new,
    .why_branch(wb), .why_insts(wi), .why_stores(ws)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int r_ic = 0, r_sc = 0;
  int cnt_br = 0, cnt_in = 0, cnt_st = 0, cnt_cut = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference for one cycle; returns expected acc/take/pos and updates state
  task automatic step();
    int acc, pos, no, so, nn, sn, ic, sc;
    bit tk, stop;
    ic = r_ic; sc = r_sc; acc = 0; pos = 0; tk = 0; stop = 0;
    no = 0; so = 0; nn = 0; sn = 0;
    for (int j = 0; j < W; j++) begin
      if (!stop && j < n_in && j < n_lim) begin
        bit need;
        need = (in_inst[j].is_branch && ic >= 64) || ic >= 512 || sc >= 64 ||
               (force_ckpt && j == 0);
        if (need && (tk || table_full)) stop = 1;
        else begin
          if (need) begin tk = 1; pos = j; ic = 0; sc = 0; end
          ic++;
          if (in_inst[j].is_store) sc++;
          acc = j + 1;
          if (tk) begin nn++; if (in_inst[j].is_store) sn++; end
          else begin no++; if (in_inst[j].is_store) so++; end
        end
      end
    end
    #1;
    check(n_acc == 3'(acc), "n_acc");
    check(ckpt_take == tk, "ckpt_take");
    if (tk) check(ckpt_pos == 2'(pos), "ckpt_pos");
    check(n_old == 3'(no) && st_old == 3'(so) && n_new == 3'(nn) && st_new == 3'(sn),
          "group counts");
    if (tk && wb) cnt_br++;
    if (tk && wi) cnt_in++;
    if (tk && ws) cnt_st++;
    if (acc < n_in && acc < n_lim) cnt_cut++;
    @(posedge clk);
    if (rb) begin r_ic = 0; r_sc = 0; end
    else begin r_ic = ic; r_sc = sc; end
    #1;
  endtask

  task automatic set_plain(input int n, input bit br, input bit st);
    for (int j = 0; j < W; j++) begin
      in_inst[j] = '0;
      in_inst[j].is_branch = br;
      in_inst[j].is_store  = st;
    end
    n_in = 3'(n);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_lim = 4; force_ckpt = 0; table_full = 0; rb = 0;
    set_plain(0, 0, 0);
    #12 rst_n = 1;
    @(posedge clk); #1;

    // 512 plain instructions, then the checkpoint must come first in the group
    set_plain(4, 0, 0);
    for (int i = 0; i < 128; i++) begin
      check(ckpt_take == 0, "no early checkpoint");
      step();
    end
    #0 check(ckpt_take == 1 && ckpt_pos == 0 && wi, "checkpoint after 512 instructions");
    step();
    // fill the group to 63 instructions, then a branch
    set_plain(1, 0, 0);
    for (int i = 0; i < 59; i++) step();
    set_plain(1, 1, 0);
    #0 check(ckpt_take == 0, "no checkpoint at branch after 63");
    step();
    set_plain(1, 1, 0);
    #0 check(ckpt_take == 1 && wb, "checkpoint at first branch after 64");
    step();
    // 64 stores then the next instruction
    set_plain(4, 0, 1);
    for (int i = 0; i < 16; i++) step();
    set_plain(1, 0, 0);
    #0 check(ckpt_take == 1 && ws, "checkpoint after 64 stores");
    step();

    // random
    for (int it = 0; it < 20000; it++) begin
      for (int j = 0; j < W; j++) begin
        in_inst[j] = '0;
        // phases stress the branch, store and instruction thresholds in turn
        case ((it / 5000) % 4)
          0: begin in_inst[j].is_branch = ($urandom % 16) == 0;
                   in_inst[j].is_store  = ($urandom % 5) == 0; end
          1: begin in_inst[j].is_branch = ($urandom % 2000) == 0;
                   in_inst[j].is_store  = ($urandom % 3) == 0; end
          2: begin in_inst[j].is_branch = 1'b0;
                   in_inst[j].is_store  = ($urandom % 20) == 0; end
          default: begin in_inst[j].is_branch = ($urandom % 100) == 0;
                   in_inst[j].is_store  = ($urandom % 2) == 0; end
        endcase
      end
      n_in = 3'($urandom % 5);
      n_lim = ($urandom % 8 == 0) ? 3'($urandom % 5) : 3'd4;
      table_full = ($urandom % 10) == 0;
      force_ckpt = ($urandom % 200) == 0;
      rb = ($urandom % 300) == 0;
      step();
    end
    check(cnt_br > 20 && cnt_st > 20 && cnt_in > 5 && cnt_cut > 20, "coverage");
    $display("branch=%0d insts=%0d stores=%0d cut=%0d", cnt_br, cnt_in, cnt_st, cnt_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
