// Self-checking testbench for ll_dep_mask.
//
// Directed part: the chain of the pseudo-ROB example: a long-latency load
// writes r1, an unrelated instruction follows, 'a' reads r1 and writes r2,
// another unrelated one, 'b' reads r2; a and b are dependent and carry the
// load's tag, the others are not. A redefinition by an independent
// instruction clears the bit, and a pending load that reads a marked register
// is a dependent rather than the start of a new chain. Random part (rollbacks
// included, which leave the mask unchanged): random instruction streams (up to
// four per cycle) are compared with a reference that keeps, per logical
// register, whether it descends from a long-latency load and from which.
module tb_ll_dep_mask;
  import cooo_pkg::*;

  localparam int unsigned W = 4;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] ext_v, ext_ll, ext_done, dep, ll;
  dec_inst_t ext_inst [W];
  ptag_t ext_pdst [W], dep_tag [W];
  logic rb;
  logic [NLOG-1:0] mask_o;

  ll_dep_mask #(.W(W)) dut (
    .clk, .rst_n, .ext_v, .ext_inst, .ext_pdst, .ext_ll_load(ext_ll), .ext_done,
    .rb, .dep, .ll, .dep_tag, .mask_o
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_dep = 0, n_ll = 0;
  bit    r_m [NLOG];
  ptag_t r_t [NLOG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic dec_inst_t mk(input bit s1v, input int s1, input bit s2v, input int s2,
                                   input bit dv, input int d);
    dec_inst_t i;
    i = '0;
    i.src1_v = s1v; i.src1 = 5'(s1); i.src2_v = s2v; i.src2 = 5'(s2);
    i.dst_v = dv; i.dst = 5'(d);
    return i;
  endfunction

  task automatic cycle_check();
    #1;
    for (int j = 0; j < W; j++) begin
      bit s1, s2, e;
      ptag_t t;
      s1 = ext_inst[j].src1_v && r_m[ext_inst[j].src1];
      s2 = ext_inst[j].src2_v && r_m[ext_inst[j].src2];
      t  = s1 ? r_t[ext_inst[j].src1] : r_t[ext_inst[j].src2];
      e  = ext_v[j] && (s1 || s2) && !ext_done[j];
      if (ext_v[j]) begin
        check(dep[j] == e, "dep");
        check(ll[j] == (ext_ll[j] && !e), "new chain");
        if (e) check(dep_tag[j] == t, "dep tag");
      end
      if (e) n_dep++;
      if (ext_v[j] && ext_ll[j] && !e) n_ll++;
      if (ext_v[j] && ext_inst[j].dst_v) begin
        if (e) begin r_m[ext_inst[j].dst] = 1; r_t[ext_inst[j].dst] = t; end
        else if (ext_ll[j]) begin r_m[ext_inst[j].dst] = 1; r_t[ext_inst[j].dst] = ext_pdst[j]; end
        else r_m[ext_inst[j].dst] = 0;
      end
    end
    @(posedge clk); #1;
    // a rollback leaves the mask as it is
    for (int r = 0; r < NLOG; r++) check(mask_o[r] == r_m[r], "mask bit");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NLOG; r++) begin r_m[r] = 0; r_t[r] = '0; end
    ext_v = '0; ext_ll = '0; ext_done = '0; rb = 0;
    for (int j = 0; j < W; j++) begin ext_inst[j] = '0; ext_pdst[j] = '0; end
    #12 rst_n = 1;
    @(posedge clk); #1;

    // Ld r1 <- ; x ; a: r2 <- r1 ; x
    ext_v = 4'b1111; ext_ll = 4'b0001;
    ext_inst[0] = mk(1, 5, 0, 0, 1, 1);  ext_pdst[0] = 12'd77;
    ext_inst[1] = mk(1, 6, 1, 7, 1, 8);  ext_pdst[1] = 12'd78;
    ext_inst[2] = mk(1, 1, 1, 9, 1, 2);  ext_pdst[2] = 12'd79;
    ext_inst[3] = mk(1, 3, 0, 0, 1, 4);  ext_pdst[3] = 12'd80;
    #1;
    check(dep == 4'b0100 && dep_tag[2] == 12'd77, "a depends on the load");
    cycle_check();
    // b: r5 <- r2 ; independent redefinition of r1 ; reader of r1
    ext_v = 4'b0111; ext_ll = '0;
    ext_inst[0] = mk(1, 2, 0, 0, 1, 5);
    ext_inst[1] = mk(1, 10, 0, 0, 1, 1);
    ext_inst[2] = mk(1, 1, 0, 0, 1, 11);
    #1;
    check(dep == 4'b0001 && dep_tag[0] == 12'd77, "b depends, r1 cleared by redefinition");
    cycle_check();
    // a pending load reading r5 (marked) is a dependent, not a new chain
    ext_v = 4'b0001; ext_ll = 4'b0001;
    ext_inst[0] = mk(1, 5, 0, 0, 1, 20); ext_pdst[0] = 12'd90;
    #1;
    check(dep == 4'b0001 && ll == 4'b0000 && dep_tag[0] == 12'd77, "dependent load");
    cycle_check();

    for (int it = 0; it < 20000; it++) begin
      for (int j = 0; j < W; j++) begin
        ext_inst[j] = mk($urandom % 2, $urandom % 12, $urandom % 2, $urandom % 12,
                         ($urandom % 5) != 0, $urandom % 12);
        ext_pdst[j] = ptag_t'($urandom);
      end
      ext_v    = 4'($urandom);
      ext_ll   = 4'($urandom) & 4'($urandom) & 4'($urandom);
      ext_done = 4'($urandom) & 4'($urandom);
      rb       = ($urandom % 100) == 0;
      cycle_check();
    end
    check(n_dep > 1000 && n_ll > 1000, "coverage");
    $display("dependent=%0d long-latency loads=%0d", n_dep, n_ll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
