// Pseudo-ROB.
//
// A FIFO that every renamed instruction enters at the same time as the
// instruction queue. It does not commit anything (checkpoints do that); it
// only delays the decision whether an instruction is long-latency until the
// instruction is the oldest in the FIFO and has to leave. At that moment a
// load that has not produced its value is a long-latency load, and the
// dependence mask decides which of the following instructions depend on one.
//
// The slot of an instruction is the low bits of its sequence number, which
// the FIFO hands out (next_seq). A finishing instruction marks its slot done
// when the slot still holds the same sequence number. A rollback clears the
// slots of the squashed checkpoints; cleared slots still leave the FIFO in
// order but are presented with ext_v low.
//
// Interface and timing:
//  * push: n_push instructions (a prefix of push_uop), written at the clock
//    edge; push_uop[i].seq must equal next_seq + i.
//  * extraction: the oldest entries leave when the FIFO would otherwise have
//    less than W free slots, or when drain is high, at most W per cycle, and
//    only while ext_allow is high. ext_* show them combinationally in the
//    cycle they leave.
//  * space: free slot count, registered.
//
// Following the description: a FIFO filled at decode, emptied only from the
// oldest end, with the long-latency test at extraction. This design's own
// choices: extraction as late as the capacity allows, the drain input, the
// sequence-number slot addressing and the holes left by a rollback.
module pseudo_rob
  import cooo_pkg::*;
#(
  parameter int unsigned SIZE    = 128,
  parameter int unsigned W       = WIDTH,
  parameter int unsigned IQ_SIZE = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output seq_t                   next_seq,
  output logic [$clog2(SIZE+1)-1:0] space,
  input  logic [$clog2(W+1)-1:0] n_push,
  input  uop_t                   push_uop [W],
  input  logic [$clog2(IQ_SIZE)-1:0] push_iq_slot [W],
  input  done_t                  fin [W],
  input  logic                   ext_allow,
  input  logic                   drain,
  output logic [W-1:0]           ext_v,
  output uop_t                   ext_uop [W],
  output logic [$clog2(IQ_SIZE)-1:0] ext_iq_slot [W],
  output logic [W-1:0]           ext_done,
  output logic [W-1:0]           ext_ll_load,
  output logic [$clog2(W+1)-1:0] n_ext,
  input  logic [NCKPT_MAX-1:0]   squash_mask,
  input  logic                   squash
);

  localparam int unsigned AW = $clog2(SIZE);
  localparam int unsigned NW = $clog2(W+1);

  uop_t           mem_uop  [SIZE];
  logic [$clog2(IQ_SIZE)-1:0] mem_slot [SIZE];
  logic [SIZE-1:0] vld_q, done_q;
  seq_t           head_q, tail_q;
  logic [SEQ_W-1:0] count;

  assign count    = tail_q - head_q;
  assign next_seq = tail_q;
  assign space    = $bits(space)'(SIZE - int'(count));

  always_comb begin
    int unsigned want;
    if (drain) want = (int'(count) < W) ? int'(count) : W;
    else if (int'(count) + W > SIZE) want = int'(count) + W - SIZE;
    else want = 0;
    if (!ext_allow) want = 0;
    n_ext = NW'(want);
    for (int j = 0; j < W; j++) begin
      logic [AW-1:0] a;
      a = AW'(head_q + seq_t'(j));
      ext_uop[j]     = mem_uop[a];
      ext_iq_slot[j] = mem_slot[a];
      ext_v[j]       = (j < int'(want)) && vld_q[a];
      ext_done[j]    = done_q[a];
      ext_ll_load[j] = mem_uop[a].d.is_load && !done_q[a];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      vld_q  <= '0;
      done_q <= '0;
    end else begin
      for (int k = 0; k < W; k++)
        if (fin[k].valid && vld_q[AW'(fin[k].seq)] && mem_uop[AW'(fin[k].seq)].seq == fin[k].seq)
          done_q[AW'(fin[k].seq)] <= 1'b1;
      for (int j = 0; j < W; j++)
        if (j < int'(n_ext)) vld_q[AW'(head_q + seq_t'(j))] <= 1'b0;
      head_q <= head_q + seq_t'(n_ext);
      if (squash) begin
        for (int i = 0; i < SIZE; i++)
          if (squash_mask[mem_uop[i].ckpt]) vld_q[i] <= 1'b0;
      end else begin
        for (int j = 0; j < W; j++)
          if (j < int'(n_push)) begin
            vld_q[AW'(tail_q + seq_t'(j))]  <= 1'b1;
            done_q[AW'(tail_q + seq_t'(j))] <= 1'b0;
          end
        tail_q <= tail_q + seq_t'(n_push);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!squash)
      for (int j = 0; j < W; j++)
        if (j < int'(n_push)) begin
          mem_uop[AW'(tail_q + seq_t'(j))]  <= push_uop[j];
          mem_slot[AW'(tail_q + seq_t'(j))] <= push_iq_slot[j];
        end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(n_push) <= SIZE + int'(n_ext));

endmodule
