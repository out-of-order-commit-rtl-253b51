// Instruction queue (the small, fast one).
//
// A conventional out-of-order issue queue: each entry holds a renamed
// instruction and a ready bit per source operand. Finishing instructions
// broadcast their destination tag and set the matching ready bits (wakeup);
// every cycle up to W entries whose operands are both ready are sent to the
// execution units (select). The queue is kept small because its wakeup and
// select logic are associative; instructions that would wait a long time are
// taken out of it and parked in the SLIQ instead.
//
// Interface and timing:
//  * insert: NINS ports (decode and SLIQ re-insertion). ins_slot[i] is the
//    free entry port i will use, shown combinationally; the caller inserts
//    on port i only while ins_slot_ok[i] is high. The caller supplies the
//    ready bits, including wakeups of the same cycle.
//  * wakeup: fin[k] with dst_v sets ready bits at the clock edge.
//  * select: iss_v/iss_uop are combinational from the registered entries;
//    the lowest-numbered ready entries win. Issued entries leave at the edge.
//  * invalidate: inv_* ask to remove an entry (slot and sequence number
//    given) to move the instruction to the SLIQ; inv_ok says it was there
//    and was not issuing in the same cycle.
//  * squash: entries of the checkpoints in squash_mask are removed.
//
// Following the description: a small general-purpose queue with wakeup and
// select, out of which instructions depending on long-latency loads are
// invalidated while the pseudo-ROB inserts them into the SLIQ. This design's
// own choices: a single unified queue, position-based select, the number of
// insert ports and operand readiness tracked by ready bits.
module issue_queue
  import cooo_pkg::*;
#(
  parameter int unsigned SIZE = 128,
  parameter int unsigned W    = WIDTH,
  parameter int unsigned NINS = 2 * WIDTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // insert
  input  logic [NINS-1:0]         ins_v,
  input  uop_t                    ins_uop  [NINS],
  input  logic [NINS-1:0]         ins_rdy1,
  input  logic [NINS-1:0]         ins_rdy2,
  output logic [$clog2(SIZE)-1:0] ins_slot [NINS],
  output logic [NINS-1:0]         ins_slot_ok,
  output logic [$clog2(SIZE+1)-1:0] n_free,
  // wakeup
  input  done_t                   fin [W],
  // select
  output logic [W-1:0]            iss_v,
  output uop_t                    iss_uop [W],
  // invalidate (move to SLIQ)
  input  logic [W-1:0]            inv_v,
  input  logic [$clog2(SIZE)-1:0] inv_slot [W],
  input  seq_t                    inv_seq [W],
  output logic [W-1:0]            inv_ok,
  // squash
  input  logic                    squash,
  input  logic [NCKPT_MAX-1:0]    squash_mask
);

  localparam int unsigned AW = $clog2(SIZE);

  uop_t            ent  [SIZE];
  logic [SIZE-1:0] vld_q, r1_q, r2_q;
  logic [SIZE-1:0] issuing;

  // free slot search
  always_comb begin
    int unsigned k;
    k = 0;
    n_free = '0;
    for (int i = 0; i < NINS; i++) begin
      ins_slot[i]    = '0;
      ins_slot_ok[i] = 1'b0;
    end
    for (int e = 0; e < SIZE; e++) begin
      if (!vld_q[e]) begin
        n_free++;
        if (k < NINS) begin
          ins_slot[k]    = AW'(e);
          ins_slot_ok[k] = 1'b1;
          k++;
        end
      end
    end
  end

  // select
  always_comb begin
    int unsigned k;
    k = 0;
    issuing = '0;
    for (int i = 0; i < W; i++) begin
      iss_v[i]   = 1'b0;
      iss_uop[i] = '0;
    end
    for (int e = 0; e < SIZE; e++) begin
      if (vld_q[e] && r1_q[e] && r2_q[e] && k < W) begin
        iss_v[k]   = 1'b1;
        iss_uop[k] = ent[e];
        issuing[e] = 1'b1;
        k++;
      end
    end
  end

  // invalidate
  always_comb begin
    for (int j = 0; j < W; j++)
      inv_ok[j] = inv_v[j] && vld_q[inv_slot[j]] && !issuing[inv_slot[j]] &&
                  ent[inv_slot[j]].seq == inv_seq[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      r1_q  <= '0;
      r2_q  <= '0;
    end else begin
      logic [SIZE-1:0] v, r1, r2;
      v  = vld_q & ~issuing;
      r1 = r1_q;
      r2 = r2_q;
      for (int j = 0; j < W; j++)
        if (inv_ok[j]) v[inv_slot[j]] = 1'b0;
      for (int e = 0; e < SIZE; e++)
        for (int k = 0; k < W; k++)
          if (fin[k].valid && fin[k].dst_v) begin
            if (ent[e].psrc1 == fin[k].pdst) r1[e] = 1'b1;
            if (ent[e].psrc2 == fin[k].pdst) r2[e] = 1'b1;
          end
      if (squash) begin
        for (int e = 0; e < SIZE; e++)
          if (squash_mask[ent[e].ckpt]) v[e] = 1'b0;
      end else begin
        for (int i = 0; i < NINS; i++)
          if (ins_v[i] && ins_slot_ok[i]) begin
            v[ins_slot[i]]  = 1'b1;
            r1[ins_slot[i]] = ins_rdy1[i];
            r2[ins_slot[i]] = ins_rdy2[i];
          end
      end
      vld_q <= v;
      r1_q  <= r1;
      r2_q  <= r2;
    end
  end

  always_ff @(posedge clk) begin
    if (!squash)
      for (int i = 0; i < NINS; i++)
        if (ins_v[i] && ins_slot_ok[i]) ent[ins_slot[i]] <= ins_uop[i];
  end

endmodule
