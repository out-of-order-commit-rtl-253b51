// Long-latency dependence mask.
//
// Finds, among the instructions leaving the pseudo-ROB, those that depend on
// a long-latency load. It holds one bit per logical register (32 bits). A
// long-latency load sets the bit of its destination. An instruction that
// reads a register whose bit is set is dependent and sets the bit of its own
// destination; an instruction that is not dependent clears the bit of the
// register it redefines. This is the classic forward data-flow bit-vector
// method.
//
// Next to each bit the block keeps the physical destination register of the
// load the chain starts from. A dependent instruction reports that tag
// (dep_tag), so the SLIQ can wake it when that register is written. When an
// instruction reads two marked registers, the tag of its first source is
// used. A pending load that itself depends on a marked register is a
// dependent like any other instruction (it waits for the first load); only a
// pending load that is not dependent starts a chain of its own and is
// reported on ll.
//
// Interface and timing: up to W instructions are presented per cycle, in
// program order, on ext_*; dep/dep_tag/ll are combinational and see the
// effect of older instructions of the same cycle. The mask updates on the
// clock edge. A rollback leaves it as it is: the chains of older, surviving
// long-latency loads must stay known, and a stale mark left by a squashed
// instruction only sends an instruction through the SLIQ without need (its
// load identifier is no longer pending, so it comes back at once). The rb
// input is kept for interface stability and is not used.
//
// Following the description: the 32-bit mask, its set and clear rules and the
// association with the load's destination register. This design's own
// choices: the per-bit tag, the first-source rule, dependence taking
// precedence over being a long-latency load, treating an instruction
// that has already finished as not dependent, and keeping the mask over a
// rollback.
module ll_dep_mask
  import cooo_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  ext_v,
  input  dec_inst_t     ext_inst [W],
  input  ptag_t         ext_pdst [W],
  input  logic [W-1:0]  ext_ll_load,  // a load that has not produced its value
  input  logic [W-1:0]  ext_done,     // instruction already finished
  input  logic          rb,
  output logic [W-1:0]  dep,
  output logic [W-1:0]  ll,           // a load that starts a new chain
  output ptag_t         dep_tag [W],
  output logic [NLOG-1:0] mask_o
);

  logic [NLOG-1:0] mask_q, mask_d;
  ptag_t           tag_q [NLOG];
  ptag_t           tag_d [NLOG];

  always_comb begin
    mask_d = mask_q;
    tag_d  = tag_q;
    for (int j = 0; j < W; j++) begin
      logic  s1, s2;
      s1 = ext_inst[j].src1_v && mask_d[ext_inst[j].src1];
      s2 = ext_inst[j].src2_v && mask_d[ext_inst[j].src2];
      dep[j]     = 1'b0;
      dep_tag[j] = '0;
      ll[j]      = 1'b0;
      if (ext_v[j]) begin
        if ((s1 || s2) && !ext_done[j]) begin
          dep[j]     = 1'b1;
          dep_tag[j] = s1 ? tag_d[ext_inst[j].src1] : tag_d[ext_inst[j].src2];
          if (ext_inst[j].dst_v) begin
            mask_d[ext_inst[j].dst] = 1'b1;
            tag_d[ext_inst[j].dst]  = dep_tag[j];
          end
        end else if (ext_ll_load[j]) begin
          ll[j] = 1'b1;
          if (ext_inst[j].dst_v) begin
            mask_d[ext_inst[j].dst] = 1'b1;
            tag_d[ext_inst[j].dst]  = ext_pdst[j];
          end
        end else if (ext_inst[j].dst_v) begin
          mask_d[ext_inst[j].dst] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q <= '0;
      for (int r = 0; r < NLOG; r++) tag_q[r] <= '0;
    end else begin
      mask_q <= mask_d;
      tag_q  <= tag_d;
    end
  end

  assign mask_o = mask_q;

endmodule
