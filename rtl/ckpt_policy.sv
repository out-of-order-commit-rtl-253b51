// Checkpoint placement heuristic.
//
// Decides, for each rename group, whether a checkpoint is taken and before
// which instruction, and how many instructions of the group may enter. Three
// thresholds count from the last checkpoint:
//   * a branch that arrives once BR_THRESH (64) instructions have been taken
//     into the current group gets a checkpoint in front of it, so a
//     mispredicted branch rolls back over as little work as possible;
//   * after MAX_INSTS (512) instructions a checkpoint is taken in front of
//     whatever instruction comes next;
//   * after MAX_STORES (64) stores a checkpoint is taken in front of the next
//     instruction, since stores hold their load/store queue entries until
//     their checkpoint commits.
// force_ckpt puts a checkpoint in front of the first instruction of the group
// (used to re-execute an excepting instruction with a checkpoint of its own).
//
// At most one checkpoint is taken per cycle. When a second one would be
// needed, or the checkpoint table is full, the group is cut in front of that
// instruction (n_acc) and the rest waits for the next cycle. n_lim caps
// n_acc for other resources (queue space, free registers).
//
// Interface and timing: n_in valid instructions form a prefix of in_inst; all
// outputs are combinational; the group counters update on the clock edge and
// are cleared by a rollback, after which the restored checkpoint is empty.
//
// Following the description: the three thresholds and their values, and
// the one checkpoint that always exists. This design's own choices: the
// checkpoint goes in front of the branch that meets the first threshold, one
// checkpoint per cycle, and decode waits while the table is full.
module ckpt_policy
  import cooo_pkg::*;
#(
  parameter int unsigned W          = WIDTH,
  parameter int unsigned BR_THRESH  = 64,
  parameter int unsigned MAX_INSTS  = 512,
  parameter int unsigned MAX_STORES = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  dec_inst_t              in_inst [W],
  input  logic [$clog2(W+1)-1:0] n_in,
  input  logic [$clog2(W+1)-1:0] n_lim,
  input  logic                   force_ckpt,
  input  logic                   table_full,
  input  logic                   rb,
  output logic [$clog2(W+1)-1:0] n_acc,
  output logic                   ckpt_take,
  output logic [$clog2(W)-1:0]   ckpt_pos,
  output logic [$clog2(W+1)-1:0] n_old,
  output logic [$clog2(W+1)-1:0] st_old,
  output logic [$clog2(W+1)-1:0] n_new,
  output logic [$clog2(W+1)-1:0] st_new,
  // why the checkpoint was taken (for statistics)
  output logic                   why_branch,
  output logic                   why_insts,
  output logic                   why_stores
);

  localparam int unsigned CW = 16;
  localparam int unsigned NW = $clog2(W+1);

  logic [CW-1:0] icnt_q, scnt_q, icnt_d, scnt_d;

  always_comb begin
    logic          stop, nb, ni, ns, need;
    logic [CW-1:0] ic, sc;
    nb = 1'b0;
    ni = 1'b0;
    ns = 1'b0;
    need = 1'b0;
    ic = icnt_q;
    sc = scnt_q;
    stop       = 1'b0;
    n_acc      = '0;
    ckpt_take  = 1'b0;
    ckpt_pos   = '0;
    n_old      = '0;
    st_old     = '0;
    n_new      = '0;
    st_new     = '0;
    why_branch = 1'b0;
    why_insts  = 1'b0;
    why_stores = 1'b0;
    for (int j = 0; j < W; j++) begin
      if (!stop && j < int'(n_in) && j < int'(n_lim)) begin
        nb   = in_inst[j].is_branch && ic >= CW'(BR_THRESH);
        ni   = ic >= CW'(MAX_INSTS);
        ns   = sc >= CW'(MAX_STORES);
        need = nb || ni || ns || (force_ckpt && j == 0);
        if (need && (ckpt_take || table_full)) begin
          stop = 1'b1;
        end else begin
          if (need) begin
            ckpt_take  = 1'b1;
            ckpt_pos   = $clog2(W)'(j);
            why_branch = nb;
            why_insts  = ni;
            why_stores = ns;
            ic = '0;
            sc = '0;
          end
          ic++;
          if (in_inst[j].is_store) sc++;
          n_acc = NW'(j + 1);
          if (ckpt_take) begin
            n_new++;
            if (in_inst[j].is_store) st_new++;
          end else begin
            n_old++;
            if (in_inst[j].is_store) st_old++;
          end
        end
      end
    end
    icnt_d = ic;
    scnt_d = sc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt_q <= '0;
      scnt_q <= '0;
    end else if (rb) begin
      icnt_q <= '0;
      scnt_q <= '0;
    end else begin
      icnt_q <= icnt_d;
      scnt_q <= scnt_d;
    end
  end

endmodule
