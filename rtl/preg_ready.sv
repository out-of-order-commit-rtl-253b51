// Physical register ready table.
//
// One bit per physical register: set when the instruction writing the
// register finishes (fin broadcast), cleared when rename hands the register
// to a new instruction. The instruction queue reads it when an instruction
// is inserted, and the SLIQ reads it to see whether the long-latency load an
// entry waits for has completed. At reset every register is ready.
//
// Timing: both updates take effect at the clock edge; a register allocated
// and finished in the same cycle ends up not ready (allocation wins).
// The table itself is this design's own; the description only says that the
// SLIQ tracks when the load's destination register gets its value.
module preg_ready
  import cooo_pkg::*;
#(
  parameter int unsigned NPHYS = 4096,
  parameter int unsigned W     = WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     alloc_v,
  input  ptag_t            alloc_tag [W],
  input  done_t            fin [W],
  output logic [NPHYS-1:0] ready
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '1;
    end else begin
      logic [NPHYS-1:0] r;
      r = ready;
      for (int k = 0; k < W; k++)
        if (fin[k].valid && fin[k].dst_v) r[fin[k].pdst] = 1'b1;
      for (int j = 0; j < W; j++)
        if (alloc_v[j]) r[alloc_tag[j]] = 1'b0;
      ready <= r;
    end
  end

endmodule
