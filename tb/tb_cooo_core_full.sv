// End-to-end testbench of cooo_core with every parameter at its default (the
// main configuration: 4096 physical registers, 8 checkpoints, 128-entry
// pseudo-ROB and instruction queue, 2048-entry SLIQ, checkpoint thresholds
// 64/512/64) and a 1000-cycle memory. The program, execution model and
// checks are those of cooo_core_env.
module tb_cooo_core_full;
  cooo_core_env #(
    .FULL(1'b1), .BR_THRESH(64), .MAX_INSTS(512), .MAX_STORES(64),
    .MISS_LAT(1000), .NPROG(6000), .MAXCYC(400000)
  ) env ();
endmodule
