// End-to-end testbench of cooo_core at reduced sizes: 512 physical
// registers, 32-entry pseudo-ROB and instruction queue, 256-entry SLIQ,
// checkpoint thresholds 16/64/16 and a 150-cycle memory, so that every
// mechanism occurs many times in a short run. The program, execution model
// and checks are those of cooo_core_env.
module tb_cooo_core;
  cooo_core_env #(.FULL(1'b0)) env ();
endmodule
