// tb_abr_engine: end-to-end test of the ABR service engine with shortened
// T (40 cells) and W (400 cells) periods set through the register bus; see
// tb_abr_env for the closed-loop source, queue and checking model.
module tb_abr_engine;
  tb_abr_env #(.FULL(1'b0), .PHASE_CELLS(30000)) env ();
endmodule
