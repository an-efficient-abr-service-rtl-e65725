// tb_abr_engine_full: end-to-end test of the ABR service engine with every
// parameter and register at its default (T = 353 cells, about 1 ms; W = 3532
// cells, about 10 ms, on a 353207 cells/s link); see tb_abr_env for the
// closed-loop source, queue and checking model. Each of the two phases lasts
// 353207 cell times, one second of the link, so the run covers the same
// two-second span as the published steady-state plots of QC and ER.
module tb_abr_engine_full;
  tb_abr_env #(.FULL(1'b1), .PHASE_CELLS(353207)) env ();
endmodule
