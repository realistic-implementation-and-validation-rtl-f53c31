// tb_ifm_full: the end-to-end scenario of ifm_e2e with ifm_top at its
// default parameters (2048-point symbols, 512-sample cyclic prefix,
// correlation windows 467 and 416, 20 profiling symbols): seven 5 ms frames
// of 153600 samples each.
module tb_ifm_full;
  ifm_e2e #(.DEFAULTS(1), .FRAMES(7), .WATCHDOG(1300000)) e2e ();
endmodule
