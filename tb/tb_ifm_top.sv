// tb_ifm_top: end-to-end test of ifm_top at a reduced symbol size
// (N = 512, CP = 256, correlation windows CP-45 and CP-96, 4 profiling
// symbols); see ifm_e2e for the scenario and the checks.
module tb_ifm_top;
  ifm_e2e #(.N(512), .CP(256), .LW(211), .LH(160), .PROF(4), .DEFAULTS(0),
            .FRAMES(7), .WATCHDOG(600000)) e2e ();
endmodule
