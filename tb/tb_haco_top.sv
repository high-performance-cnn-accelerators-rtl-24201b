// tb_haco_top: end-to-end test of the NP-P hybrid accelerator at reduced sizes
// (M_np = 4, N_np = 2, N_p = 8, small memories); see haco_tb_body.svh for the workload.
module tb_haco_top;
  import cnn_pkg::*;
  localparam int MNP = 4, NNP = 2, NPL = 8;
  localparam int FMRD = 512, WRD = 256, PAD = 128, PWD = 2048;
  `include "haco_tb_body.svh"

  haco_top #(
    .M_NP(MNP), .N_NP(NNP), .FMR_DEPTH(FMRD), .WR_DEPTH(WRD), .PEBUF_DEPTH(256), .MAX_W(16),
    .N_P(NPL), .M_P(4), .CACHE_D(128), .PA_DEPTH(PAD), .PW_DEPTH(PWD)
  ) dut (.*);
endmodule
