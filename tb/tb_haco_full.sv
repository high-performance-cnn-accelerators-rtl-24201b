// tb_haco_full: the end-to-end workload of haco_tb_body.svh on haco_top with all of its
// default sizes (M_np = N_np = 32, N_p = 64, M_p = 4, full VGG-16 memory depths).
module tb_haco_full;
  import cnn_pkg::*;
  localparam int MNP = 32, NNP = 32, NPL = 64;
  localparam int FMRD = 33600, WRD = 65536, PAD = 25088, PWD = 131072;
  `include "haco_tb_body.svh"

  haco_top dut (.*);
endmodule
