// weight_buffer: double-buffered weight buffer (WB) between a weight RAM and its CCPU.
//
// It holds the M_np 3x3 kernels one CCPU needs for one input-channel iteration, twice:
// the active bank drives all kernels in parallel to the Conv-PEs, while the shadow bank
// is filled from the weight RAM one kernel per cycle (`ld_en`, `ld_idx`, `ld_kernel`).
// A `swap` pulse exchanges the banks between two iterations, so loading the next
// iteration's weights costs no time. Kernels use the kword_t layout of cnn_pkg. That the
// weights are loaded ahead of the next convolution follows the design; the two-bank
// organisation and the swap handshake are this implementation's choice.
module weight_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned M_NP = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ld_en,
  input  logic [$clog2(M_NP)-1:0] ld_idx,
  input  kword_t                  ld_kernel,
  input  logic                    swap,
  output kword_t                  kernel [M_NP]
);
  kword_t bank [2][M_NP];
  logic   act;   // active bank

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act <= 1'b0;
    else if (swap) act <= ~act;
  end

  always_ff @(posedge clk)
    if (ld_en) bank[~act][ld_idx] <= ld_kernel;

  assign kernel = bank[act];
endmodule
