// conv_pe: general 3x3 convolution processing element built from three retimed FIRs.
//
// Three cut-set retimed 3-tap FIRs (retimed_fir3) each filter one input row; their
// outputs are registered (the cut-set in front of the final adder) and summed. In the
// default PE_PARALLEL mode this is a 2-D 3x3 convolution of three row streams:
//
//     y[0][n] = sum_r sum_k w[r][k] * x[r][n-2-k]          (latency 2, y[1], y[2] = 0)
//
// Smaller kernels are obtained by zero weights. Two more modes make the PE general:
//   PE_SERIAL    : multiplexers chain the FIRs (row 1 and 2 take the delayed samples
//                  and the partial sum of the previous FIR) into one 9-tap 1-D filter
//                  y[0][n] = sum_j w[j/3][j%3] * x[0][n-3-j]       (latency 3)
//   PE_POINTWISE : the three registered FIR outputs are spliced side by side instead
//                  of summed, y[r][n] = sum_k w[r][k] * x[r][n-2-k], so a 1x1 kernel
//                  (only tap 0 non-zero) yields three outputs per cycle.
// The three modes and the mux/bit-splicing structure follow the general Conv-PE of the
// design; the exact alignment of the serial chain (an extra cascade register so each FIR
// lines up with the previous) is this implementation's choice. Mode is static while
// data streams; the filter is flushed by feeding zeros.
module conv_pe
  import cnn_pkg::*;
(
  input  logic     clk,
  input  pe_mode_e mode,
  input  act_t     x [KTAPS],           // one sample per row stream
  input  npw_t     w [KTAPS][KTAPS],    // w[r][k]: tap k of the FIR of row r
  output acc_t     y [KTAPS]
);
  acc_t fy   [KTAPS];
  act_t xc   [KTAPS];
  act_t fx   [KTAPS];
  acc_t fsin [KTAPS];
  acc_t yreg [KTAPS];

  // Serial mode muxes between the FIRs
  always_comb begin
    fx[0]   = x[0];
    fsin[0] = '0;
    for (int r = 1; r < KTAPS; r++) begin
      fx[r]   = (mode == PE_SERIAL) ? xc[r-1] : x[r];
      fsin[r] = (mode == PE_SERIAL) ? fy[r-1] : '0;
    end
  end

  for (genvar r = 0; r < KTAPS; r++) begin : g_fir
    retimed_fir3 u_fir (
      .clk  (clk),
      .x    (fx[r]),
      .sin  (fsin[r]),
      .w    (w[r]),
      .y    (fy[r]),
      .xcas (xc[r])
    );
  end

  // Cut-set registers in front of the final adder
  always_ff @(posedge clk) yreg <= fy;

  always_comb begin
    acc_t sum;
    sum = '0;
    for (int r = 0; r < KTAPS; r++) sum += yreg[r];
    unique case (mode)
      PE_SERIAL: begin
        y[0] = fy[KTAPS-1];
        y[1] = '0;
        y[2] = '0;
      end
      PE_POINTWISE: y = yreg;           // bit splicing
      default: begin
        y[0] = sum;
        y[1] = '0;
        y[2] = '0;
      end
    endcase
  end
endmodule
