// cnn_pkg: types and constants shared by the NP-P hybrid CNN accelerator.
//
// Word formats follow the hybrid quantization of the design: activations are
// 16-bit signed fixed point, NP-layer (regular, unpruned) weights are 8-bit
// signed fixed point with 7 fraction bits (range [-1, 1-2^-7]), and P-layer
// (pruned) weights are 4-bit power-of-two codes stored together with a 5-bit
// zero-run index, 9 bits per entry. The feature map memories hold F = 3
// horizontally adjacent activations per word (48 bits).
//
// Own choices: the 32-bit accumulator width, the 7 fraction bits of NP weights
// (from the [-1, 1-Q] clipping with 8 bits), the meaning of the P-weight codes
// (sign + exponent, value +/-2^-e; 4'b0111 = zero filler, 4'b1111 = end of
// kernel) and the field layout of the layer descriptors.
package cnn_pkg;

  localparam int unsigned ACT_W    = 16;  // activation bits
  localparam int unsigned NPW_W    = 8;   // NP-layer weight bits
  localparam int unsigned ACC_W    = 32;  // accumulator bits
  localparam int unsigned F        = 3;   // FIR parallelism / activations per FMR word
  localparam int unsigned KTAPS    = 3;   // taps of one FIR (3x3 Conv-PE)
  localparam int unsigned WFRAC    = 7;   // fraction bits of NP weights (Q = 2^-7)
  localparam int unsigned PW_W     = 4;   // P-layer weight code bits
  localparam int unsigned PIDX_W   = 5;   // P-layer zero-run index bits
  localparam int unsigned PENT_W   = PW_W + PIDX_W;  // one compressed entry

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [NPW_W-1:0] npw_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic [F*ACT_W-1:0]       fword_t;   // F packed activations, lane 0 in bits [15:0]
  typedef logic [9*NPW_W-1:0]       kword_t;   // 3x3 kernel, tap (r,k) at bits [(3r+k)*8 +: 8]

  // P-layer compressed weight entry
  typedef struct packed {
    logic [PIDX_W-1:0] run;   // zeros between this and the previous kept weight
    logic [PW_W-1:0]   code;  // {sign, exponent}
  } pentry_t;

  localparam logic [PW_W-1:0] PCODE_ZERO = 4'b0111;
  localparam logic [PW_W-1:0] PCODE_END  = 4'b1111;

  // Conv-PE operating modes (general Conv-PE)
  typedef enum logic [1:0] {
    PE_PARALLEL  = 2'd0,  // three rows, 2-D 3x3 (or smaller) convolution
    PE_SERIAL    = 2'd1,  // three FIRs chained: one 9-tap 1-D convolution
    PE_POINTWISE = 2'd2   // three independent FIR outputs spliced side by side
  } pe_mode_e;

  // Position tag of one stream slot, travelling with the data through a CCPU
  typedef struct packed {
    logic        valid;    // slot carries stream data
    logic [15:0] addr;     // PE buffer address (slot number within the map)
    logic        first;    // first input-channel iteration: overwrite partial sum
    logic        last;     // last iteration: partial sum is final, emit it
    logic        keep;     // slot is a real output pixel (not a row separator)
    logic        eol;      // slot closes output row (row_odd gives its parity)
    logic [8:0]  col;      // output column of the pixel
    logic        row_odd;  // parity of the output row
  } slot_tag_t;

  // One NP (convolution) layer
  typedef struct packed {
    logic [8:0]  w;        // feature map width  W (pixels)
    logic [8:0]  h;        // feature map height H
    logic [5:0]  groups;   // ceil(M / M_np): input channel iterations
    logic [5:0]  passes;   // ceil(N / N_np): output channel iterations
    logic        pool;     // 2x2 max pooling after ReLU
    logic [4:0]  shift;    // requantization right shift (normally WFRAC)
    logic [19:0] wbase;    // first weight RAM word of the layer
  } np_layer_t;

  // One P (pruned, fully connected) layer
  typedef struct packed {
    logic [15:0] u_out;    // output neurons
    logic [8:0]  groups;   // ceil(U_out / N_p)
    logic [11:0] kstride;  // lane RAM words per group of N_p kernels
    logic [19:0] wbase;    // first lane RAM word of the layer
    logic        relu;     // apply ReLU to the outputs
    logic [4:0]  shift;    // requantization right shift (normally WFRAC)
  } p_layer_t;

  // Saturate a wide value to a signed activation
  function automatic act_t sat_act(input logic signed [ACC_W-1:0] v);
    if (v > acc_t'(32767))       return act_t'(32767);
    else if (v < acc_t'(-32768)) return act_t'(-32768);
    else                         return act_t'(v);
  endfunction

  // Register levels of an adder tree adding n values in groups of g
  function automatic int unsigned tree_levels(input int unsigned n, input int unsigned g);
    int unsigned l = 0;
    while (n > 1) begin
      n = (n + g - 1) / g;
      l++;
    end
    return l;
  endfunction

  // Number of FMR words per stored feature-map row: at least one zero follows each row
  function automatic logic [8:0] row_words(input logic [8:0] w);
    return 9'((int'(w) + 3) / 3);
  endfunction

endpackage
