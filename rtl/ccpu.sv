// ccpu: complex convolution processing unit - M_np Conv-PEs, a multi-level accumulator,
// a PE buffer for partial sums, ReLU and pooling.
//
// Each Conv-PE convolves one input channel (three row streams from its FPPB) with its
// own 3x3 kernel. The M_np results are added by a pipelined adder tree (levels of GRP
// values). When the layer has more input channels than M_np, the tree output of one
// iteration is added to the partial sum kept in the PE buffer (one entry per stream
// slot) and written back; in the first iteration the buffer is overwritten. In the last
// iteration the completed sum is requantized (arithmetic right shift by `shift`,
// saturation to 16 bits), passed through ReLU and, if `pool_en`, through 2x2 max
// pooling. Slots that are row separators of the integrated data flow (tag.keep = 0)
// produce no pixel: this is the ReLU module resetting the separator columns.
//
// Timing: a slot tag travels with the samples: the Conv-PE adds 2 cycles, the adder
// tree LEVELS cycles, the accumulate/ReLU stage and the pooling stage one each. The
// ordering (Conv-PEs, accumulator, PE buffer, ReLU, pooling buffer/PE/MUX) follows the
// design; the read-modify-write of the PE buffer in a single cycle (a distributed RAM)
// and the tag mechanism are this implementation's choices.
module ccpu
  import cnn_pkg::*;
#(
  parameter int unsigned M_NP        = 32,
  parameter int unsigned GRP         = 2,
  parameter int unsigned PEBUF_DEPTH = 50401,  // (W+1)*H+1 slots of a 224x224 map
  parameter int unsigned MAX_W       = 224
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pe_mode_e  pe_mode,
  input  logic      pool_en,
  input  logic [4:0] shift,
  input  act_t      x [M_NP][F],       // F row streams of each input channel
  input  kword_t    kernel [M_NP],     // one kernel per input channel
  input  slot_tag_t in_tag,
  output logic      out_valid,
  output act_t      out_pix,
  output logic      out_eol
);
  localparam int unsigned PE_LAT = 2;

  acc_t pe_y   [M_NP][KTAPS];
  acc_t pe_sum [M_NP];
  npw_t w      [M_NP][KTAPS][KTAPS];

  for (genvar m = 0; m < M_NP; m++) begin : g_pe
    for (genvar r = 0; r < KTAPS; r++) begin : g_r
      for (genvar k = 0; k < KTAPS; k++) begin : g_k
        assign w[m][r][k] = npw_t'(kernel[m][(r*KTAPS+k)*NPW_W +: NPW_W]);
      end
    end
    conv_pe u_pe (
      .clk  (clk),
      .mode (pe_mode),
      .x    (x[m]),
      .w    (w[m]),
      .y    (pe_y[m])
    );
    assign pe_sum[m] = pe_y[m][0];
  end

  // Tags follow the Conv-PE latency; the tree carries its own valid
  slot_tag_t tag_pe [PE_LAT+1];
  assign tag_pe[0] = in_tag;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 1; i <= PE_LAT; i++) tag_pe[i] <= '0;
    else        for (int i = 1; i <= PE_LAT; i++) tag_pe[i] <= tag_pe[i-1];

  localparam int unsigned LEVELS = tree_levels(M_NP, GRP);
  logic tree_valid;
  acc_t tree_sum;

  adder_tree #(.N(M_NP), .W(ACC_W), .GRP(GRP)) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tag_pe[PE_LAT].valid),
    .in        (pe_sum),
    .out_valid (tree_valid),
    .sum       (tree_sum)
  );

  slot_tag_t tag_tr [LEVELS+1];
  assign tag_tr[0] = tag_pe[PE_LAT];
  for (genvar l = 1; l <= LEVELS; l++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) tag_tr[l] <= '0;
      else        tag_tr[l] <= tag_tr[l-1];
  end
  slot_tag_t t;
  assign t = tag_tr[LEVELS];

  // PE buffer: partial sums across input-channel iterations
  acc_t pebuf [PEBUF_DEPTH];
  acc_t total;
  assign total = t.first ? tree_sum : pebuf[t.addr] + tree_sum;

  always_ff @(posedge clk)
    if (tree_valid && !t.last) pebuf[t.addr] <= total;

  // Requantize + ReLU
  logic       r_valid, r_eol, r_odd;
  logic [8:0] r_col;
  act_t       r_pix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_eol   <= 1'b0;
      r_odd   <= 1'b0;
      r_col   <= '0;
      r_pix   <= '0;
    end else begin
      r_valid <= tree_valid && t.last && t.keep;
      r_eol   <= tree_valid && t.last && t.eol;
      r_odd   <= t.row_odd;
      r_col   <= t.col;
      r_pix   <= (total[ACC_W-1]) ? '0 : sat_act(total >>> shift);
    end
  end

  max_pool #(.MAX_W(MAX_W)) u_pool (
    .clk        (clk),
    .rst_n      (rst_n),
    .pool_en    (pool_en),
    .in_valid   (r_valid),
    .in_pix     (r_pix),
    .in_col     (r_col),
    .in_row_odd (r_odd),
    .in_eol     (r_eol),
    .out_valid  (out_valid),
    .out_pix    (out_pix),
    .out_eol    (out_eol)
  );

  a_tree_aligned: assert property (@(posedge clk) disable iff (!rst_n) tree_valid == t.valid)
    else $error("ccpu: tag and data out of step");
endmodule
