// haco_top: NP-P hybrid CNN accelerator - the NP-layers (regular, 8-bit fixed-point
// convolution layers) run on the distributed conv engine, the P-layers (pruned layers
// with power-of-two weights) on the SAC-PU engine, and the two work as a two-stage
// pipeline on consecutive images.
//
// Flow of one image: the host writes the input image into the feature map RAMs and the
// layer tables, then pulses `np_start`. When the NP-layers are done, the last feature
// map is handed over from the map buffer to the P-layers' input activation buffer, one
// activation per cycle, flattened channel-major: index (c*H + y)*W + x with H, W, C given
// by `xfer_h`, `xfer_w`, `xfer_ch`. The P-layers are then started automatically and the
// NP engine is free for the next image while they run; the overall rate is set by the
// slower stage. `frame_done` pulses when the P-layers finish; their output is read with
// `res_raddr/res_rdata`. `np_ready` is low while the NP engine or the hand-over is busy;
// `np_start` is ignored then. A new image is handed over only once the P engine is idle.
//
// The NP-before-P split, the map buffer to input activation path and the overlap of the
// two stages follow the design. All memories are on chip; weights and images are loaded
// by the host. The hand-over ordering and the single clock are this implementation's
// choices. The P-layers are fully connected layers only.
module haco_top
  import cnn_pkg::*;
#(
  parameter int unsigned M_NP        = 32,
  parameter int unsigned N_NP        = 32,
  parameter int unsigned GRP         = 2,
  parameter int unsigned FMR_DEPTH   = 33600,
  parameter int unsigned WR_DEPTH    = 65536,
  parameter int unsigned PEBUF_DEPTH = 50401,
  parameter int unsigned MAX_W       = 224,
  parameter int unsigned N_P         = 64,
  parameter int unsigned M_P         = 4,
  parameter int unsigned CACHE_D     = 2048,
  parameter int unsigned PA_DEPTH    = 25088,
  parameter int unsigned PW_DEPTH    = 131072,
  localparam int unsigned FAW = $clog2(FMR_DEPTH),
  localparam int unsigned WAW = $clog2(WR_DEPTH),
  localparam int unsigned MBW = (M_NP > 1) ? $clog2(M_NP) : 1,
  localparam int unsigned NBW = (N_NP > 1) ? $clog2(N_NP) : 1,
  localparam int unsigned AAW = $clog2(PA_DEPTH),
  localparam int unsigned PWW = $clog2(PW_DEPTH),
  localparam int unsigned LNW = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // NP-layer loading
  input  logic           fmr_we,
  input  logic [MBW-1:0] fmr_bank,
  input  logic [FAW-1:0] fmr_addr,
  input  fword_t         fmr_wdata,
  input  logic           wr_we,
  input  logic [NBW-1:0] wr_bank,
  input  logic [WAW-1:0] wr_addr,
  input  kword_t         wr_wdata,
  input  logic           np_lt_we,
  input  logic [3:0]     np_lt_idx,
  input  np_layer_t      np_lt_data,
  // P-layer loading
  input  logic           pw_we,
  input  logic [LNW-1:0] pw_lane,
  input  logic [PWW-1:0] pw_addr,
  input  pentry_t        pw_wdata,
  input  logic           p_lt_we,
  input  logic [1:0]     p_lt_idx,
  input  p_layer_t       p_lt_data,
  // run control
  input  logic [4:0]     np_n_layers,
  input  logic [2:0]     p_n_layers,
  input  logic [8:0]     xfer_w,
  input  logic [8:0]     xfer_h,
  input  logic [9:0]     xfer_ch,
  input  logic           np_start,
  output logic           np_ready,
  output logic           np_busy,
  output logic           p_busy,
  output logic           frame_done,
  // result
  input  logic [AAW-1:0] res_raddr,
  output act_t           res_rdata
);
  logic           np_done, p_done, np_go;
  logic [FAW-1:0] mb_raddr;
  fword_t         mb_rdata [M_NP];

  typedef enum logic [1:0] {X_IDLE, X_WAITP, X_RUN, X_START} xs_e;
  xs_e xs;

  assign np_go    = np_start && np_ready;
  assign np_ready = !np_busy && (xs == X_IDLE);

  np_engine #(
    .M_NP(M_NP), .N_NP(N_NP), .GRP(GRP), .FMR_DEPTH(FMR_DEPTH), .WR_DEPTH(WR_DEPTH),
    .PEBUF_DEPTH(PEBUF_DEPTH), .MAX_W(MAX_W), .MAX_LAYERS(16)
  ) u_np (
    .clk(clk), .rst_n(rst_n),
    .fmr_we(fmr_we), .fmr_bank(fmr_bank), .fmr_addr(fmr_addr), .fmr_wdata(fmr_wdata),
    .wr_we(wr_we), .wr_bank(wr_bank), .wr_addr(wr_addr), .wr_wdata(wr_wdata),
    .lt_we(np_lt_we), .lt_idx(np_lt_idx), .lt_data(np_lt_data),
    .start(np_go), .n_layers(np_n_layers), .busy(np_busy), .done(np_done),
    .mb_raddr(mb_raddr), .mb_rdata(mb_rdata));

  // ---------------- hand-over: map buffer -> P input activations ----------------
  logic [9:0]     xc;           // channel
  logic [8:0]     xy, xx;       // row, column
  logic [8:0]     rw;
  logic           xv;           // read issued last cycle
  logic [MBW-1:0] xbank;
  logic [1:0]     xlane;
  logic [AAW-1:0] xidx, xidx_d;
  logic           a_we;
  act_t           a_wd;

  assign rw       = row_words(xfer_w);
  assign xbank    = MBW'(xc % M_NP);
  assign mb_raddr = FAW'(32'(xc / M_NP) * 32'(xfer_h) * 32'(rw) + 32'(xy) * 32'(rw) + 32'(xx) / 3);
  assign xidx     = AAW'((32'(xc) * 32'(xfer_h) + 32'(xy)) * 32'(xfer_w) + 32'(xx));

  logic [MBW-1:0] xbank_d;
  logic [1:0]     xlane_d;
  assign xlane = 2'(xx % 3);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs      <= X_IDLE;
      xc      <= '0;
      xy      <= '0;
      xx      <= '0;
      xv      <= 1'b0;
      xbank_d <= '0;
      xlane_d <= '0;
      xidx_d  <= '0;
    end else begin
      xv <= 1'b0;
      unique case (xs)
        X_IDLE:  if (np_done) xs <= X_WAITP;
        X_WAITP: if (!p_busy) begin
          xc <= '0;
          xy <= '0;
          xx <= '0;
          xs <= X_RUN;
        end
        X_RUN: begin
          xv      <= 1'b1;
          xbank_d <= xbank;
          xlane_d <= xlane;
          xidx_d  <= xidx;
          if (xx == xfer_w - 1'b1) begin
            xx <= '0;
            if (xy == xfer_h - 1'b1) begin
              xy <= '0;
              if (xc == xfer_ch - 1'b1) xs <= X_START;
              else xc <= xc + 1'b1;
            end else xy <= xy + 1'b1;
          end else xx <= xx + 1'b1;
        end
        X_START: xs <= X_IDLE;   // last activation written this cycle, P started
        default: xs <= X_IDLE;
      endcase
    end
  end
  assign a_we = xv;
  assign a_wd = act_t'(mb_rdata[xbank_d][32'(xlane_d)*ACT_W +: ACT_W]);

  p_engine #(
    .N_P(N_P), .M_P(M_P), .GRP(GRP), .CACHE_D(CACHE_D), .PA_DEPTH(PA_DEPTH),
    .PW_DEPTH(PW_DEPTH), .MAX_LAYERS(4)
  ) u_p (
    .clk(clk), .rst_n(rst_n),
    .act_we(a_we), .act_waddr(xidx_d), .act_wdata(a_wd),
    .pw_we(pw_we), .pw_lane(pw_lane), .pw_addr(pw_addr), .pw_wdata(pw_wdata),
    .lt_we(p_lt_we), .lt_idx(p_lt_idx), .lt_data(p_lt_data),
    .start(xs == X_START), .n_layers(p_n_layers), .busy(p_busy), .done(p_done),
    .res_raddr(res_raddr), .res_rdata(res_rdata));

  assign frame_done = p_done;
endmodule
