// p_engine: engine for the P-layers (pruned, power-of-two quantized fully connected
// layers) around one SAC-PU.
//
// Two activation buffers take turns as input and output activations: layer l reads
// buffer l % 2 and writes buffer (l+1) % 2, so the outputs of one layer are the inputs
// of the next. The input of the first layer is written into buffer 0 through `act_we`
// (the hand-over from the NP-layers). Compressed weights sit in N_p lane RAMs, one per
// shift-accumulator; kernel (output neuron) n = grp*N_p + k is stored in lane k from
// address wbase + grp*kstride as {run, code} entries ending in the end code.
//
// For each group of N_p output neurons the SAC-PU decodes, reads activations (ADF) and
// computes; the engine then requantizes each sum (arithmetic shift by `shift`,
// saturation to 16 bits), applies ReLU when the layer asks for it, and writes the
// neurons below u_out into the output buffer, one per cycle. After the last layer the
// result is read through `res_raddr/res_rdata` (buffer n_layers % 2, registered read).
// The input/output activation buffers, lane-wise weight storage and group-by-group
// processing follow the design; the ping-pong buffer roles and descriptors are this
// implementation's choices. P-layers that are convolutions are not supported.
// The SAC-PU's phase and capture counters are observation outputs and stay unconnected
// here, and only the low bits of its RAM addresses that the buffer depths need are used,
// which is why lint reports those signals as partly unused.
module p_engine
  import cnn_pkg::*;
#(
  parameter int unsigned N_P        = 64,
  parameter int unsigned M_P        = 4,
  parameter int unsigned GRP        = 2,
  parameter int unsigned CACHE_D    = 2048,
  parameter int unsigned PA_DEPTH   = 25088,    // 7 x 7 x 512 activations into FC6
  parameter int unsigned PW_DEPTH   = 131072,
  parameter int unsigned MAX_LAYERS = 4,
  localparam int unsigned AAW = $clog2(PA_DEPTH),
  localparam int unsigned PWW = $clog2(PW_DEPTH),
  localparam int unsigned LNW = (N_P > 1) ? $clog2(N_P) : 1,
  localparam int unsigned LIW = (MAX_LAYERS > 1) ? $clog2(MAX_LAYERS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           act_we,
  input  logic [AAW-1:0] act_waddr,
  input  act_t           act_wdata,
  input  logic           pw_we,
  input  logic [LNW-1:0] pw_lane,
  input  logic [PWW-1:0] pw_addr,
  input  pentry_t        pw_wdata,
  input  logic           lt_we,
  input  logic [LIW-1:0] lt_idx,
  input  p_layer_t       lt_data,
  input  logic           start,
  input  logic [LIW:0]   n_layers,
  output logic           busy,
  output logic           done,
  input  logic [AAW-1:0] res_raddr,
  output act_t           res_rdata
);
  typedef enum logic [2:0] {Q_IDLE, Q_LCFG, Q_GRP, Q_WAIT, Q_WB, Q_DONE} st_e;
  st_e st;

  p_layer_t ltab [MAX_LAYERS];
  always_ff @(posedge clk) if (lt_we) ltab[lt_idx] <= lt_data;

  p_layer_t    L;
  logic [LIW:0] lidx;
  logic [8:0]  grp;
  logic [LNW:0] wk;
  logic        sel;            // input buffer of the current layer

  // SAC-PU
  logic [19:0] w_raddr;
  pentry_t     w_rdata [N_P];
  logic [15:0] a_raddr;
  act_t        a_rdata;
  logic        pu_done;
  acc_t        result [N_P];
  logic [15:0] cyc_wd, cyc_ar, cyc_sc, n_accept;

  sac_pu #(.N_P(N_P), .M_P(M_P), .GRP(GRP), .CACHE_D(CACHE_D)) u_pu (
    .clk(clk), .rst_n(rst_n), .start(st == Q_GRP),
    .kbase(L.wbase + 20'(32'(grp) * 32'(L.kstride))),
    .w_raddr(w_raddr), .w_rdata(w_rdata), .a_raddr(a_raddr), .a_rdata(a_rdata),
    .done(pu_done), .result(result),
    .cyc_wd(cyc_wd), .cyc_ar(cyc_ar), .cyc_sc(cyc_sc), .n_accept(n_accept));

  for (genvar k = 0; k < N_P; k++) begin : g_lane
    sdp_ram #(.WIDTH(PENT_W), .DEPTH(PW_DEPTH)) u_lram (
      .clk(clk), .we(pw_we && pw_lane == LNW'(k) && st == Q_IDLE), .waddr(pw_addr),
      .wdata(pw_wdata), .raddr(PWW'(w_raddr)), .rdata(w_rdata[k]));
  end

  // activation buffers
  logic           ob_we;
  logic           ob_buf;       // target buffer, latched with the write (sel may flip)
  logic [AAW-1:0] ob_addr;
  act_t           ob_data;
  act_t           buf_rdata [2];
  for (genvar b = 0; b < 2; b++) begin : g_buf
    logic           we;
    logic [AAW-1:0] wa;
    act_t           wd;
    always_comb begin
      if (st == Q_IDLE) begin
        we = act_we && (b == 0);
        wa = act_waddr;
        wd = act_wdata;
      end else begin
        we = ob_we && (ob_buf == 1'(b));
        wa = ob_addr;
        wd = ob_data;
      end
    end
    sdp_ram #(.WIDTH(ACT_W), .DEPTH(PA_DEPTH)) u_abuf (
      .clk(clk), .we(we), .waddr(wa), .wdata(wd),
      .raddr(st == Q_IDLE ? res_raddr : AAW'(a_raddr)), .rdata(buf_rdata[b]));
  end
  assign a_rdata   = buf_rdata[sel];
  assign res_rdata = buf_rdata[n_layers[0]];

  // requantize one neuron
  act_t q;
  logic [15:0] nidx;
  always_comb begin
    acc_t v;
    v = result[wk[LNW-1:0]] >>> L.shift;
    q = sat_act(v);
    if (L.relu && q < 0) q = '0;
  end
  assign nidx = 16'(32'(grp) * N_P + 32'(wk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= Q_IDLE;
      L       <= '0;
      lidx    <= '0;
      grp     <= '0;
      wk      <= '0;
      sel     <= 1'b0;
      ob_we   <= 1'b0;
      ob_addr <= '0;
      ob_data <= '0;
      ob_buf  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done  <= 1'b0;
      ob_we <= 1'b0;
      unique case (st)
        Q_IDLE: if (start) begin
          lidx <= '0;
          sel  <= 1'b0;
          st   <= Q_LCFG;
        end
        Q_LCFG: begin
          L   <= ltab[lidx[LIW-1:0]];
          grp <= '0;
          st  <= Q_GRP;
        end
        Q_GRP: st <= Q_WAIT;
        Q_WAIT: if (pu_done) begin
          wk <= '0;
          st <= Q_WB;
        end
        Q_WB: begin
          if (nidx < L.u_out) begin
            ob_we   <= 1'b1;
            ob_addr <= AAW'(nidx);
            ob_buf  <= ~sel;
            ob_data <= q;
          end
          if (wk == (LNW+1)'(N_P - 1)) begin
            if (grp == L.groups - 1'b1) begin
              if (lidx + 1'b1 == n_layers) st <= Q_DONE;
              else begin
                lidx <= lidx + 1'b1;
                sel  <= ~sel;
                st   <= Q_LCFG;
              end
            end else begin
              grp <= grp + 1'b1;
              st  <= Q_GRP;
            end
          end else begin
            wk <= wk + 1'b1;
          end
        end
        Q_DONE: begin
          done <= 1'b1;
          st   <= Q_IDLE;
        end
        default: st <= Q_IDLE;
      endcase
    end
  end
  assign busy = (st != Q_IDLE);
endmodule
