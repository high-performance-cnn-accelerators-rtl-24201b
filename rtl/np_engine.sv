// np_engine: distributed convolution architecture for the NP-layers (no-pruning layers).
//
// M_np feature map RAMs (FMR) each feed one F x F ping-pong buffer (FPPB); the FPPB
// outputs (three row streams per input channel) are broadcast to all N_np CCPUs. Every
// CCPU has its own weight RAM (WR) and double-buffered weight buffer (WB), so the N_np
// CCPUs compute N_np output channels at once from the same M_np input channels. Each
// CCPU's serial output is packed into 3-pixel words by a data_trans unit and written
// into the map buffer (M_np banks). When a layer is complete its output is copied from
// the map buffer into the FMRs, where it is the input of the next layer; the output of
// the last layer stays in the map buffer and can be read through `mb_raddr/mb_rdata`.
//
// Storage format: input channel c lives in FMR c % M_np, channel group c / M_np; a
// group occupies H*RW words from address group*H*RW, RW = floor(W/3)+1 words per row,
// each row followed by at least one zero (integrated-row data flow). Weight word
// (pass p, group g, channel m) of CCPU j is WR j address wbase + (p*G + g)*M_np + m and
// holds kernel taps (r,k) = H(r, 2-k) of output channel p*N_np+j, input g*M_np+m.
//
// Controller, per layer: load the WBs for (pass 0, group 0); then for every pass and
// every input-channel group stream the feature map once (for each output row i and
// word column c, the words of rows i-1, i, i+1; rows outside the map read as zero; one
// extra zero chunk closes the last row), loading the next group's weights into the
// shadow WBs meanwhile, wait for the pipeline to drain and swap the WBs. A stream takes
// 3*RW*H + 3 cycles, the row-integrated (W+1)*H + C_fir of the design when 3 | W+1.
// Then copy the map buffer to the FMRs. Streaming, FMR/WR/WB/map-buffer organisation
// and the channel-group storage follow the design; M_np must be a multiple of N_np.
// Own choices: descriptor format, fixed drain wait, host load ports, one clock domain.
// Only 3x3 stride-1 layers (with optional 2x2 max pooling) are sequenced: the Conv-PEs
// run in parallel mode; their serial and 1x1 modes are not used by this controller.
module np_engine
  import cnn_pkg::*;
#(
  parameter int unsigned M_NP        = 32,
  parameter int unsigned N_NP        = 32,
  parameter int unsigned GRP         = 2,
  parameter int unsigned FMR_DEPTH   = 33600,   // 224 rows x 75 words x 2 groups
  parameter int unsigned WR_DEPTH    = 65536,
  parameter int unsigned PEBUF_DEPTH = 50401,
  parameter int unsigned MAX_W       = 224,
  parameter int unsigned MAX_LAYERS  = 16,
  localparam int unsigned FAW = $clog2(FMR_DEPTH),
  localparam int unsigned WAW = $clog2(WR_DEPTH),
  localparam int unsigned MBW = (M_NP > 1) ? $clog2(M_NP) : 1,
  localparam int unsigned NBW = (N_NP > 1) ? $clog2(N_NP) : 1,
  localparam int unsigned LIW = $clog2(MAX_LAYERS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host access while idle
  input  logic            fmr_we,
  input  logic [MBW-1:0]  fmr_bank,
  input  logic [FAW-1:0]  fmr_addr,
  input  fword_t          fmr_wdata,
  input  logic            wr_we,
  input  logic [NBW-1:0]  wr_bank,
  input  logic [WAW-1:0]  wr_addr,
  input  kword_t          wr_wdata,
  input  logic            lt_we,
  input  logic [LIW-1:0]  lt_idx,
  input  np_layer_t       lt_data,
  // run
  input  logic            start,
  input  logic [LIW:0]    n_layers,
  output logic            busy,
  output logic            done,
  // result read (map buffer), all banks at one address
  input  logic [FAW-1:0]  mb_raddr,
  output fword_t          mb_rdata [M_NP]
);
  localparam int unsigned KMUL      = M_NP / N_NP;
  localparam int unsigned DRAIN_CYC = 16 + tree_levels(M_NP, GRP);

  typedef enum logic [2:0] {S_IDLE, S_LCFG, S_WLOAD, S_STREAM, S_DRAIN, S_COPY, S_DONE} state_e;
  state_e state;

  np_layer_t ltab [MAX_LAYERS];
  always_ff @(posedge clk) if (lt_we) ltab[lt_idx] <= lt_data;

  np_layer_t       L;
  logic [LIW:0]    lidx;
  logic [5:0]      g, p;
  logic [8:0]      rw, rw_o, h_o, w_o;
  logic [19:0]     reg_words, reg_words_o;
  logic [8:0]      si, sc;     // stream row / word column
  logic [1:0]      sr;         // row within the three-row window
  logic            s_tail;     // closing zero chunk
  logic [7:0]      dcnt;
  logic [FAW:0]    ccnt;       // copy counter
  logic [FAW:0]    copy_words;

  assign w_o = L.pool ? {1'b0, L.w[8:1]} : L.w;
  assign h_o = L.pool ? {1'b0, L.h[8:1]} : L.h;
  assign rw  = row_words(L.w);
  assign rw_o = row_words(w_o);
  assign reg_words   = 20'(L.h) * 20'(rw);
  assign reg_words_o = 20'(h_o) * 20'(rw_o);
  assign copy_words  = (FAW+1)'(20'((int'(L.passes) + KMUL - 1) / KMUL) * reg_words_o);

  // ---------------- weight loader ----------------
  logic            wl_start, wl_busy, wl_ld, wl_swap;
  logic [5:0]      wl_p, wl_g;
  logic [MBW:0]    wl_m;
  logic [MBW-1:0]  wl_idx;
  logic [WAW-1:0]  wl_addr;
  kword_t          wr_rdata [N_NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wl_busy <= 1'b0;
      wl_m    <= '0;
      wl_ld   <= 1'b0;
      wl_idx  <= '0;
    end else begin
      wl_ld  <= 1'b0;
      if (wl_start) begin
        wl_busy <= 1'b1;
        wl_m    <= '0;
      end else if (wl_busy) begin
        wl_ld  <= 1'b1;                 // RAM data arrives next cycle
        wl_idx <= wl_m[MBW-1:0];
        if (wl_m == (MBW+1)'(M_NP-1)) wl_busy <= 1'b0;
        wl_m <= wl_m + 1'b1;
      end
    end
  end
  assign wl_addr = WAW'(32'(L.wbase) + (32'(wl_p) * 32'(L.groups) + 32'(wl_g)) * M_NP + 32'(wl_m));

  // ---------------- stream address generation ----------------
  logic            rd_en, rd_zero, rd_en_d, rd_zero_d;
  logic [FAW-1:0]  rd_addr;
  logic signed [10:0] srow;
  assign srow = 11'(si) - 11'sd1 + 11'(sr);
  assign rd_zero = s_tail || srow < 0 || srow >= 11'(L.h);
  assign rd_addr = FAW'(32'(g) * 32'(reg_words) + (rd_zero ? 32'd0 : 32'(srow) * 32'(rw)) + 32'(sc));
  assign rd_en   = (state == S_STREAM);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_en_d   <= 1'b0;
      rd_zero_d <= 1'b0;
    end else begin
      rd_en_d   <= rd_en;
      rd_zero_d <= rd_zero;
    end

  // ---------------- copy path ----------------
  logic            cp_en, cp_en_d;
  logic [FAW-1:0]  cp_addr, cp_addr_d;
  assign cp_en   = (state == S_COPY) && (ccnt < copy_words);
  assign cp_addr = FAW'(ccnt);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cp_en_d   <= 1'b0;
      cp_addr_d <= '0;
    end else begin
      cp_en_d   <= cp_en;
      cp_addr_d <= cp_addr;
    end

  // ---------------- FMRs, FPPBs, map buffer ----------------
  fword_t fmr_rdata [M_NP];
  fword_t mbuf_rdata [M_NP];
  act_t   lanes [M_NP][F];
  logic   fppb_valid [M_NP];
  logic   dt_we [N_NP];
  logic [FAW-1:0] dt_addr [N_NP];
  fword_t dt_data [N_NP];

  for (genvar b = 0; b < M_NP; b++) begin : g_bank
    logic           we;
    logic [FAW-1:0] wa;
    fword_t         wd;
    always_comb begin
      if (cp_en_d) begin
        we = 1'b1;
        wa = cp_addr_d;
        wd = mbuf_rdata[b];
      end else begin
        we = fmr_we && (fmr_bank == MBW'(b)) && (state == S_IDLE);
        wa = fmr_addr;
        wd = fmr_wdata;
      end
    end
    sdp_ram #(.WIDTH(F*ACT_W), .DEPTH(FMR_DEPTH)) u_fmr (
      .clk(clk), .we(we), .waddr(wa), .wdata(wd), .raddr(rd_addr), .rdata(fmr_rdata[b]));

    fppb u_fppb (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (rd_en_d),
      .in_word   (rd_zero_d ? '0 : fmr_rdata[b]),
      .out_valid (fppb_valid[b]),
      .out_lane  (lanes[b])
    );

    // map buffer bank b takes CCPU b % N_NP in passes with p % KMUL == b / N_NP
    localparam int unsigned SRC = b % N_NP;
    logic mb_we;
    assign mb_we = dt_we[SRC] && (int'(p) % KMUL == b / N_NP);
    sdp_ram #(.WIDTH(F*ACT_W), .DEPTH(FMR_DEPTH)) u_mbuf (
      .clk(clk), .we(mb_we), .waddr(dt_addr[SRC]), .wdata(dt_data[SRC]),
      .raddr(state == S_COPY ? cp_addr : mb_raddr), .rdata(mbuf_rdata[b]));
    assign mb_rdata[b] = mbuf_rdata[b];
  end

  // ---------------- slot tags at the FPPB output ----------------
  slot_tag_t  tag;
  logic [15:0] tt;
  logic [8:0]  tr, tc;
  logic [15:0] slots;
  assign slots = 16'(32'(L.h) * 32'(rw) * 3);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tt <= '0;
      tr <= '0;
      tc <= '0;
    end else if (state == S_WLOAD || (state == S_DRAIN && dcnt == 0)) begin
      tt <= '0;
      tr <= '0;
      tc <= '0;
    end else if (fppb_valid[0]) begin
      tt <= tt + 1'b1;
      if (tc == 9'(3*rw - 1)) begin
        tc <= '0;
        tr <= tr + 1'b1;
      end else begin
        tc <= tc + 1'b1;
      end
    end
  end
  always_comb begin
    tag         = '0;
    tag.valid   = fppb_valid[0] && (tt <= slots);
    tag.addr    = tt;
    tag.first   = (g == 0);
    tag.last    = (g == L.groups - 1'b1);
    tag.keep    = (tc != 0) && (tc - 1'b1 < L.w) && (tr < L.h);
    tag.eol     = (tc == 0) && (tr != 0);
    tag.col     = tc - 1'b1;
    tag.row_odd = (tc == 0) ? ~tr[0] : tr[0];
  end

  // ---------------- CCPUs ----------------
  for (genvar j = 0; j < N_NP; j++) begin : g_ccpu
    kword_t kern [M_NP];
    logic   o_valid, o_eol;
    act_t   o_pix;

    sdp_ram #(.WIDTH(9*NPW_W), .DEPTH(WR_DEPTH)) u_wr (
      .clk(clk), .we(wr_we && wr_bank == NBW'(j) && state == S_IDLE), .waddr(wr_addr),
      .wdata(wr_wdata), .raddr(wl_addr), .rdata(wr_rdata[j]));

    weight_buffer #(.M_NP(M_NP)) u_wb (
      .clk(clk), .rst_n(rst_n), .ld_en(wl_ld), .ld_idx(wl_idx),
      .ld_kernel(wr_rdata[j]), .swap(wl_swap), .kernel(kern));

    ccpu #(.M_NP(M_NP), .GRP(GRP), .PEBUF_DEPTH(PEBUF_DEPTH), .MAX_W(MAX_W)) u_ccpu (
      .clk(clk), .rst_n(rst_n), .pe_mode(PE_PARALLEL), .pool_en(L.pool), .shift(L.shift),
      .x(lanes), .kernel(kern), .in_tag(tag),
      .out_valid(o_valid), .out_pix(o_pix), .out_eol(o_eol));

    data_trans #(.AW(FAW)) u_dt (
      .clk(clk), .rst_n(rst_n),
      .start(state == S_STREAM && si == 0 && sc == 0 && sr == 0 && !s_tail && g == L.groups - 1'b1),
      .base(FAW'(32'(int'(p) / KMUL) * 32'(reg_words_o))),
      .in_valid(o_valid), .in_pix(o_pix), .in_eol(o_eol),
      .we(dt_we[j]), .waddr(dt_addr[j]), .wdata(dt_data[j]));
  end

  // ---------------- controller ----------------
  logic last_grp, last_pass;
  assign last_grp  = (g == L.groups - 1'b1);
  assign last_pass = (p == L.passes - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      L        <= '0;
      lidx     <= '0;
      g        <= '0;
      p        <= '0;
      si       <= '0;
      sc       <= '0;
      sr       <= '0;
      s_tail   <= 1'b0;
      dcnt     <= '0;
      ccnt     <= '0;
      wl_start <= 1'b0;
      wl_swap  <= 1'b0;
      wl_p     <= '0;
      wl_g     <= '0;
      done     <= 1'b0;
    end else begin
      wl_start <= 1'b0;
      wl_swap  <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          lidx  <= '0;
          state <= S_LCFG;
        end
        S_LCFG: begin
          L        <= ltab[lidx[LIW-1:0]];
          g        <= '0;
          p        <= '0;
          wl_p     <= '0;
          wl_g     <= '0;
          wl_start <= 1'b1;
          state    <= S_WLOAD;
        end
        S_WLOAD: if (!wl_start && !wl_busy && !wl_ld) begin
          wl_swap <= 1'b1;
          si      <= '0;
          sc      <= '0;
          sr      <= '0;
          s_tail  <= 1'b0;
          state   <= S_STREAM;
        end
        S_STREAM: begin
          // preload the next iteration's weights at the start of the stream
          if (si == 0 && sc == 0 && sr == 0 && !s_tail && !(last_grp && last_pass)) begin
            wl_start <= 1'b1;
            wl_p     <= last_grp ? p + 1'b1 : p;
            wl_g     <= last_grp ? '0 : g + 1'b1;
          end
          if (sr == 2'd2) begin
            sr <= '0;
            if (s_tail) begin
              s_tail <= 1'b0;
              dcnt   <= 8'(DRAIN_CYC);
              state  <= S_DRAIN;
            end else if (sc == rw - 1'b1) begin
              sc <= '0;
              if (si == L.h - 1'b1) s_tail <= 1'b1;
              else si <= si + 1'b1;
            end else begin
              sc <= sc + 1'b1;
            end
          end else begin
            sr <= sr + 1'b1;
          end
        end
        S_DRAIN: begin
          if (dcnt != 0) dcnt <= dcnt - 1'b1;
          else if (!wl_busy && !wl_ld && !wl_start) begin
            si <= '0;
            sc <= '0;
            sr <= '0;
            if (last_grp && last_pass) begin
              ccnt  <= '0;
              state <= (lidx + 1'b1 == n_layers) ? S_DONE : S_COPY;
            end else begin
              wl_swap <= 1'b1;
              if (last_grp) begin
                g <= '0;
                p <= p + 1'b1;
              end else begin
                g <= g + 1'b1;
              end
              state <= S_STREAM;
            end
          end
        end
        S_COPY: begin
          if (ccnt < copy_words) ccnt <= ccnt + 1'b1;
          else if (!cp_en_d) begin
            lidx  <= lidx + 1'b1;
            state <= S_LCFG;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_kmul: assert property (@(posedge clk) M_NP % N_NP == 0);
endmodule
