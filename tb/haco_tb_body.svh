// Shared body of the end-to-end testbenches of haco_top. The including module defines
// MNP, NNP, NPL (N_p), FMRD, WRD, PAD, PWD (the top's sizes) and instantiates `dut`.
//
// Workload: a small CNN, two images back to back.
//   NP layer 0: 6x4 image, 3 channels -> C1 = MNP+4 channels (several passes), ReLU,
//               2x2 max pooling -> 3x2
//   NP layer 1: 3x2, C1 -> C2 = max(8, NNP+2) channels (two input-channel groups, several passes)
//   hand-over : 3 x 2 x C2 activations to the P-layers
//   P layer 0 : pruned FC, 6*C2 -> 16, ReLU;   P layer 1: 16 -> 10, no ReLU
// The second image is started while the P-layers still work on the first. Each result
// is compared with a model; every mechanism is counted and must occur at least once.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int C0 = 3, C1 = MNP + 4, C2 = (NNP + 2 < 8) ? 8 : NNP + 2;
  localparam int G1 = (C1 + MNP - 1) / MNP, P0 = (C1 + NNP - 1) / NNP, P1 = (C2 + NNP - 1) / NNP;
  localparam int U0 = 6 * C2, U1 = 16, U2 = 10;
  localparam int KSTR = 512;
  localparam int FAW = $clog2(FMRD), WAW = $clog2(WRD), AAW = $clog2(PAD), PWW = $clog2(PWD);

  logic           fmr_we = 0, wr_we = 0, np_lt_we = 0, pw_we = 0, p_lt_we = 0, np_start = 0;
  logic [$clog2(MNP)-1:0] fmr_bank = 0;
  logic [FAW-1:0] fmr_addr = 0;
  fword_t         fmr_wdata = 0;
  logic [$clog2(NNP)-1:0] wr_bank = 0;
  logic [WAW-1:0] wr_addr = 0;
  kword_t         wr_wdata = 0;
  logic [3:0]     np_lt_idx = 0;
  np_layer_t      np_lt_data = '0;
  logic [$clog2(NPL)-1:0] pw_lane = 0;
  logic [PWW-1:0] pw_addr = 0;
  pentry_t        pw_wdata = '0;
  logic [1:0]     p_lt_idx = 0;
  p_layer_t       p_lt_data = '0;
  logic [4:0]     np_n_layers = 5'd2;
  logic [2:0]     p_n_layers = 3'd2;
  logic [8:0]     xfer_w = 9'd3, xfer_h = 9'd2;
  logic [9:0]     xfer_ch = 10'(C2);
  logic           np_ready, np_busy, p_busy, frame_done;
  logic [AAW-1:0] res_raddr = 0;
  act_t           res_rdata;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_pool = 0, n_accum = 0, n_pass2 = 0, n_swap = 0, n_copy = 0, n_xfer = 0;
  int n_adf = 0, n_fill = 0, n_overlap = 0, n_multibeat = 0, n_relu_clamp = 0, n_frames = 0, n_ignored = 0, n_stream = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_np.g_ccpu[0].u_ccpu.u_pool.out_valid && dut.u_np.g_ccpu[0].u_ccpu.u_pool.pool_en) n_pool++;
    if (dut.u_np.rd_en && dut.u_np.g != 0) n_accum++;
    if (dut.u_np.rd_en) n_stream++;
    if (dut.u_np.rd_en && dut.u_np.p != 0) n_pass2++;
    if (dut.u_np.wl_swap) n_swap++;
    if (dut.u_np.cp_en) n_copy++;
    if (dut.a_we) n_xfer++;
    n_adf += $countones(dut.u_p.u_pu.hit);
    if (dut.u_p.u_pu.beat != 0) n_multibeat++;
    if (np_busy && p_busy) n_overlap++;
    if (np_start && !np_ready) n_ignored++;
    if (dut.u_p.ob_we && dut.u_p.lidx == 0 && dut.u_p.result[dut.u_p.wk[$clog2(NPL)-1:0]] < 0) n_relu_clamp++;
    if (frame_done) n_frames++;
  end

  // ---------------- model ----------------
  npw_t W0 [C1][C0][3][3];
  npw_t W1 [C2][C1][3][3];
  logic [3:0] Q0 [U1][U0];
  logic [3:0] Q1 [U2][U1];

  function automatic act_t relu_q(acc_t s);
    return (s < 0) ? act_t'(0) : sat_act(s >>> 7);
  endfunction

  act_t img [2][C0][4][6];
  act_t exp_r [2][U2];


  function automatic int rnd(int n);
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  task automatic model(input int f);
    act_t y0 [C1][4][6];
    act_t a1 [C1][2][3];
    act_t a2 [C2][2][3];
    act_t v [U0];
    act_t h [U1];
    foreach (y0[n, i, j]) begin
      acc_t s;
      s = 0;
      for (int c = 0; c < C0; c++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++)
            if (i+r-1 >= 0 && i+r-1 < 4 && j+k-1 >= 0 && j+k-1 < 6)
              s += acc_t'(W0[n][c][r][k]) * acc_t'(img[f][c][i+r-1][j+k-1]);
      y0[n][i][j] = relu_q(s);
    end
    foreach (a1[n, i, j]) begin
      act_t m;
      m = y0[n][2*i][2*j];
      if (y0[n][2*i][2*j+1] > m) m = y0[n][2*i][2*j+1];
      if (y0[n][2*i+1][2*j] > m) m = y0[n][2*i+1][2*j];
      if (y0[n][2*i+1][2*j+1] > m) m = y0[n][2*i+1][2*j+1];
      a1[n][i][j] = m;
    end
    foreach (a2[n, i, j]) begin
      acc_t s;
      s = 0;
      for (int c = 0; c < C1; c++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++)
            if (i+r-1 >= 0 && i+r-1 < 2 && j+k-1 >= 0 && j+k-1 < 3)
              s += acc_t'(W1[n][c][r][k]) * acc_t'(a1[c][i+r-1][j+k-1]);
      a2[n][i][j] = relu_q(s);
    end
    foreach (a2[c, i, j]) v[(c*2 + i)*3 + j] = a2[c][i][j];
    foreach (h[n]) begin
      acc_t s;
      s = 0;
      for (int i = 0; i < U0; i++)
        if (Q0[n][i] != PCODE_ZERO) s += (Q0[n][i][3] ? -1 : 1) * (acc_t'(v[i]) <<< (7 - int'(Q0[n][i][2:0])));
      h[n] = relu_q(s);
    end
    for (int n = 0; n < U2; n++) begin
      acc_t s;
      s = 0;
      for (int i = 0; i < U1; i++)
        if (Q1[n][i] != PCODE_ZERO) s += (Q1[n][i][3] ? -1 : 1) * (acc_t'(h[i]) <<< (7 - int'(Q1[n][i][2:0])));
      exp_r[f][n] = sat_act(s >>> 7);
    end
  endtask

  // ---------------- host helpers ----------------
  task automatic load_image(input int f);
    for (int c = 0; c < C0; c++)
      for (int r = 0; r < 4; r++)
        for (int wi = 0; wi < 3; wi++) begin
          @(negedge clk);
          fmr_we = 1; fmr_bank = $bits(fmr_bank)'(c % MNP);
          fmr_addr = FAW'((c / MNP) * 12 + r * 3 + wi);
          for (int l = 0; l < 3; l++)
            fmr_wdata[l*ACT_W +: ACT_W] = (wi*3 + l < 6) ? img[f][c][r][wi*3 + l] : act_t'(0);
        end
    @(negedge clk);
    fmr_we = 0;
  endtask

  task automatic put_w(input int j, input int addr, input kword_t kw);
    @(negedge clk);
    wr_we = 1; wr_bank = $bits(wr_bank)'(j); wr_addr = WAW'(addr); wr_wdata = kw;
  endtask

  task automatic put_p(input int lane, input int addr, input pentry_t e);
    @(negedge clk);
    pw_we = 1; pw_lane = $bits(pw_lane)'(lane); pw_addr = PWW'(addr); pw_wdata = e;
  endtask

  task automatic load_p(input int l, input int u_in, input int u_out, input int wbase);
    for (int n = 0; n < ((u_out + NPL - 1) / NPL) * NPL; n++) begin
      int e, last;
      e = 0;
      last = -1;
      if (n < u_out)
        for (int i = 0; i < u_in; i++) begin
          logic [3:0] q;
          q = (l == 0) ? Q0[n][i] : Q1[n][i];
          if (q != PCODE_ZERO) begin
            int run;
            run = i - last - 1;
            while (run > 31) begin
              put_p(n % NPL, wbase + (n / NPL) * KSTR + e, '{run: 5'd31, code: PCODE_ZERO});
              e++; run -= 32; n_fill++;
            end
            put_p(n % NPL, wbase + (n / NPL) * KSTR + e, '{run: 5'(run), code: q});
            e++; last = i;
          end
        end
      put_p(n % NPL, wbase + (n / NPL) * KSTR + e, '{run: 5'd0, code: PCODE_END});
    end
  endtask

  task automatic check_result(input int frame, input act_t exp_r [U2]);
    for (int n = 0; n < U2; n++) begin
      res_raddr = AAW'(n);
      @(posedge clk);
      #1;
      checks++;
      if (res_rdata !== exp_r[n]) begin
        failures++;
        $display("image %0d neuron %0d: %0d expected %0d", frame, n, res_rdata, exp_r[n]);
      end
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++)
      for (int c = 0; c < C0; c++)
        for (int r = 0; r < 4; r++)
          for (int x = 0; x < 6; x++) img[f][c][r][x] = act_t'(rnd(4000));
    for (int n = 0; n < C1; n++)
      for (int c = 0; c < C0; c++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++) W0[n][c][r][k] = npw_t'(rnd(129) - 64);
    for (int n = 0; n < C2; n++)
      for (int c = 0; c < C1; c++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++) W1[n][c][r][k] = npw_t'(rnd(65) - 32);
    for (int n = 0; n < U1; n++)
      for (int i = 0; i < U0; i++) begin
        int unsigned u;
        u = $urandom;
        Q0[n][i] = (u % 100 < 20) ? {u[20], 3'(3 + (u >> 8) % 4)} : PCODE_ZERO;
      end
    for (int n = 0; n < U2; n++)
      for (int i = 0; i < U1; i++) begin
        int unsigned u;
        u = $urandom;
        Q1[n][i] = (u % 100 < 50) ? {u[20], 3'((u >> 8) % 3)} : PCODE_ZERO;
      end
    for (int i = 1; i < U0 - 1; i++) Q0[0][i] = PCODE_ZERO;      // long zero run
    Q0[0][0] = 4'b0011; Q0[0][U0-1] = 4'b0100;
    for (int f = 0; f < 2; f++) model(f);

    repeat (3) @(posedge clk);
    rst_n = 1;
    // NP weights, every word of every WR: layer 0 at 0, layer 1 at P0*1*MNP
    for (int p = 0; p < P0; p++)
      for (int j = 0; j < NNP; j++)
        for (int m = 0; m < MNP; m++) begin
          kword_t kw;
          int n;
          kw = '0;
          n = p*NNP + j;
          if (n < C1 && m < C0)
            for (int r = 0; r < 3; r++)
              for (int k = 0; k < 3; k++) kw[(r*3+k)*NPW_W +: NPW_W] = W0[n][m][r][2-k];
          put_w(j, p*MNP + m, kw);
        end
    for (int p = 0; p < P1; p++)
      for (int j = 0; j < NNP; j++)
        for (int g = 0; g < G1; g++)
          for (int m = 0; m < MNP; m++) begin
            kword_t kw;
            int n, c;
            kw = '0;
            n = p*NNP + j;
            c = g*MNP + m;
            if (n < C2 && c < C1)
              for (int r = 0; r < 3; r++)
                for (int k = 0; k < 3; k++) kw[(r*3+k)*NPW_W +: NPW_W] = W1[n][c][r][2-k];
            put_w(j, P0*MNP + (p*G1 + g)*MNP + m, kw);
          end
    @(negedge clk);
    wr_we = 0;
    load_p(0, U0, U1, 0);
    load_p(1, U1, U2, ((U1 + NPL - 1) / NPL) * KSTR);
    @(negedge clk);
    pw_we = 0;
    np_lt_we = 1; np_lt_idx = 0;
    np_lt_data = '{w: 9'd6, h: 9'd4, groups: 6'd1, passes: 6'(P0), pool: 1'b1, shift: 5'd7, wbase: 20'd0};
    @(negedge clk);
    np_lt_idx = 1;
    np_lt_data = '{w: 9'd3, h: 9'd2, groups: 6'(G1), passes: 6'(P1), pool: 1'b0, shift: 5'd7,
                   wbase: 20'(P0*MNP)};
    @(negedge clk);
    np_lt_we = 0;
    p_lt_we = 1; p_lt_idx = 0;
    p_lt_data = '{u_out: 16'(U1), groups: 9'((U1 + NPL - 1) / NPL), kstride: 12'(KSTR), wbase: 20'd0,
                  relu: 1'b1, shift: 5'd7};
    @(negedge clk);
    p_lt_idx = 1;
    p_lt_data = '{u_out: 16'(U2), groups: 9'((U2 + NPL - 1) / NPL), kstride: 12'(KSTR),
                  wbase: 20'(((U1 + NPL - 1) / NPL) * KSTR), relu: 1'b0, shift: 5'd7};
    @(negedge clk);
    p_lt_we = 0;

    // image 0
    load_image(0);
    @(negedge clk);
    np_start = 1;
    @(negedge clk);
    np_start = 0;
    // image 1 is loaded once the NP-layers are idle (the hand-over reads only the map
    // buffer) and started while the P-layers work on image 0
    wait (!np_ready);
    wait (!np_busy);
    @(negedge clk);
    load_image(1);
    np_start = 1;
    @(negedge clk);
    while (!np_ready) @(negedge clk);
    @(negedge clk);
    np_start = 0;
    wait (n_frames == 1);
    @(negedge clk);
    check_result(0, exp_r[0]);
    wait (n_frames == 2);
    @(negedge clk);
    check_result(1, exp_r[1]);
    // FMR streaming time: every (pass, input-channel group) reads the integrated rows once,
    // 3 * row_words(W) * H slots plus the closing chunk (3 cycles)
    checks++;
    if (n_stream != 2 * (P0 * (3*3*4 + 3) + P1 * G1 * (3*2*2 + 3))) begin
      failures++;
      $display("stream cycles %0d expected %0d", n_stream, 2 * (P0 * (3*3*4 + 3) + P1 * G1 * (3*2*2 + 3)));
    end
    $display("pool=%0d accumulate=%0d second-pass=%0d wb-swap=%0d copy=%0d hand-over=%0d adf=%0d filler=%0d multibeat=%0d relu=%0d overlap=%0d frames=%0d start-ignored=%0d",
             n_pool, n_accum, n_pass2, n_swap, n_copy, n_xfer, n_adf, n_fill, n_multibeat, n_relu_clamp, n_overlap, n_frames, n_ignored);
    checks++;
    if (n_pool == 0 || n_accum == 0 || n_pass2 == 0 || n_swap == 0 || n_copy == 0 || n_xfer != 2*U0 ||
        n_adf == 0 || n_fill == 0 || n_multibeat == 0 || n_relu_clamp == 0 || n_overlap == 0 || n_frames != 2 || n_ignored == 0) begin
      failures++;
      $display("a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
