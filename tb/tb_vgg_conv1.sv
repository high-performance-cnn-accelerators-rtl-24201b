// tb_vgg_conv1: the first VGG-16 convolution layer (224x224, 3 -> 64 channels, 3x3,
// padding 1, ReLU) on the NP engine at its default size (M_np = N_np = 32), i.e. two
// output passes over the full image. The random image and weights are generated here;
// every one of the 64 x 224 x 224 outputs is read back from the map buffer and compared
// with a direct model. The streaming time is checked against the row-integrated data
// flow: per pass 3*RW*H + 3 cycles with RW = 75, which is (W + 1) * H + 3 for W = 224.
module tb_vgg_conv1;
  import cnn_pkg::*;
  localparam int W = 224, H = 224, C = 3, N = 64, RW = W / 3 + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic        fmr_we = 0, wr_we = 0, lt_we = 0, start = 0, busy, done;
  logic [4:0]  fmr_bank = 0, wr_bank = 0;
  logic [15:0] fmr_addr = 0, wr_addr = 0, mb_raddr = 0;
  fword_t      fmr_wdata = 0;
  kword_t      wr_wdata = 0;
  logic [3:0]  lt_idx = 0;
  np_layer_t   lt_data = '0;
  logic [4:0]  n_layers = 5'd1;
  fword_t      mb_rdata [32];

  np_engine dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stream_cyc = 0;
  always @(posedge clk) if (rst_n && dut.rd_en) stream_cyc++;

  act_t img [C][H][W];
  npw_t wt  [N][C][3][3];

  function automatic act_t expect_px(int n, int y, int x);
    acc_t s;
    s = 0;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++)
          if (y+r-1 >= 0 && y+r-1 < H && x+k-1 >= 0 && x+k-1 < W)
            s += acc_t'(wt[n][c][r][k]) * acc_t'(img[c][y+r-1][x+k-1]);
    return (s < 0) ? act_t'(0) : sat_act(s >>> 7);
  endfunction

  initial begin
    int bad;
    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[c][y][x] = act_t'(rnd(8192));
    for (int n = 0; n < N; n++)
      for (int c = 0; c < C; c++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++) wt[n][c][r][k] = npw_t'(rnd(256) - 128);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // image: channel c in FMR c, group 0
    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int wi = 0; wi < RW; wi++) begin
          @(negedge clk);
          fmr_we = 1; fmr_bank = 5'(c); fmr_addr = 16'(y * RW + wi);
          for (int l = 0; l < 3; l++)
            fmr_wdata[l*ACT_W +: ACT_W] = (wi*3 + l < W) ? img[c][y][wi*3 + l] : act_t'(0);
        end
    @(negedge clk);
    fmr_we = 0;
    // weights: pass p, CCPU j, slot m (input channels 3..31 get zero kernels)
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 32; j++)
        for (int m = 0; m < 32; m++) begin
          kword_t kw;
          kw = '0;
          if (m < C)
            for (int r = 0; r < 3; r++)
              for (int k = 0; k < 3; k++) kw[(r*3+k)*NPW_W +: NPW_W] = wt[p*32 + j][m][r][2-k];
          @(negedge clk);
          wr_we = 1; wr_bank = 5'(j); wr_addr = 16'(p*32 + m); wr_wdata = kw;
        end
    @(negedge clk);
    wr_we = 0;
    lt_we = 1; lt_idx = 0;
    lt_data = '{w: 9'(W), h: 9'(H), groups: 6'd1, passes: 6'd2, pool: 1'b0, shift: 5'd7, wbase: 20'd0};
    @(negedge clk);
    lt_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);

    // read the map buffer: channel n in bank n % 32, group n / 32
    bad = 0;
    for (int g = 0; g < 2; g++)
      for (int y = 0; y < H; y++)
        for (int wi = 0; wi < RW; wi++) begin
          mb_raddr = 16'(g * H * RW + y * RW + wi);
          @(posedge clk);
          #1;
          for (int b = 0; b < 32; b++)
            for (int l = 0; l < 3; l++) begin
              int x;
              act_t e;
              x = wi*3 + l;
              e = (x < W) ? expect_px(g*32 + b, y, x) : act_t'(0);
              checks++;
              if (act_t'(mb_rdata[b][l*ACT_W +: ACT_W]) !== e) begin
                failures++;
                if (bad++ < 10) $display("channel %0d row %0d col %0d: %0d expected %0d",
                                         g*32 + b, y, x, act_t'(mb_rdata[b][l*ACT_W +: ACT_W]), e);
              end
            end
        end

    checks++;
    if (stream_cyc != 2 * (3 * RW * H + 3)) begin
      failures++;
      $display("stream cycles %0d, expected %0d", stream_cyc, 2 * (3 * RW * H + 3));
    end
    $display("stream cycles %0d = 2 x ((W+1)*H + 3)", stream_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
