// tb_np_engine: runs two convolution layers through a small distributed conv engine
// (M_np = 4 FMRs/Conv-PEs per CCPU, N_np = 2 CCPUs) and checks the final map buffer
// against a layer-by-layer model.
//   layer 0: 6x4 map, 6 input channels (2 input-channel iterations), 4 output channels
//            (2 passes, written to different map buffer banks), ReLU + 2x2 max pooling
//   layer 1: 3x2 map (read back from the FMRs after the copy), 4 -> 3 channels, no pool
// Also checks that each layer streams for exactly (3*RW*H + 3) * groups * passes
// cycles, the row-integrated cost per map, and counts weight-buffer swaps and copies.
module tb_np_engine;
  import cnn_pkg::*;
  localparam int M = 4, N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic fmr_we, wr_we, lt_we, start, busy, done;
  logic [1:0] fmr_bank;
  logic [0:0] wr_bank;
  logic [8:0] fmr_addr, mb_raddr;
  logic [7:0] wr_addr;
  logic [1:0] lt_idx;
  fword_t fmr_wdata;
  kword_t wr_wdata;
  np_layer_t lt_data;
  logic [2:0] n_layers;
  fword_t mb_rdata [M];

  np_engine #(.M_NP(M), .N_NP(N), .FMR_DEPTH(512), .WR_DEPTH(256), .PEBUF_DEPTH(256),
              .MAX_W(16), .MAX_LAYERS(4)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stream_cyc = 0, swaps = 0, copies = 0;
  always @(posedge clk) begin
    if (rst_n && dut.rd_en) stream_cyc++;
    if (dut.wl_swap) swaps++;
    if (dut.cp_en) copies++;
  end

  // model feature maps: [channel][row][col]
  act_t A0 [8][4][6];
  act_t A1 [4][2][3];
  act_t A2 [4][2][3];
  npw_t H0 [4][8][3][3];
  npw_t H1 [4][4][3][3];

  initial begin
    int exp_stream;
    fmr_we = 0; wr_we = 0; lt_we = 0; start = 0; mb_raddr = 0; n_layers = 3'd2;
    fmr_bank = 0; fmr_addr = 0; fmr_wdata = 0; wr_bank = 0; wr_addr = 0; wr_wdata = 0;
    lt_idx = 0; lt_data = '0;
    foreach (A0[c, r, x]) A0[c][r][x] = act_t'(rnd(3000));
    foreach (H0[n, c, r, k]) H0[n][c][r][k] = (c < 6) ? npw_t'($signed(rnd(129)) - 64) : npw_t'(0);
    foreach (H1[n, c, r, k]) H1[n][c][r][k] = (n < 3) ? npw_t'($signed(rnd(129)) - 64) : npw_t'(0);
    // model layer 0 (+pool) and layer 1
    begin
      act_t y [4][4][6];
      foreach (y[n, i, j]) begin
        acc_t s;
        s = 0;
        for (int c = 0; c < 8; c++)
          for (int r = 0; r < 3; r++)
            for (int k = 0; k < 3; k++)
              if (i+r-1 >= 0 && i+r-1 < 4 && j+k-1 >= 0 && j+k-1 < 6)
                s += acc_t'(H0[n][c][r][k]) * acc_t'(A0[c][i+r-1][j+k-1]);
        y[n][i][j] = (s < 0) ? act_t'(0) : sat_act(s >>> 7);
      end
      foreach (A1[n, i, j]) begin
        act_t mx;
        mx = y[n][2*i][2*j];
        if (y[n][2*i][2*j+1] > mx) mx = y[n][2*i][2*j+1];
        if (y[n][2*i+1][2*j] > mx) mx = y[n][2*i+1][2*j];
        if (y[n][2*i+1][2*j+1] > mx) mx = y[n][2*i+1][2*j+1];
        A1[n][i][j] = mx;
      end
      foreach (A2[n, i, j]) begin
        acc_t s;
        s = 0;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 3; r++)
            for (int k = 0; k < 3; k++)
              if (i+r-1 >= 0 && i+r-1 < 2 && j+k-1 >= 0 && j+k-1 < 3)
                s += acc_t'(H1[n][c][r][k]) * acc_t'(A1[c][i+r-1][j+k-1]);
        A2[n][i][j] = (s < 0) ? act_t'(0) : sat_act(s >>> 7);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // input image: channel c -> bank c%4, group c/4, 3 words per row (RW = 3)
    for (int c = 0; c < 8; c++)
      for (int r = 0; r < 4; r++)
        for (int wi = 0; wi < 3; wi++) begin
          @(negedge clk);
          fmr_we = 1; fmr_bank = 2'(c % 4);
          fmr_addr = 9'((c / 4) * 12 + r * 3 + wi);
          for (int l = 0; l < 3; l++)
            fmr_wdata[l*ACT_W +: ACT_W] = (wi*3+l < 6) ? A0[c][r][wi*3+l] : act_t'(0);
        end
    @(negedge clk);
    fmr_we = 0;
    // weights: WR j word wbase + (p*G + g)*M + m
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 2; j++)
        for (int g = 0; g < 2; g++)
          for (int m = 0; m < 4; m++) begin
            @(negedge clk);
            wr_we = 1; wr_bank = 1'(j); wr_addr = 8'((p*2 + g)*4 + m);
            for (int r = 0; r < 3; r++)
              for (int k = 0; k < 3; k++)
                wr_wdata[(r*3+k)*NPW_W +: NPW_W] = H0[p*2+j][g*4+m][r][2-k];
          end
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 2; j++)
        for (int m = 0; m < 4; m++) begin
          @(negedge clk);
          wr_we = 1; wr_bank = 1'(j); wr_addr = 8'(16 + p*4 + m);
          for (int r = 0; r < 3; r++)
            for (int k = 0; k < 3; k++)
              wr_wdata[(r*3+k)*NPW_W +: NPW_W] = H1[p*2+j][m][r][2-k];
        end
    @(negedge clk);
    wr_we = 0;
    lt_we = 1; lt_idx = 0;
    lt_data = '{w: 9'd6, h: 9'd4, groups: 6'd2, passes: 6'd2, pool: 1'b1, shift: 5'd7, wbase: 20'd0};
    @(negedge clk);
    lt_idx = 1;
    lt_data = '{w: 9'd3, h: 9'd2, groups: 6'd1, passes: 6'd2, pool: 1'b0, shift: 5'd7, wbase: 20'd16};
    @(negedge clk);
    lt_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    // stream time: (3*RW*H + 3) per group and pass
    exp_stream = (3*3*4 + 3) * 2 * 2 + (3*2*2 + 3) * 1 * 2;
    checks++;
    if (stream_cyc != exp_stream) begin failures++; $display("stream cycles %0d, expected %0d", stream_cyc, exp_stream); end
    checks++;
    if (swaps != 4 + 2 || copies != 1 * 2 * 2) begin failures++; $display("swaps %0d copies %0d", swaps, copies); end
    // final map: channel n in bank n, RW = 2 words per row
    for (int r = 0; r < 2; r++)
      for (int wi = 0; wi < 2; wi++) begin
        mb_raddr = 9'(r*2 + wi);
        @(posedge clk);
        #1;
        for (int n = 0; n < 4; n++)
          for (int l = 0; l < 3; l++) begin
            act_t e;
            e = (wi == 0) ? A2[n][r][l] : act_t'(0);
            checks++;
            if (act_t'(mb_rdata[n][l*ACT_W +: ACT_W]) !== e) begin
              failures++;
              if (failures < 12) $display("ch %0d row %0d col %0d: %0d expected %0d", n, r, wi*3+l,
                                          act_t'(mb_rdata[n][l*ACT_W +: ACT_W]), e);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
