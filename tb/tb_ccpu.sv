// tb_ccpu: drives a 4-channel CCPU with row-integrated streams of random feature maps
// over two input-channel iterations (so the PE buffer accumulates), tags each slot as
// the NP controller does, and compares the emitted pixels and row markers with a 2-D
// convolution model (zero padding 1, 8 input channels, requantization by 7 bits, ReLU),
// with and without 2x2 max pooling. Also checks the stream latency to the first pixel.
module tb_ccpu;
  import cnn_pkg::*;
  localparam int M = 4;
  localparam int G = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic pool_en, out_valid, out_eol;
  logic [4:0] shift;
  act_t x [M][F];
  kword_t kernel [M];
  slot_tag_t in_tag;
  act_t out_pix;

  ccpu #(.M_NP(M), .GRP(2), .PEBUF_DEPTH(256), .MAX_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .pe_mode(PE_PARALLEL), .pool_en(pool_en), .shift(shift),
    .x(x), .kernel(kernel), .in_tag(in_tag), .out_valid(out_valid), .out_pix(out_pix),
    .out_eol(out_eol));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t exp_q [$];
  int   n_eol, first_pix_cyc, cyc, stream_start;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (first_pix_cyc < 0) first_pix_cyc = cyc;
      if (exp_q.size() == 0 || out_pix !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("pixel %0d expected %0d", out_pix, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    if (out_eol) n_eol++;
  end

  act_t X [G*M][8][8];
  npw_t Hk [G*M][3][3];

  function automatic act_t px(int m, int r, int c, int h, int w);
    if (r < 0 || r >= h || c < 0 || c >= w) return '0;
    return X[m][r][c];
  endfunction

  task automatic run(input int w, input int h, input bit pool);
    int rw, wp;
    act_t y [8][8];
    rw = (w + 3) / 3;
    wp = 3 * rw;
    foreach (X[m, r, c]) X[m][r][c] = act_t'($signed(rnd(2001)) - 1000);
    foreach (Hk[m, r, c]) Hk[m][r][c] = npw_t'($signed(rnd(129)) - 64);
    for (int i = 0; i < h; i++)
      for (int j = 0; j < w; j++) begin
        acc_t s;
        s = 0;
        for (int m = 0; m < G*M; m++)
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++)
              s += acc_t'(Hk[m][r][c]) * acc_t'(px(m, i + r - 1, j + c - 1, h, w));
        y[i][j] = (s < 0) ? act_t'(0) : sat_act(s >>> 7);
      end
    for (int i = 0; i < h; i++)
      for (int j = 0; j < w; j++)
        if (!pool) exp_q.push_back(y[i][j]);
        else if (i % 2 && j % 2) begin
          act_t mx;
          mx = y[i-1][j-1];
          if (y[i-1][j] > mx) mx = y[i-1][j];
          if (y[i][j-1] > mx) mx = y[i][j-1];
          if (y[i][j] > mx) mx = y[i][j];
          exp_q.push_back(mx);
        end
    pool_en = pool;
    n_eol = 0;
    first_pix_cyc = -1;
    for (int g = 0; g < G; g++) begin
      for (int m = 0; m < M; m++)
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++)
            kernel[m][(r*3+k)*NPW_W +: NPW_W] = Hk[g*M+m][r][2-k];
      for (int t = 0; t <= wp * h; t++) begin
        int tr, tc;
        tr = t / wp;
        tc = t % wp;
        @(negedge clk);
        if (t == 0 && g == G-1) stream_start = cyc;
        for (int m = 0; m < M; m++)
          for (int r = 0; r < 3; r++)
            x[m][r] = (t == wp * h) ? act_t'(0) : px(g*M+m, tr - 1 + r, tc, h, w);
        in_tag         = '0;
        in_tag.valid   = 1'b1;
        in_tag.addr    = 16'(t);
        in_tag.first   = (g == 0);
        in_tag.last    = (g == G-1);
        in_tag.keep    = (tc != 0) && (tc - 1 < w) && (tr < h);
        in_tag.eol     = (tc == 0) && (tr != 0);
        in_tag.col     = 9'(tc - 1);
        in_tag.row_odd = (tc == 0) ? !tr[0] : tr[0];
      end
      @(negedge clk);
      in_tag = '0;
      foreach (x[m, r]) x[m][r] = '0;
      repeat (12) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || n_eol != (pool ? h/2 : h)) begin
      failures++;
      $display("left %0d pixels, %0d row ends", exp_q.size(), n_eol);
    end
    // first pixel (slot 1): PE 2 + tree 2 + ReLU 1 + pool 1 edges after its slot
    checks++;
    if (!pool && first_pix_cyc - stream_start != 7) begin
      failures++;
      $display("first pixel after %0d cycles", first_pix_cyc - stream_start);
    end
  endtask

  initial begin
    in_tag = '0; shift = 5'd7; pool_en = 0;
    foreach (x[m, r]) x[m][r] = '0;
    foreach (kernel[m]) kernel[m] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7, 4, 0);
    run(6, 4, 1);
    run(5, 5, 0);
    run(8, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
