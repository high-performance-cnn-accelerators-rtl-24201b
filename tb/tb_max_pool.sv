// tb_max_pool: streams random 8x6 maps (raster order, one end-of-row cycle after each
// row, random idle cycles) through the pooling stage with pooling on and off, and
// compares the pixels and row markers with a 2x2/stride-2 max-pool model.
module tb_max_pool;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic pool_en, in_valid, in_row_odd, in_eol, out_valid, out_eol;
  act_t in_pix, out_pix;
  logic [8:0] in_col;

  max_pool #(.MAX_W(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t exp_pix [$];
  int   exp_eol = 0, got_eol = 0;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_pix.size() == 0 || out_pix !== exp_pix[0]) begin
        failures++;
        $display("pixel %0d expected %0d", out_pix, exp_pix.size() ? exp_pix[0] : -1);
      end
      if (exp_pix.size()) void'(exp_pix.pop_front());
    end
    if (out_eol) got_eol++;
  end

  initial begin
    act_t img [6][8];
    pool_en = 0; in_valid = 0; in_row_odd = 0; in_eol = 0; in_pix = 0; in_col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      pool_en = run[0];
      foreach (img[y, x]) img[y][x] = act_t'(rnd(20000));
      for (int y = 0; y < 6; y++)
        for (int x = 0; x < 8; x++)
          if (!pool_en) exp_pix.push_back(img[y][x]);
          else if (y % 2 == 1 && x % 2 == 1) begin
            act_t m;
            m = img[y-1][x-1];
            if (img[y-1][x] > m) m = img[y-1][x];
            if (img[y][x-1] > m) m = img[y][x-1];
            if (img[y][x] > m) m = img[y][x];
            exp_pix.push_back(m);
          end
      exp_eol += pool_en ? 3 : 6;
      for (int y = 0; y < 6; y++) begin
        for (int x = 0; x < 8; x++) begin
          @(negedge clk);
          in_valid = 1; in_pix = img[y][x]; in_col = 9'(x); in_row_odd = y[0]; in_eol = 0;
          if (rnd(3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
        end
        @(negedge clk);
        in_valid = 0; in_eol = 1; in_row_odd = y[0];
        @(negedge clk);
        in_eol = 0;
      end
      repeat (4) @(posedge clk);
    end
    checks++;
    if (exp_pix.size() != 0 || got_eol != exp_eol) begin
      failures++;
      $display("left %0d pixels, eol %0d of %0d", exp_pix.size(), got_eol, exp_eol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
