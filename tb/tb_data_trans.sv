// tb_data_trans: sends rows of widths 4..9 (random idle cycles, an end-of-row cycle
// after each row) and checks the packed words: three pixels per word, lane 0 first,
// zero lanes after the last pixel, an extra zero word when the row fills its words,
// consecutive addresses from the loaded base.
module tb_data_trans;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction
  logic start, in_valid, in_eol, we;
  logic [11:0] base, waddr;
  act_t in_pix;
  fword_t wdata;

  data_trans #(.AW(12)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fword_t exp_w [$];
  logic [11:0] exp_a [$];

  always @(posedge clk) begin
    #1;
    if (we) begin
      checks++;
      if (exp_w.size() == 0 || wdata !== exp_w[0] || waddr !== exp_a[0]) begin
        failures++;
        if (failures < 10) $display("write %h @%0d", wdata, waddr);
      end
      if (exp_w.size()) begin void'(exp_w.pop_front()); void'(exp_a.pop_front()); end
    end
  end

  initial begin
    logic [11:0] a;
    start = 0; in_valid = 0; in_eol = 0; in_pix = 0; base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int wdt = 4; wdt <= 9; wdt++) begin
      @(negedge clk);
      start = 1; base = 12'(100 * wdt);
      a = base;
      @(negedge clk);
      start = 0;
      for (int row = 0; row < 3; row++) begin
        act_t px [12];
        foreach (px[i]) px[i] = '0;
        for (int x = 0; x < wdt; x++) px[x] = act_t'($urandom);
        for (int wi = 0; wi < wdt / 3 + 1; wi++) begin
          fword_t fw;
          for (int l = 0; l < 3; l++) fw[l*ACT_W +: ACT_W] = px[wi*3 + l];
          exp_w.push_back(fw);
          exp_a.push_back(a);
          a++;
        end
        for (int x = 0; x < wdt; x++) begin
          @(negedge clk);
          in_valid = 1; in_pix = px[x];
          if (rnd(3) == 0) begin @(negedge clk); in_valid = 0; end
        end
        @(negedge clk);
        in_valid = 0; in_eol = 1;
        @(negedge clk);
        in_eol = 0;
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("%0d words missing", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
