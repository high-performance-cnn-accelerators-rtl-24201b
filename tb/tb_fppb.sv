// tb_fppb: writes 3-activation words into the F x F ping-pong buffer, continuously and
// with gaps, and checks that lane r delivers, column by column, the activations of the
// r-th word of each block of three (the block is written by rows and read by columns), that the
// first column leaves in the cycle after the third word, and that nothing is lost.
module tb_fppb;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic   in_valid, out_valid;
  fword_t in_word;
  act_t   out_lane [F];

  fppb dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t exp_q [F][$];
  int   nwords = 0, nout = 0;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      nout++;
      for (int r = 0; r < F; r++) begin
        checks++;
        if (exp_q[r].size() == 0 || out_lane[r] !== exp_q[r][0]) begin
          failures++;
          if (failures < 10) $display("lane %0d got %0d", r, out_lane[r]);
        end
        if (exp_q[r].size()) void'(exp_q[r].pop_front());
      end
    end else begin
      for (int r = 0; r < F; r++) begin
        checks++;
        if (out_lane[r] !== '0) failures++;   // zeros while idle
      end
    end
  end

  initial begin
    in_valid = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // continuous words: first output directly after the third word
    for (int blk = 0; blk < 40; blk++) begin
      for (int r = 0; r < F; r++) begin
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < F; c++) begin
          in_word[c*ACT_W +: ACT_W] = 16'($urandom);
          exp_q[r].push_back(act_t'(in_word[c*ACT_W +: ACT_W]));
        end
        nwords++;
      end
      if (blk == 0) begin
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid) begin failures++; $display("no output after the first block"); end
        // a gap of one block time keeps the buffer from overflowing
        repeat (2) @(negedge clk);
      end
      if (blk >= 20 && rnd(2) == 0) begin
        @(negedge clk);
        in_valid = 0;
        repeat (rnd(4)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != nwords) begin failures++; $display("out %0d of %0d", nout, nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
