// tb_adder_tree: random sums through a 13-input tree with groups of 3 (3 levels) and a
// 32-input binary tree (5 levels); checks every sum and its latency in cycles.
module tb_adder_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic               v13, o13, v32, o32;
  logic signed [31:0] i13 [13], s13, i32 [32], s32;

  adder_tree #(.N(13), .W(32), .GRP(3)) dut13 (.clk(clk), .rst_n(rst_n), .in_valid(v13), .in(i13), .out_valid(o13), .sum(s13));
  adder_tree #(.N(32), .W(32), .GRP(2)) dut32 (.clk(clk), .rst_n(rst_n), .in_valid(v32), .in(i32), .out_valid(o32), .sum(s32));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [31:0] q13 [$], q32 [$];
  int t13 [$], t32 [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (o13) begin
      checks++;
      if (s13 !== q13[0] || cyc - t13[0] != 3) begin
        failures++;
        $display("N13 sum %0d ref %0d lat %0d", s13, q13[0], cyc - t13[0]);
      end
      void'(q13.pop_front()); void'(t13.pop_front());
    end
    if (o32) begin
      checks++;
      if (s32 !== q32[0] || cyc - t32[0] != 5) begin
        failures++;
        $display("N32 sum %0d ref %0d lat %0d", s32, q32[0], cyc - t32[0]);
      end
      void'(q32.pop_front()); void'(t32.pop_front());
    end
  end

  initial begin
    v13 = 0; v32 = 0;
    foreach (i13[i]) i13[i] = 0;
    foreach (i32[i]) i32[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic signed [31:0] a, b;
      @(negedge clk);
      v13 = (rnd(4)) != 0;
      v32 = (rnd(4)) != 0;
      a = 0; b = 0;
      foreach (i13[i]) begin i13[i] = $signed($urandom) >>> 6; a += i13[i]; end
      foreach (i32[i]) begin i32[i] = $signed($urandom) >>> 6; b += i32[i]; end
      if (v13) begin q13.push_back(a); t13.push_back(cyc); end
      if (v32) begin q32.push_back(b); t32.push_back(cyc); end
    end
    @(negedge clk);
    v13 = 0; v32 = 0;
    repeat (10) @(posedge clk);
    if (q13.size() != 0 || q32.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
