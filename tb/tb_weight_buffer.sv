// tb_weight_buffer: loads a kernel set into the shadow bank while the active bank is
// read, checks that the active kernels do not change during loading, and that after
// each swap the freshly loaded set is presented in parallel.
module tb_weight_buffer;
  import cnn_pkg::*;
  localparam int M = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ld_en, swap;
  logic [2:0] ld_idx;
  kword_t ld_kernel;
  kword_t kernel [M];

  weight_buffer #(.M_NP(M)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kword_t cur [M], nxt [M];
    ld_en = 0; swap = 0; ld_idx = 0; ld_kernel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      for (int m = 0; m < M; m++) begin
        @(negedge clk);
        ld_en = 1; ld_idx = 3'(m);
        ld_kernel = {$urandom, $urandom, 8'($urandom)};
        nxt[m] = ld_kernel;
        if (it > 0) begin
          for (int q = 0; q < M; q++) begin
            checks++;
            if (kernel[q] !== cur[q]) failures++;
          end
        end
      end
      @(negedge clk);
      ld_en = 0; swap = 1;
      @(negedge clk);
      swap = 0;
      cur = nxt;
      for (int q = 0; q < M; q++) begin
        checks++;
        if (kernel[q] !== cur[q]) begin failures++; $display("it %0d kernel %0d wrong", it, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
