// tb_retimed_fir3: checks the retimed 3-tap FIR against a direct-form model.
// With X[n] the sample taken at clock edge n, the filter must show after edge n
//   y = sin[n] + w0*X[n] + w1*X[n-1] + w2*X[n-2]   and   xcas = X[n-3].
// Random samples, partial sums and three weight sets; watchdog of 5000 cycles.
module tb_retimed_fir3;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  act_t x;
  acc_t sin, y;
  npw_t w [KTAPS];
  act_t xcas;
  int checks = 0, failures = 0;

  retimed_fir3 dut (.clk(clk), .x(x), .sin(sin), .w(w), .y(y), .xcas(xcas));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act_t xh [$];
    acc_t sh;
    x = '0; sin = '0;
    for (int k = 0; k < KTAPS; k++) w[k] = '0;
    for (int set = 0; set < 3; set++) begin
      for (int k = 0; k < KTAPS; k++) w[k] = npw_t'($urandom);
      xh = {};
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        x   = act_t'($urandom);
        sin = acc_t'($signed($urandom) >>> 8);
        @(posedge clk);
        xh.push_front(x);
        sh = sin;
        #1;
        if (n >= 4) begin
          acc_t ref_y;
          ref_y = sh + acc_t'(w[0]) * acc_t'(xh[0]) + acc_t'(w[1]) * acc_t'(xh[1])
                     + acc_t'(w[2]) * acc_t'(xh[2]);
          checks++;
          if (y !== ref_y || xcas !== xh[3]) begin
            failures++;
            if (failures < 10) $display("mismatch n=%0d y=%0d ref=%0d xcas=%0d ref=%0d", n, y, ref_y, xcas, xh[3]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
