// tb_conv_pe: checks the general Conv-PE in its three modes against direct models.
// With X_r[n] the sample of row r taken at edge n, after edge n the PE must show
//   parallel : y[0] = sum_r sum_k w[r][k] * X_r[n-1-k]
//   serial   : y[0] = sum_j w[j/3][j%3] * X_0[n-2-j]      (one 9-tap filter)
//   pointwise: y[r] = sum_k w[r][k] * X_r[n-1-k]
// so the 2-D latency is 2 edges and the serial chain lines up as one filter.
module tb_conv_pe;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  pe_mode_e mode;
  act_t x [KTAPS];
  npw_t w [KTAPS][KTAPS];
  acc_t y [KTAPS];
  int checks = 0, failures = 0;

  conv_pe dut (.clk(clk), .mode(mode), .x(x), .w(w), .y(y));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t h [KTAPS][$];

  function automatic acc_t hx(int r, int d);
    return (d < h[r].size()) ? acc_t'(h[r][d]) : '0;
  endfunction

  initial begin
    pe_mode_e modes [3] = '{PE_PARALLEL, PE_SERIAL, PE_POINTWISE};
    for (int r = 0; r < KTAPS; r++) x[r] = '0;
    for (int mi = 0; mi < 3; mi++) begin
      mode = modes[mi];
      for (int r = 0; r < KTAPS; r++)
        for (int k = 0; k < KTAPS; k++) w[r][k] = npw_t'($urandom);
      // flush with zeros
      for (int r = 0; r < KTAPS; r++) x[r] = '0;
      repeat (12) @(posedge clk);
      for (int r = 0; r < KTAPS; r++) h[r] = {};
      for (int n = 0; n < 150; n++) begin
        @(negedge clk);
        for (int r = 0; r < KTAPS; r++) x[r] = act_t'($urandom);
        @(posedge clk);
        for (int r = 0; r < KTAPS; r++) h[r].push_front(x[r]);
        #1;
        if (n >= 12) begin
          acc_t ref_y [KTAPS];
          for (int r = 0; r < KTAPS; r++) ref_y[r] = '0;
          unique case (mode)
            PE_PARALLEL:
              for (int r = 0; r < KTAPS; r++)
                for (int k = 0; k < KTAPS; k++) ref_y[0] += acc_t'(w[r][k]) * hx(r, 1 + k);
            PE_SERIAL:
              for (int j = 0; j < 9; j++) ref_y[0] += acc_t'(w[j/3][j%3]) * hx(0, 2 + j);
            default:
              for (int r = 0; r < KTAPS; r++)
                for (int k = 0; k < KTAPS; k++) ref_y[r] += acc_t'(w[r][k]) * hx(r, 1 + k);
          endcase
          for (int r = 0; r < KTAPS; r++) begin
            checks++;
            if (y[r] !== ref_y[r]) begin
              failures++;
              if (failures < 10) $display("mode %s n=%0d lane %0d y=%0d ref=%0d", mode.name(), n, r, y[r], ref_y[r]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
