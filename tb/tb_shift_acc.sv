// tb_shift_acc: random kernels of 1..9 beats of M_p = 4 (activation, power-of-two code)
// pairs, including zero codes; checks each accumulated sum against
// sum(act * (+/-2^-e) * 2^7) and that it appears LEVELS + 1 = 3 cycles after the last beat.
module tb_shift_acc;
  import cnn_pkg::*;
  localparam int MP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction
  logic in_valid, in_first, in_last, acc_valid;
  act_t act [MP];
  logic [PW_W-1:0] code [MP];
  acc_t acc;

  shift_acc #(.M_P(MP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  acc_t exp_q [$];
  int   t_q [$];
  int   cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    #1;
    if (acc_valid) begin
      checks++;
      if (exp_q.size() == 0 || acc !== exp_q[0] || cyc - t_q[0] != 3) begin
        failures++;
        if (failures < 10) $display("acc %0d exp %0d lat %0d", acc, exp_q.size() ? exp_q[0] : 0, cyc - t_q[0]);
      end
      if (exp_q.size()) begin void'(exp_q.pop_front()); void'(t_q.pop_front()); end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0;
    foreach (act[i]) begin act[i] = 0; code[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      int nb;
      acc_t s;
      nb = 1 + rnd(9);
      s  = 0;
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        in_valid = 1; in_first = (b == 0); in_last = (b == nb - 1);
        foreach (act[i]) begin
          int e;
          act[i]  = act_t'($urandom);
          code[i] = 4'($urandom);
          e = int'(code[i][2:0]);
          if (e != 7) s += (code[i][3] ? -1 : 1) * (acc_t'(act[i]) * (acc_t'(1) <<< (7 - e)));
        end
        if (b == nb - 1) begin exp_q.push_back(s); t_q.push_back(cyc); end
      end
      if (rnd(2)) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
