// tb_p_engine: two pruned fully connected layers, 40 -> 24 (ReLU) -> 10 (no ReLU), on a
// P engine with N_p = 8 lanes (3 full groups, then 2 groups of which the last is partly
// empty). Input activations go into buffer 0, compressed kernels into the lane RAMs;
// the result is read back and compared with a model of the power-of-two arithmetic,
// requantization by 7 bits and ReLU. Counts zero-filler entries and ADF captures.
module tb_p_engine;
  import cnn_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic act_we, pw_we, lt_we, start, busy, done;
  logic [6:0] act_waddr, res_raddr;
  act_t act_wdata, res_rdata;
  logic [2:0] pw_lane;
  logic [9:0] pw_addr;
  pentry_t pw_wdata;
  logic [0:0] lt_idx;
  p_layer_t lt_data;
  logic [1:0] n_layers;

  p_engine #(.N_P(NP), .M_P(4), .CACHE_D(64), .PA_DEPTH(128), .PW_DEPTH(1024), .MAX_LAYERS(2)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int accepts = 0;
  always @(posedge clk) if (rst_n) accepts += $countones(dut.u_pu.hit);

  act_t  a0 [40], a1 [24], a2 [10];
  logic [3:0] wcode [2][24][40];   // PCODE_ZERO = pruned
  int fillers = 0, kept = 0;

  task automatic put(input int lane, input int addr, input pentry_t e);
    @(negedge clk);
    pw_we = 1; pw_lane = 3'(lane); pw_addr = 10'(addr); pw_wdata = e;
  endtask

  // write layer l (u_in -> u_out) from lane address wbase, kstride words per group
  task automatic load_layer(input int l, input int u_in, input int u_out, input int wbase, input int kstride);
    for (int n = 0; n < ((u_out + NP - 1) / NP) * NP; n++) begin
      int e, last;
      e = 0; last = -1;
      if (n < u_out)
        for (int i = 0; i < u_in; i++)
          if (wcode[l][n][i] != PCODE_ZERO) begin
            int run;
            run = i - last - 1;
            while (run > 31) begin
              put(n % NP, wbase + (n / NP) * kstride + e, '{run: 5'd31, code: PCODE_ZERO});
              e++; run -= 32; fillers++;
            end
            put(n % NP, wbase + (n / NP) * kstride + e, '{run: 5'(run), code: wcode[l][n][i]});
            e++; last = i; kept++;
          end
      put(n % NP, wbase + (n / NP) * kstride + e, '{run: 5'd0, code: PCODE_END});
    end
  endtask

  function automatic act_t neuron(input int l, input int n, input int u_in, input bit relu);
    acc_t s;
    act_t q;
    s = 0;
    for (int i = 0; i < u_in; i++)
      if (wcode[l][n][i] != PCODE_ZERO) begin
        act_t a;
        a = (l == 0) ? a0[i] : a1[i];
        s += (wcode[l][n][i][3] ? -1 : 1) * (acc_t'(a) <<< (7 - int'(wcode[l][n][i][2:0])));
      end
    q = sat_act(s >>> 7);
    if (relu && q < 0) q = 0;
    return q;
  endfunction

  initial begin
    act_we = 0; pw_we = 0; lt_we = 0; start = 0; n_layers = 2'd2;
    act_waddr = 0; act_wdata = 0; res_raddr = 0; pw_lane = 0; pw_addr = 0; pw_wdata = '0;
    lt_idx = 0; lt_data = '0;
    foreach (a0[i]) a0[i] = act_t'($signed(rnd(4001)) - 2000);
    foreach (wcode[l, n, i]) wcode[l][n][i] = ((rnd(100)) < 30) ? {1'($urandom), 3'(rnd(7))} : PCODE_ZERO;
    for (int i = 1; i < 40; i++) wcode[0][5][i] = PCODE_ZERO;   // one long zero run
    wcode[0][5][0] = 4'b0010; wcode[0][5][39] = 4'b1001;
    foreach (a1[n]) a1[n] = neuron(0, n, 40, 1);
    foreach (a2[n]) a2[n] = neuron(1, n, 24, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      act_we = 1; act_waddr = 7'(i); act_wdata = a0[i];
    end
    @(negedge clk);
    act_we = 0;
    load_layer(0, 40, 24, 0, 64);
    load_layer(1, 24, 10, 256, 64);
    @(negedge clk);
    pw_we = 0;
    lt_we = 1; lt_idx = 0;
    lt_data = '{u_out: 16'd24, groups: 9'd3, kstride: 12'd64, wbase: 20'd0, relu: 1'b1, shift: 5'd7};
    @(negedge clk);
    lt_idx = 1;
    lt_data = '{u_out: 16'd10, groups: 9'd2, kstride: 12'd64, wbase: 20'd256, relu: 1'b0, shift: 5'd7};
    @(negedge clk);
    lt_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      res_raddr = 7'(n);
      @(posedge clk);
      #1;
      checks++;
      if (res_rdata !== a2[n]) begin
        failures++;
        $display("neuron %0d: %0d expected %0d", n, res_rdata, a2[n]);
      end
    end
    checks++;
    if (fillers == 0 || accepts != kept) begin
      failures++;
      $display("fillers %0d, ADF captures %0d of %0d", fillers, accepts, kept);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
