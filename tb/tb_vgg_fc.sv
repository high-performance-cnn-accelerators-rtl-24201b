// tb_vgg_fc: the three fully connected layers of VGG-16 as P-layers on the P engine at
// its default size (N_p = 64 lanes, M_p = 4):
//   FC6 25088 -> 4096, 96 % pruned, ReLU
//   FC7  4096 -> 4096, 96 % pruned, ReLU
//   FC8  4096 -> 1000, 77 % pruned
// Kept weights are random +-2^-e. The testbench compresses every kernel (zero runs,
// zero fillers for gaps over 31, end marker), packs each layer with a kernel stride
// equal to its longest kernel, and checks that all three layers fit the lane RAMs.
// The final 1000 outputs are compared with a model of the shift arithmetic,
// requantization and ReLU. For every one of the 144 groups the SAC-PU phase lengths are
// checked: weight decoding = longest entry list + 2, activation reading = L + 1 (L one
// past the last index used by the group), SAC computing = ceil(max kept weights / M_p).
module tb_vgg_fc;
  import cnn_pkg::*;
  localparam int NP = 64, MP = 4, NL = 3;
  localparam int UI [NL] = '{25088, 4096, 4096};
  localparam int UO [NL] = '{4096, 4096, 1000};
  localparam int KEEP [NL] = '{4, 4, 23};          // percent of weights kept
  localparam int MAXG = 64 + 64 + 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic        act_we = 0, pw_we = 0, lt_we = 0, start = 0, busy, done;
  logic [14:0] act_waddr = 0, res_raddr = 0;
  act_t        act_wdata = 0, res_rdata;
  logic [5:0]  pw_lane = 0;
  logic [16:0] pw_addr = 0;
  pentry_t     pw_wdata = '0;
  logic [1:0]  lt_idx = 0;
  p_layer_t    lt_data = '0;
  logic [2:0]  n_layers = 3'(NL);

  p_engine dut (.*);

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] q [NL][];        // q[l][n*UI + i]: weight code, PCODE_ZERO = pruned
  act_t       act [NL+1][];    // act[0] input, act[l+1] output of layer l
  int         g_ent [MAXG], g_L [MAXG], g_nnz [MAXG];
  int         kstr [NL], wbase [NL];

  int grp_seen = 0;
  always @(posedge clk) if (rst_n && dut.pu_done) begin
    checks++;
    if (dut.cyc_wd != 16'(g_ent[grp_seen] + 2) || dut.cyc_ar != 16'(g_L[grp_seen] + 1) ||
        dut.cyc_sc != 16'((g_nnz[grp_seen] + MP - 1) / MP)) begin
      failures++;
      $display("group %0d: WD %0d AR %0d SC %0d, expected %0d %0d %0d", grp_seen, dut.cyc_wd,
               dut.cyc_ar, dut.cyc_sc, g_ent[grp_seen] + 2, g_L[grp_seen] + 1,
               (g_nnz[grp_seen] + MP - 1) / MP);
    end
    grp_seen++;
  end

  // number of lane RAM entries of kernel n of layer l
  function automatic int entries(int l, int n);
    int e, last;
    e = 1; last = -1;
    for (int i = 0; i < UI[l]; i++)
      if (q[l][n*UI[l] + i] != PCODE_ZERO) begin
        e += 1 + (i - last - 1) / 32;
        last = i;
      end
    return e;
  endfunction

  initial begin
    int gbase, words;
    act[0] = new[UI[0]];
    for (int i = 0; i < UI[0]; i++) act[0][i] = act_t'(rnd(2001) - 1000);
    for (int l = 0; l < NL; l++) begin
      q[l] = new[UO[l] * UI[l]];
      for (int k = 0; k < UO[l] * UI[l]; k++) begin
        int unsigned u;
        u = $urandom;
        q[l][k] = (u % 100 < KEEP[l]) ? {u[20], 3'((u >> 8) % 7)} : PCODE_ZERO;
      end
      act[l+1] = new[UO[l]];
      for (int n = 0; n < UO[l]; n++) begin
        acc_t s;
        act_t r;
        s = 0;
        for (int i = 0; i < UI[l]; i++)
          if (q[l][n*UI[l] + i] != PCODE_ZERO)
            s += (q[l][n*UI[l] + i][3] ? -1 : 1) * (acc_t'(act[l][i]) <<< (7 - int'(q[l][n*UI[l] + i][2:0])));
        r = sat_act(s >>> 7);
        if (l < NL - 1 && r < 0) r = 0;
        act[l+1][n] = r;
      end
    end
    // kernel stride of each layer = its longest kernel; layers packed one after another
    words = 0;
    for (int l = 0; l < NL; l++) begin
      kstr[l] = 1;
      for (int n = 0; n < UO[l]; n++) if (entries(l, n) > kstr[l]) kstr[l] = entries(l, n);
      wbase[l] = words;
      words += ((UO[l] + NP - 1) / NP) * kstr[l];
      $display("layer %0d: kernel stride %0d entries", l, kstr[l]);
    end
    $display("lane RAM words used: %0d of %0d", words, 131072);
    checks++;
    if (words > 131072) begin failures++; $display("weights do not fit"); end
    foreach (g_ent[g]) begin g_ent[g] = 0; g_L[g] = 0; g_nnz[g] = 0; end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < UI[0]; i++) begin
      @(negedge clk);
      act_we = 1; act_waddr = 15'(i); act_wdata = act[0][i];
    end
    @(negedge clk);
    act_we = 0;
    gbase = 0;
    for (int l = 0; l < NL; l++) begin
      int ng;
      ng = (UO[l] + NP - 1) / NP;
      for (int n = 0; n < ng * NP; n++) begin
        int e, last, nz, g, a0;
        e = 0; last = -1; nz = 0; g = gbase + n / NP; a0 = wbase[l] + (n / NP) * kstr[l];
        if (n < UO[l])
          for (int i = 0; i < UI[l]; i++)
            if (q[l][n*UI[l] + i] != PCODE_ZERO) begin
              int run;
              run = i - last - 1;
              while (run > 31) begin
                @(negedge clk);
                pw_we = 1; pw_lane = 6'(n % NP); pw_addr = 17'(a0 + e); pw_wdata = '{run: 5'd31, code: PCODE_ZERO};
                e++; run -= 32;
              end
              @(negedge clk);
              pw_we = 1; pw_lane = 6'(n % NP); pw_addr = 17'(a0 + e); pw_wdata = '{run: 5'(run), code: q[l][n*UI[l] + i]};
              e++; last = i; nz++;
            end
        @(negedge clk);
        pw_we = 1; pw_lane = 6'(n % NP); pw_addr = 17'(a0 + e); pw_wdata = '{run: 5'd0, code: PCODE_END};
        e++;
        if (e > g_ent[g]) g_ent[g] = e;
        if (last + 1 > g_L[g]) g_L[g] = last + 1;
        if (nz > g_nnz[g]) g_nnz[g] = nz;
      end
      gbase += ng;
    end
    @(negedge clk);
    pw_we = 0;
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      lt_we = 1; lt_idx = 2'(l);
      lt_data = '{u_out: 16'(UO[l]), groups: 9'((UO[l] + NP - 1) / NP), kstride: 12'(kstr[l]),
                  wbase: 20'(wbase[l]), relu: (l < NL - 1), shift: 5'd7};
    end
    @(negedge clk);
    lt_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    for (int n = 0; n < UO[NL-1]; n++) begin
      res_raddr = 15'(n);
      @(posedge clk);
      #1;
      checks++;
      if (res_rdata !== act[NL][n]) begin
        failures++;
        if (failures < 10) $display("neuron %0d: %0d expected %0d", n, res_rdata, act[NL][n]);
      end
    end
    checks++;
    if (grp_seen != gbase) begin failures++; $display("%0d groups processed, expected %0d", grp_seen, gbase); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
