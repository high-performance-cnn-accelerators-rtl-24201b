// tb_sac_pu: three groups of 8 random sparse kernels over 120 activations, one of them
// with a zero run longer than the 5-bit field (zero-filler entries), one empty kernel.
// Lane RAMs and the activation RAM are modelled here with one-cycle reads. Checks every
// sum against sum(act * (+/-2^-e) * 2^7), that every kept weight captured exactly one
// activation in the ADF, and the phase lengths: AR = L + 1 cycles, SC = ceil(max
// nnz / M_p) beats, WD = longest entry list + 2 cycles.
module tb_sac_pu;
  import cnn_pkg::*;
  localparam int NP = 8, MP = 4, U = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n);   // uniform 0 .. n-1
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  logic start, done;
  logic [19:0] kbase, w_raddr;
  pentry_t w_rdata [NP];
  logic [15:0] a_raddr, cyc_wd, cyc_ar, cyc_sc, n_accept;
  act_t a_rdata;
  acc_t result [NP];

  sac_pu #(.N_P(NP), .M_P(MP), .CACHE_D(64)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pentry_t lram [NP][512];
  act_t    amem [U];
  always_ff @(posedge clk) begin
    for (int k = 0; k < NP; k++) w_rdata[k] <= lram[k][w_raddr[8:0]];
    a_rdata <= amem[a_raddr < U ? a_raddr : 0];
  end

  initial begin
    start = 0; kbase = 0;
    foreach (amem[i]) amem[i] = act_t'($signed(rnd(4001)) - 2000);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int grp = 0; grp < 3; grp++) begin
      acc_t exp_s [NP];
      int nnz [NP], ents [NP];
      int L, maxnnz, maxent, tot;
      L = 0; maxnnz = 0; maxent = 0; tot = 0;
      for (int k = 0; k < NP; k++) begin
        int last, e;
        exp_s[k] = 0; nnz[k] = 0; last = -1; e = 0;
        for (int i = 0; i < U; i++) begin
          bit keep;
          keep = (rnd(100)) < 25;
          if (k == 1) keep = (i == 3 || i == 80);           // run of 76 zeros
          if (k == 2) keep = 0;                             // empty kernel
          if (keep) begin
            int run, ex;
            logic [3:0] code;
            run = i - last - 1;
            while (run > 31) begin                         // zero filler entries
              lram[k][grp*128 + e] = '{run: 5'd31, code: PCODE_ZERO};
              e++;
              run -= 32;
            end
            ex = rnd(7);
            code = {1'($urandom), 3'(ex)};
            lram[k][grp*128 + e] = '{run: 5'(run), code: code};
            e++;
            exp_s[k] += (code[3] ? -1 : 1) * (acc_t'(amem[i]) <<< (7 - ex));
            nnz[k]++;
            last = i;
          end
        end
        lram[k][grp*128 + e] = '{run: 5'd0, code: PCODE_END};
        e++;
        ents[k] = e;
        if (last + 1 > L) L = last + 1;
        if (nnz[k] > maxnnz) maxnnz = nnz[k];
        if (e > maxent) maxent = e;
        tot += nnz[k];
      end
      @(negedge clk);
      start = 1; kbase = 20'(grp*128);
      @(negedge clk);
      start = 0;
      wait (done);
      #1;
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (result[k] !== exp_s[k]) begin
          failures++;
          $display("grp %0d lane %0d: %0d expected %0d", grp, k, result[k], exp_s[k]);
        end
      end
      checks++;
      if (n_accept != tot) begin failures++; $display("accepted %0d of %0d", n_accept, tot); end
      checks++;
      if (cyc_ar != L + 1 || cyc_sc != (maxnnz + MP - 1) / MP || cyc_wd != maxent + 2) begin
        failures++;
        $display("AR %0d (L=%0d) SC %0d (nnz %0d) WD %0d (entries %0d)", cyc_ar, L, cyc_sc, maxnnz, cyc_wd, maxent);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
