// sac_pu: shift-accumulator based processing unit (SAC-PU) with the activation-driven
// data flow (ADF), processing one group of N_p sparse weight kernels (N_p output
// neurons of a pruned fully connected layer).
//
// Three phases, each started by the previous one:
//  1. Weight decoding (WD). Lane k reads the compressed entries of kernel k from its own
//     lane RAM, all lanes at the same address each cycle (parallel decoding). Each entry
//     is {run, code}: `run` zeros precede the weight. The decoder turns runs into
//     absolute activation indexes and fills the lane's index and weight caches; a zero
//     filler code only advances the index, the end code stops the lane. WD lasts until
//     every lane has met its end code (longest kernel + 1 cycles, plus RAM latency).
//  2. Activation reading (AR, the ADF). Activations 0 .. L-1 are read once, one per
//     cycle, and broadcast to all lanes; L is one past the largest index of the group.
//     Each lane's "if needs?" comparator checks the activation's index against the next
//     index in its index cache and, on a match, captures the activation into its
//     activation cache. A pruned activation is thus read once for all N_p kernels.
//  3. SAC computing (SC). ceil(max nnz / M_p) beats: each lane hands M_p cached
//     (activation, weight) pairs per beat to its shift_acc.
// `done` pulses when all N_p sums are on `result`; they stay until the next `start`.
// Phase organisation, parallel decoding, the broadcast with per-lane match and the
// M_p x N_p shift-accumulator array follow the design. AR and SC run one after the
// other here (the design may overlap them), and the cache depth is this implementation's
// choice.
module sac_pu
  import cnn_pkg::*;
#(
  parameter int unsigned N_P     = 64,
  parameter int unsigned M_P     = 4,
  parameter int unsigned GRP     = 2,
  parameter int unsigned CACHE_D = 2048,
  localparam int unsigned CAW    = $clog2(CACHE_D)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [19:0]   kbase,
  output logic [19:0]   w_raddr,
  input  pentry_t       w_rdata [N_P],
  output logic [15:0]   a_raddr,
  input  act_t          a_rdata,
  output logic          done,
  output acc_t          result [N_P],
  // activity counters of the last group
  output logic [15:0]   cyc_wd,
  output logic [15:0]   cyc_ar,
  output logic [15:0]   cyc_sc,
  output logic [15:0]   n_accept
);
  typedef enum logic [2:0] {P_IDLE, P_WD, P_AR, P_ARW, P_SC, P_SCW} ph_e;
  ph_e ph;

  logic [15:0]  idxc [N_P][CACHE_D];
  logic [PW_W-1:0] wc [N_P][CACHE_D];
  act_t         actc [N_P][CACHE_D];
  logic         ended [N_P];
  logic [15:0]  cur   [N_P];
  logic [CAW:0] nnz   [N_P];
  logic [CAW:0] ptr   [N_P];
  logic [15:0]  lmax;
  logic [CAW:0] maxnnz;
  logic [19:0]  e;
  logic         rd_v;          // a read issued last cycle
  logic [15:0]  a_d;
  logic [CAW:0] beat, nbeats;
  logic         all_ended;

  always_comb begin
    all_ended = 1'b1;
    for (int k = 0; k < N_P; k++) if (!ended[k]) all_ended = 1'b0;
  end

  // "if needs?": the broadcast activation is the next one lane k's kernel uses
  logic [N_P-1:0] hit;
  always_comb
    for (int k = 0; k < N_P; k++)
      hit[k] = (ph == P_AR || ph == P_ARW) && rd_v && ptr[k] < nnz[k] &&
               idxc[k][ptr[k][CAW-1:0]] == a_d;

  assign w_raddr = kbase + e;
  assign a_raddr = e[15:0];

  // shift-accumulators
  logic sa_valid, sa_first, sa_last;
  logic acc_v [N_P];
  for (genvar k = 0; k < N_P; k++) begin : g_lane
    act_t            sa_act  [M_P];
    logic [PW_W-1:0] sa_code [M_P];
    always_comb
      for (int j = 0; j < M_P; j++) begin
        logic [CAW:0] ei;
        ei = (CAW+1)'(int'(beat) * M_P + j);
        if (ei < nnz[k]) begin
          sa_act[j]  = actc[k][ei[CAW-1:0]];
          sa_code[j] = wc[k][ei[CAW-1:0]];
        end else begin
          sa_act[j]  = '0;
          sa_code[j] = PCODE_ZERO;
        end
      end
    shift_acc #(.M_P(M_P), .GRP(GRP)) u_sa (
      .clk(clk), .rst_n(rst_n), .in_valid(sa_valid), .in_first(sa_first), .in_last(sa_last),
      .act(sa_act), .code(sa_code), .acc_valid(acc_v[k]), .acc(result[k]));
  end

  assign sa_valid = (ph == P_SC);
  assign sa_first = (beat == 0);
  assign sa_last  = (beat == nbeats - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= P_IDLE;
      e        <= '0;
      rd_v     <= 1'b0;
      a_d      <= '0;
      lmax     <= '0;
      maxnnz   <= '0;
      beat     <= '0;
      nbeats   <= '0;
      done     <= 1'b0;
      cyc_wd   <= '0;
      cyc_ar   <= '0;
      cyc_sc   <= '0;
      n_accept <= '0;
      for (int k = 0; k < N_P; k++) begin
        ended[k] <= 1'b1;
        cur[k]   <= '0;
        nnz[k]   <= '0;
        ptr[k]   <= '0;
      end
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      unique case (ph)
        P_IDLE: if (start) begin
          e        <= '0;
          lmax     <= '0;
          maxnnz   <= '0;
          cyc_wd   <= '0;
          cyc_ar   <= '0;
          cyc_sc   <= '0;
          n_accept <= '0;
          for (int k = 0; k < N_P; k++) begin
            ended[k] <= 1'b0;
            cur[k]   <= '0;
            nnz[k]   <= '0;
            ptr[k]   <= '0;
          end
          ph <= P_WD;
        end
        // ---- weight decoding ----
        P_WD: begin
          cyc_wd <= cyc_wd + 1'b1;
          if (rd_v && all_ended) begin
            e      <= '0;
            nbeats <= (maxnnz == 0) ? (CAW+1)'(1) : (CAW+1)'((int'(maxnnz) + M_P - 1) / M_P);
            ph     <= (lmax == 0) ? P_SC : P_AR;
            beat   <= '0;
          end else begin
            e    <= e + 1'b1;
            rd_v <= 1'b1;
          end
          if (rd_v)
            for (int k = 0; k < N_P; k++)
              if (!ended[k]) begin
                pentry_t en;
                logic [15:0] idx;
                en  = w_rdata[k];
                idx = cur[k] + 16'(en.run);
                if (en.code == PCODE_END || nnz[k] == (CAW+1)'(CACHE_D)) ended[k] <= 1'b1;
                else begin
                  cur[k] <= idx + 1'b1;
                  if (en.code != PCODE_ZERO) begin
                    idxc[k][nnz[k][CAW-1:0]] <= idx;
                    wc[k][nnz[k][CAW-1:0]]   <= en.code;
                    nnz[k]                   <= nnz[k] + 1'b1;
                  end
                end
              end
          // group statistics: longest activation span and most kept weights
          if (rd_v) begin
            logic [15:0]  lm;
            logic [CAW:0] mn;
            lm = lmax;
            mn = maxnnz;
            for (int k = 0; k < N_P; k++)
              if (!ended[k] && w_rdata[k].code != PCODE_END && w_rdata[k].code != PCODE_ZERO) begin
                if (cur[k] + 16'(w_rdata[k].run) + 1'b1 > lm) lm = cur[k] + 16'(w_rdata[k].run) + 1'b1;
                if (nnz[k] + 1'b1 > mn) mn = nnz[k] + 1'b1;
              end
            lmax   <= lm;
            maxnnz <= mn;
          end
        end
        // ---- activation reading (ADF) ----
        P_AR, P_ARW: begin
          cyc_ar <= cyc_ar + 1'b1;
          if (ph == P_AR) begin
            rd_v <= 1'b1;
            a_d  <= e[15:0];
            if (e[15:0] == lmax - 1'b1) ph <= P_ARW;
            e <= e + 1'b1;
          end
          if (rd_v) begin
            for (int k = 0; k < N_P; k++)
              if (hit[k]) begin
                actc[k][ptr[k][CAW-1:0]] <= a_rdata;
                ptr[k]                   <= ptr[k] + 1'b1;
              end
            n_accept <= n_accept + 16'($countones(hit));
          end
          if (ph == P_ARW) begin
            beat <= '0;
            ph   <= P_SC;
          end
        end
        // ---- SAC computing ----
        P_SC: begin
          cyc_sc <= cyc_sc + 1'b1;
          if (beat == nbeats - 1'b1) ph <= P_SCW;
          else beat <= beat + 1'b1;
        end
        P_SCW: if (acc_v[0]) begin
          done <= 1'b1;
          ph   <= P_IDLE;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end
endmodule
