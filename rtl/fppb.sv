// fppb: F x F ping-pong buffer feeding the F parallel FIRs of a Conv-PE.
//
// The feature map RAM delivers one word of F horizontally adjacent activations per
// cycle. The controller reads the same F columns of F consecutive rows (words A, B, C),
// then the next F columns (D, E, F), and so on. The FPPB writes each word as one row of
// a F x F block; when a block is full it is read out column by column, one column per
// cycle, while the other block fills. Output lane r thus carries the pixels of the r-th
// row of the block one after the other: a word-wide row store turns into F parallel
// pixel streams, one per FIR.
//
// Timing: with words arriving every cycle, block 0 fills in cycles 0..F-1 and is read in
// cycles F..2F-1 while block 1 fills; the output is combinational from the block
// registers and is zero while `out_valid` is low (so the FIRs are flushed with zeros in
// gaps). Writing into a block that is still being read is an overflow and is flagged by
// an assertion. The two blocks, row-wise write and column-wise read follow the design;
// the valid handshake is this implementation's choice.
module fppb
  import cnn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fword_t in_word,
  output logic   out_valid,
  output act_t   out_lane [F]
);
  act_t blk [2][F][F];           // blk[b][row][col]
  logic full [2];
  logic wsel, rsel;
  logic [$clog2(F)-1:0] wcnt, rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '{1'b0, 1'b0};
      wsel <= 1'b0;
      rsel <= 1'b0;
      wcnt <= '0;
      rcnt <= '0;
    end else begin
      if (in_valid) begin
        for (int c = 0; c < F; c++) blk[wsel][wcnt][c] <= in_word[c*ACT_W +: ACT_W];
        if (wcnt == $bits(wcnt)'(F-1)) begin
          wcnt       <= '0;
          full[wsel] <= 1'b1;
          wsel       <= ~wsel;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (full[rsel]) begin
        if (rcnt == $bits(rcnt)'(F-1)) begin
          rcnt       <= '0;
          full[rsel] <= 1'b0;
          rsel       <= ~rsel;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end

  assign out_valid = full[rsel];
  always_comb
    for (int r = 0; r < F; r++) out_lane[r] = full[rsel] ? blk[rsel][r][rcnt] : '0;

  // A block may only be written while it is not waiting to be read
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> !full[wsel])
    else $error("fppb: write into a full block");
endmodule
