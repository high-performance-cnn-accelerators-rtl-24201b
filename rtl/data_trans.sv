// data_trans: packs the serial output of one CCPU into F-wide words for the map buffer.
//
// Pixels of one output channel arrive in raster order (`in_valid`, `in_pix`) with an
// end-of-row marker `in_eol` in a separate cycle after the last pixel of each row. Every
// F pixels form one word (lane 0 = leftmost pixel) written at consecutive addresses from
// `base`, which is loaded by `start`. At the end of a row the partly filled word is
// written with zero lanes; if the row filled its last word exactly, an all-zero word is
// written instead. Each stored row therefore ends in at least one zero, which is the
// separator the row-integrated data flow needs, and occupies ceil((W+1)/F) words - the
// same layout the feature map RAMs use. One write per cycle at most; a word is written
// in the cycle after its last pixel arrived. Serial-to-F-parallel conversion follows
// the design; the word layout and end-of-row rule are this implementation's choice.
module data_trans
  import cnn_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic          in_valid,
  input  act_t          in_pix,
  input  logic          in_eol,
  output logic          we,
  output logic [AW-1:0] waddr,
  output fword_t        wdata
);
  act_t                 lanes [F];
  logic [$clog2(F)-1:0] cnt;
  logic [AW-1:0]        addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      addr  <= '0;
      we    <= 1'b0;
      waddr <= '0;
      wdata <= '0;
      for (int i = 0; i < F; i++) lanes[i] <= '0;
    end else begin
      we <= 1'b0;
      if (start) begin
        addr <= base;
        cnt  <= '0;
        for (int i = 0; i < F; i++) lanes[i] <= '0;
      end else if (in_valid) begin
        if (cnt == $bits(cnt)'(F-1)) begin
          we    <= 1'b1;
          waddr <= addr;
          addr  <= addr + 1'b1;
          cnt   <= '0;
          for (int i = 0; i < F-1; i++) wdata[i*ACT_W +: ACT_W] <= lanes[i];
          wdata[(F-1)*ACT_W +: ACT_W] <= in_pix;
          for (int i = 0; i < F; i++) lanes[i] <= '0;
        end else begin
          lanes[cnt] <= in_pix;
          cnt        <= cnt + 1'b1;
        end
      end else if (in_eol) begin
        we    <= 1'b1;
        waddr <= addr;
        addr  <= addr + 1'b1;
        cnt   <= '0;
        for (int i = 0; i < F; i++) wdata[i*ACT_W +: ACT_W] <= lanes[i];
        for (int i = 0; i < F; i++) lanes[i] <= '0;
      end
    end
  end

  a_eol_alone: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && in_eol))
    else $error("data_trans: pixel and end-of-row in the same cycle");
endmodule
