// max_pool: pooling stage behind the ReLU of a CCPU (pooling buffer, pooling PE, MUX).
//
// Input is the CCPU's output stream, one pixel per valid cycle in raster order, plus an
// end-of-row marker `in_eol` in a cycle of its own after the last pixel of each row.
// With `pool_en` the unit computes 2x2 max pooling with stride 2: on even rows the
// maximum of each horizontal pair is stored in the pooling buffer (one row of W/2
// entries); on odd rows the pair maximum is compared with the stored value and the
// result is emitted, so one pooled pixel leaves for every second pixel of every second
// row, one cycle after its last input. End-of-row markers are passed on only after odd
// rows. Without `pool_en` the MUX bypasses the pooling PE (one register stage either
// way). Row parity comes from `in_row_odd`, horizontal parity from `in_col`. Max
// pooling follows the design; 2x2/stride 2 is the pooling VGG-16 uses. W is assumed even.
module max_pool
  import cnn_pkg::*;
#(
  parameter int unsigned MAX_W = 224   // widest row that is pooled
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pool_en,
  input  logic       in_valid,
  input  act_t       in_pix,
  input  logic [8:0] in_col,
  input  logic       in_row_odd,
  input  logic       in_eol,
  output logic       out_valid,
  output act_t       out_pix,
  output logic       out_eol
);
  localparam int unsigned PBW = $clog2(MAX_W/2);
  act_t buffer [MAX_W/2];   // pooling buffer: one row of pair maxima
  logic [PBW-1:0] pidx;     // pair index of the current pixel
  assign pidx = PBW'(in_col >> 1);
  act_t hold;               // left pixel of the current pair

  function automatic act_t amax(act_t a, act_t b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_eol   <= 1'b0;
      out_pix   <= '0;
      hold      <= '0;
    end else begin
      out_valid <= 1'b0;
      out_eol   <= 1'b0;
      if (!pool_en) begin
        out_valid <= in_valid;
        out_pix   <= in_pix;
        out_eol   <= in_eol;
      end else begin
        if (in_valid) begin
          if (!in_col[0]) hold <= in_pix;
          else if (!in_row_odd) buffer[pidx] <= amax(hold, in_pix);
          else begin
            out_valid <= 1'b1;
            out_pix   <= amax(buffer[pidx], amax(hold, in_pix));
          end
        end
        if (in_eol && in_row_odd) out_eol <= 1'b1;
      end
    end
  end
endmodule
