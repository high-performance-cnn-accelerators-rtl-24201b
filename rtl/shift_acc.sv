// shift_acc: shift-accumulator of the SAC-PU for power-of-two weights.
//
// P-layer weights are +/-2^-e, stored as a 4-bit code {sign, e}. M_p shifters turn
// M_p (activation, weight) pairs into products by shifting the activation left by
// WFRAC - e (the product keeps WFRAC fraction bits, the same scale as an NP-layer
// product) and negating it for a negative sign; codes with e = 7 (zero filler, end
// marker, unused slot) give 0. The M_p products are summed by a pipelined adder tree
// and added into an accumulator register.
//
// Interface: one beat per cycle with `in_valid`; `in_first` marks the first beat of a
// weight kernel (the accumulator restarts), `in_last` its last. `acc_valid` pulses with
// the finished sum on `acc`, LEVELS + 1 cycles after the last beat. Shifters, adder
// levels and accumulator register follow the design; the code format is this
// implementation's choice.
module shift_acc
  import cnn_pkg::*;
#(
  parameter int unsigned M_P = 4,
  parameter int unsigned GRP = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic              in_last,
  input  act_t              act  [M_P],
  input  logic [PW_W-1:0]   code [M_P],
  output logic              acc_valid,
  output acc_t              acc
);
  localparam int unsigned LEVELS = tree_levels(M_P, GRP);

  acc_t prod [M_P];
  always_comb
    for (int i = 0; i < M_P; i++) begin
      acc_t v;
      v = acc_t'(act[i]) <<< (WFRAC - int'(code[i][PW_W-2:0]));
      if (code[i][PW_W-2:0] == 3'd7) prod[i] = '0;
      else                           prod[i] = code[i][PW_W-1] ? -v : v;
    end

  logic tv;
  acc_t tsum;
  adder_tree #(.N(M_P), .W(ACC_W), .GRP(GRP)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(prod), .out_valid(tv), .sum(tsum));

  logic first_d [LEVELS+1];
  logic last_d  [LEVELS+1];
  assign first_d[0] = in_first;
  assign last_d[0]  = in_last;
  for (genvar l = 1; l <= LEVELS; l++) begin : g_d
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        first_d[l] <= 1'b0;
        last_d[l]  <= 1'b0;
      end else begin
        first_d[l] <= first_d[l-1];
        last_d[l]  <= last_d[l-1];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= tv && last_d[LEVELS];
      if (tv) acc <= (first_d[LEVELS] ? '0 : acc) + tsum;
    end
  end
endmodule
