// adder_tree: pipelined multi-level adder, the accumulator front end of the CCPU and of
// each shift-accumulator.
//
// The N inputs are split into groups of GRP ("a") values; each group is added and
// registered, giving ceil(N/GRP) values for the next level, until one value is left.
// There are LEVELS = ceil(log_GRP(N)) register levels, so `sum` and `out_valid` follow
// `in_valid`/`in` by LEVELS cycles (zero cycles when N = 1). The grouping into levels of
// `a` values follows the design; the default GRP = 2 matches its adder count, which is
// given for two-input adders. Inputs are sign-extended sums, no overflow detection.
module adder_tree
  import cnn_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned W   = 32,
  parameter int unsigned GRP = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in [N],
  output logic                out_valid,
  output logic signed [W-1:0] sum
);
  localparam int unsigned LEVELS = tree_levels(N, GRP);

  // width of level l
  function automatic int unsigned lvl_n(int unsigned l);
    int unsigned n = N;
    for (int unsigned q = 0; q < l; q++) n = (n + GRP - 1) / GRP;
    return n;
  endfunction

  logic signed [W-1:0] v [LEVELS+1][N];
  logic                vld [LEVELS+1];

  always_comb begin
    v[0]   = in;
    vld[0] = in_valid;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
    end
    always_ff @(posedge clk) begin
      for (int unsigned j = 0; j < N; j++) begin
        logic signed [W-1:0] s;
        s = '0;
        if (j < lvl_n(l)) begin
          for (int unsigned k = 0; k < GRP; k++)
            if (j*GRP + k < lvl_n(l-1)) s += v[l-1][j*GRP+k];
        end
        v[l][j] <= s;
      end
    end
  end

  assign sum       = v[LEVELS][0];
  assign out_valid = vld[LEVELS];
endmodule
