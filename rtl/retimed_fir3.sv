// retimed_fir3: cut-set retimed 3-tap FIR filter, the building block of the Conv-PE.
//
// The direct-form 3-tap FIR y = w0*x[n] + w1*x[n-1] + w2*x[n-2] is cut between the
// second and third tap: one register is placed in the adder chain and one more in the
// sample delay line, so the critical path is one multiplier and one adder. The result
// is the direct-form output delayed by one cycle:
//
//     y[n] = sin[n-1] + w0*x[n-1] + w1*x[n-2] + w2*x[n-3]
//
// `sin` is an optional partial-sum input and `xcas` the sample delayed by four cycles;
// both are used only to chain FIRs into one longer filter (serial mode of the general
// Conv-PE), where every further FIR then lines up with the previous one. The sample
// delay line and the register in the adder chain follow the retimed FIR of the design;
// the cascade ports and the extra cascade register are this implementation's choice.
// No reset: the filter is flushed by feeding zeros.
module retimed_fir3
  import cnn_pkg::*;
#(
  parameter int unsigned XW = ACT_W,
  parameter int unsigned WW = NPW_W,
  parameter int unsigned YW = ACC_W
) (
  input  logic                 clk,
  input  logic signed [XW-1:0] x,
  input  logic signed [YW-1:0] sin,
  input  logic signed [WW-1:0] w [KTAPS],
  output logic signed [YW-1:0] y,
  output logic signed [XW-1:0] xcas
);
  logic signed [XW-1:0] d1, d2, d3, d4;
  logic signed [YW-1:0] psum;

  always_ff @(posedge clk) begin
    d1   <= x;
    d2   <= d1;
    d3   <= d2;
    d4   <= d3;
    psum <= sin + YW'(x) * YW'(w[0]) + YW'(d1) * YW'(w[1]);   // retiming register in the adder chain
  end

  assign y    = psum + YW'(d3) * YW'(w[2]);
  assign xcas = d4;
endmodule
