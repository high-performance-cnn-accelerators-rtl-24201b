// sdp_ram: simple dual-port RAM (one write port, one read port) used for every on-chip
// memory of the accelerator: feature map RAMs (FMR), weight RAMs (WR), the map buffer,
// and the activation and compressed-weight RAMs of the P-layers.
//
// Write: `we` with `waddr`/`wdata` at the rising edge. Read: `raddr` is sampled at the
// rising edge and `rdata` holds the word from the next cycle on (registered read, as an
// FPGA block RAM). A read and a write of the same address in the same cycle return the
// old word. Dual-port RAMs without read/write conflict follow the design; the registered
// read and the read-before-write behaviour are this implementation's choice. The content
// is not reset.
module sdp_ram #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
