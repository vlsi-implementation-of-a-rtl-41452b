// reg_file: the 256 x 32-bit register file (RF).
//
// All registers share one 32-bit output bus and one 32-bit input bus, so
// the array has a single read port and a single write port. The control
// logic time-multiplexes them: the read bus serves four operand reads per
// M-cycle (one per 125 ns step) and the write bus two result writes (one
// per 250 ns half cycle). The read is combinational from `raddr`; a write
// takes effect at the rising edge of `clk` (the step clock) when `we` is
// high, so a read later in the same M-cycle sees the new value.
// The size and the bus sharing follow the document; the read and write
// timing within a step is this design's choice. Contents are not reset.
module reg_file #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
