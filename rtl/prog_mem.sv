// prog_mem: the 1K x 50-bit program memory (PM) together with the program
// memory data register (PMDR) it is read into.
//
// The PM is a writeable control store: the loader writes one 50-bit word
// at a time through `we`. At the end of every M-cycle (`en`) the control
// logic either fetches the next instruction into the PMDR (`fetch`) or
// keeps the one there. A refresh request (`refresh`, every 16th M-cycle)
// takes the memory's read port: a fetch asked for in that M-cycle does not
// happen and the PMDR is marked empty (`ir_valid` low) for one M-cycle,
// which is how refresh steals an instruction fetch. A refresh row address
// accompanies each request; the row last refreshed is shown on
// `ref_row_q`. `flush` empties the PMDR. The size, the PMDR and the
// cycle-stealing refresh follow the document. The array here holds its
// contents statically, so a refresh reads and restores a row with no
// effect on the data; only its timing is modelled.
module prog_mem #(
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned WIDTH    = 50,
  parameter int unsigned ROW_BITS = 5,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // loader write port
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [WIDTH-1:0]    wdata,
  // fetch into the PMDR
  input  logic                en,
  input  logic                fetch,
  input  logic [AW-1:0]       raddr,
  input  logic                flush,
  input  logic                refresh,
  input  logic [ROW_BITS-1:0] ref_row,
  output logic [WIDTH-1:0]    ir,
  output logic                ir_valid,
  output logic [ROW_BITS-1:0] ref_row_q
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  // PMDR
  always_ff @(posedge clk)
    if (en && fetch && !refresh) ir <= mem[raddr];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ir_valid  <= 1'b0;
      ref_row_q <= '0;
    end else begin
      if (flush)
        ir_valid <= 1'b0;
      else if (en && fetch)
        ir_valid <= !refresh;
      if (en && refresh)
        ref_row_q <= ref_row;
    end

endmodule
