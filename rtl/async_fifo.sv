// async_fifo: a first-in first-out buffer whose tail and head run on
// independent clocks. Used twice: as the input buffer (IB), filled from the
// input port's own clock and emptied by the processor, and as the output
// buffer (OB), filled by the processor and emptied from the output port's
// clock.
//
// Each side keeps a binary pointer one bit wider than the address and a
// Gray-coded copy of it; the Gray pointer crosses into the other clock
// domain through a two-flop synchronizer. Full is computed on the write
// side, empty on the read side, and `rfull` gives the read side's view of
// full (used as the "IB full" branch condition). Both flags are
// conservative: a pointer seen late only makes the buffer look fuller
// (write side) or emptier (read side) than it is.
//
// Interface: `wr` pushes `wdata` at a rising `wclk` edge unless `wfull`;
// `rd` pops at a rising `rclk` edge unless `rempty`; `rdata` always shows
// the head word. Depth and width follow the document (32 x 32); the
// synchronizer design is this design's choice. DEPTH must be a power of 2.
module async_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic             rfull
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2;     // write pointer synchronized into rclk
  logic [AW:0] rq1, rq2;     // read pointer synchronized into wclk

  function automatic logic [AW:0] bin2gray(logic [AW:0] v);
    return v ^ (v >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] v;
    v[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) v[i] = v[i+1] ^ g[i];
    return v;
  endfunction

  // ---------------- write side ----------------
  logic        push;
  logic [AW:0] wbin_n;
  assign push   = wr && !wfull;
  assign wbin_n = wbin + (AW+1)'(push);

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      rq1   <= '0;
      rq2   <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= bin2gray(wbin_n);
      rq1   <= rgray;
      rq2   <= rq1;
    end

  always_ff @(posedge wclk)
    if (push) mem[wbin[AW-1:0]] <= wdata;

  assign wfull = (wbin - gray2bin(rq2)) == (AW+1)'(DEPTH);

  // ---------------- read side ----------------
  logic        pop;
  logic [AW:0] rbin_n, wseen;
  assign pop    = rd && !rempty;
  assign rbin_n = rbin + (AW+1)'(pop);
  assign wseen  = gray2bin(wq2);

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      wq1   <= '0;
      wq2   <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= bin2gray(rbin_n);
      wq1   <= wgray;
      wq2   <= wq1;
    end

  assign rdata  = mem[rbin[AW-1:0]];
  assign rempty = (wseen == rbin);
  assign rfull  = (wseen - rbin) == (AW+1)'(DEPTH);

endmodule
