// dest_delay: the delay lines for the destination fields.
//
// Operands leave the register file in the M-cycle a type 1 instruction is
// in the PMDR and spend three more M-cycles in the AU or MU pipeline, so
// the destination fields DA and DM, and the two leading bits that say
// whether the AU or MU half is in use, are needed four M-cycles after the
// source fields. This block shifts one `dest_t` entry per M-cycle (`en`)
// through STAGES registers; `q` is the entry issued STAGES M-cycles ago.
// An entry with `valid` low (no type 1 instruction issued) is ignored by
// the control logic. The four-stage depth follows the document.
module dest_delay
  import np_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  dest_t d,
  output dest_t q
);

  dest_t line [STAGES];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) line[i] <= '0;
    end else if (en) begin
      line[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) line[i] <= line[i-1];
    end

  assign q = line[STAGES-1];

endmodule
