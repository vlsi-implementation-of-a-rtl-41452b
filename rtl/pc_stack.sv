// pc_stack: the 4 x 10-bit program counter stack (PCS).
//
// Entry 0 is the program counter; entries 1 to 3 hold return addresses,
// so subroutines nest three deep. The top holds the address of the next
// instruction to fetch. `fetch_addr` is the address the operation in
// `op` fetches from: the top for PC_SEQ, `na` for PC_JUMP and PC_CALL,
// entry 1 for PC_RET. At a rising clock edge with `en`, the top becomes
// fetch_addr + `inc` (inc is low when the fetch was taken by a memory
// refresh, so the same address is fetched again). PC_CALL pushes the old
// top, which already points past the call, as the return address; PC_RET
// pops. PC_LOAD sets the top to `na` and empties the stack. `depth`
// counts the return addresses held; `ovf` and `unf` flag a push onto a
// full stack (the oldest entry is lost) and a pop of an empty one.
// The size and the three-deep nesting follow the document; the operation
// set and the overflow behaviour are this design's own.
module pc_stack
  import np_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  pc_op_e        op,
  input  logic          inc,
  input  logic [AW-1:0] na,
  output logic [AW-1:0] fetch_addr,
  output logic [AW-1:0] top,
  output logic [1:0]    depth,
  output logic          ovf,
  output logic          unf
);

  logic [AW-1:0] s [DEPTH];

  always_comb
    unique case (op)
      PC_JUMP, PC_CALL: fetch_addr = na;
      PC_RET:           fetch_addr = s[1];
      default:          fetch_addr = s[0];
    endcase

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) s[i] <= '0;
      depth <= '0;
      ovf   <= 1'b0;
      unf   <= 1'b0;
    end else if (en) begin
      ovf <= 1'b0;
      unf <= 1'b0;
      unique case (op)
        PC_SEQ, PC_JUMP: s[0] <= fetch_addr + AW'(inc);
        PC_CALL: begin
          for (int i = int'(DEPTH) - 1; i > 1; i--) s[i] <= s[i-1];
          s[1] <= s[0];
          s[0] <= fetch_addr + AW'(inc);
          if (depth == 2'(DEPTH - 1)) ovf <= 1'b1;
          else depth <= depth + 2'd1;
        end
        PC_RET: begin
          for (int i = 1; i < int'(DEPTH) - 1; i++) s[i] <= s[i+1];
          s[0] <= fetch_addr + AW'(inc);
          if (depth == 2'd0) unf <= 1'b1;
          else depth <= depth - 2'd1;
        end
        PC_LOAD: begin
          s[0]  <= na;
          depth <= '0;
        end
        default: ;
      endcase
    end

  assign top = s[0];

endmodule
