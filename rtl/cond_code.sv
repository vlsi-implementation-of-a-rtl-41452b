// cond_code: the condition code logic (CC).
//
// It keeps the status of the most recent adder result (positive,
// negative, zero), captured at the end of the M-cycle in which the AU
// delivers a result, and evaluates the condition of a type 2 instruction
// into a program counter stack operation and loop counter controls.
// Conditions from the document: IB full, OB full, add result positive,
// negative or zero, and always. This design adds: LOOP (jump and
// decrement while the loop counter is not zero), CALL, RET (the document
// has the stack but names no return) and LDLC (load the loop counter).
// A branch that is not taken continues in sequence. The evaluation is
// combinational; `exec` is high when a type 2 instruction completes in
// this M-cycle.
module cond_code
  import np_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  // AU status
  input  logic   au_valid,
  input  logic   au_pos,
  input  logic   au_neg,
  input  logic   au_zero,
  // other condition sources
  input  logic   ib_full,
  input  logic   ob_full,
  input  logic   lc_zero,
  // the condition to evaluate
  input  logic   exec,
  input  cond_e  cond,
  output pc_op_e pc_op,
  output logic   taken,
  output logic   lc_load,
  output logic   lc_dec,
  output logic [2:0] flags     // {pos, neg, zero} of the last add
);

  logic f_pos, f_neg, f_zero;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      f_pos  <= 1'b0;
      f_neg  <= 1'b0;
      f_zero <= 1'b1;
    end else if (en && au_valid) begin
      f_pos  <= au_pos;
      f_neg  <= au_neg;
      f_zero <= au_zero;
    end

  assign flags = {f_pos, f_neg, f_zero};

  always_comb begin
    taken   = 1'b0;
    lc_load = 1'b0;
    lc_dec  = 1'b0;
    pc_op   = PC_SEQ;
    if (exec) begin
      unique case (cond)
        C_IBFULL: taken = ib_full;
        C_OBFULL: taken = ob_full;
        C_POS:    taken = f_pos;
        C_NEG:    taken = f_neg;
        C_ZERO:   taken = f_zero;
        C_ALWAYS: taken = 1'b1;
        C_LOOP: begin
          taken  = !lc_zero;
          lc_dec = !lc_zero;
        end
        C_CALL:   taken = 1'b1;
        C_RET:    taken = 1'b1;
        C_LDLC:   lc_load = 1'b1;
        default:  ;
      endcase
      if (taken)
        pc_op = (cond == C_CALL) ? PC_CALL : (cond == C_RET) ? PC_RET : PC_JUMP;
    end
  end

endmodule
