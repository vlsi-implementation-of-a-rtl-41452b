// tb_cond_code: checks the condition code logic: capture of the adder's
// status only with a valid result at an M-cycle end, and the stack
// operation, branch decision and loop counter controls for every
// condition, against an independent table.
module tb_cond_code;
  import np_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic au_valid = 0, au_pos = 0, au_neg = 0, au_zero = 0;
  logic ib_full = 0, ob_full = 0, lc_zero = 0, exec = 0;
  cond_e cond = C_NEVER;
  pc_op_e pc_op;
  logic taken, lc_load, lc_dec;
  logic [2:0] flags;
  logic [2:0] m_flags;
  int checks = 0, failures = 0;
  int taken_n[16], not_taken_n[16];

  cond_code dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit t;
    pc_op_e op;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_flags = 3'b001;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = 1'($urandom); au_valid = 1'($urandom);
      case ($urandom % 3)
        0: {au_pos, au_neg, au_zero} = 3'b100;
        1: {au_pos, au_neg, au_zero} = 3'b010;
        default: {au_pos, au_neg, au_zero} = 3'b001;
      endcase
      ib_full = 1'($urandom); ob_full = 1'($urandom); lc_zero = 1'($urandom);
      exec = ($urandom % 8 != 0);
      cond = cond_e'($urandom % 11);
      #1;
      // independent table of the conditions
      case (cond)
        C_IBFULL: t = ib_full;
        C_OBFULL: t = ob_full;
        C_POS:    t = m_flags[2];
        C_NEG:    t = m_flags[1];
        C_ZERO:   t = m_flags[0];
        C_ALWAYS, C_CALL, C_RET: t = 1;
        C_LOOP:   t = !lc_zero;
        default:  t = 0;
      endcase
      t = t && exec;
      op = !t ? PC_SEQ : cond == C_CALL ? PC_CALL : cond == C_RET ? PC_RET : PC_JUMP;
      check(taken == t, $sformatf("taken for %s", cond.name()));
      check(pc_op == op, $sformatf("stack op for %s", cond.name()));
      check(lc_load == (exec && cond == C_LDLC), "lc load");
      check(lc_dec == (exec && cond == C_LOOP && !lc_zero), "lc decrement");
      check(flags == m_flags, "flags");
      if (exec) begin
        if (t) taken_n[cond]++; else not_taken_n[cond]++;
      end
      @(posedge clk);
      if (en && au_valid) m_flags = {au_pos, au_neg, au_zero};
    end
    for (int c = 1; c <= 7; c++)
      if (c != 6) check(taken_n[c] > 0 && not_taken_n[c] > 0, $sformatf("condition %0d both ways", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
