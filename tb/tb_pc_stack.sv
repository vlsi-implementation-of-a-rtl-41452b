// tb_pc_stack: self-checking test of the four-entry program counter stack
// against a queue model: sequential fetch, jumps, calls nested three deep
// and one deeper (overflow), returns including one from an empty stack
// (underflow), loads, and fetches taken by a refresh (no increment).
module tb_pc_stack;
  import np_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, inc = 0;
  pc_op_e op = PC_HOLD;
  logic [9:0] na = 0, fetch_addr, top;
  logic [1:0] depth;
  logic ovf, unf;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0, n_call = 0, n_ret = 0;
  logic [9:0] m_top, m_fetch;
  logic [9:0] m_ret[$];

  pc_stack #(.DEPTH(4), .AW(10)) dut (.*);

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
    bit e_ovf, e_unf;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_top = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      en = ($urandom % 8 != 0); inc = ($urandom % 8 != 0); na = 10'($urandom);
      case ($urandom % 16)
        0, 1, 2, 3, 4, 5: op = PC_SEQ;
        6, 7:             op = PC_JUMP;
        8, 9, 10:         op = PC_CALL;
        11, 12, 13:       op = PC_RET;
        14:               op = PC_LOAD;
        default:          op = PC_HOLD;
      endcase
      // model
      e_ovf = 0; e_unf = 0;
      case (op)
        PC_JUMP, PC_CALL: m_fetch = na;
        PC_RET:           m_fetch = (m_ret.size() > 0) ? m_ret[$] : 10'(0);
        default:          m_fetch = m_top;
      endcase
      #1;
      if (op != PC_RET || m_ret.size() > 0)
        check(fetch_addr == m_fetch, $sformatf("fetch address op %s", op.name()));
      if (en) begin
        case (op)
          PC_SEQ, PC_JUMP: m_top = m_fetch + 10'(inc);
          PC_CALL: begin
            m_ret.push_back(m_top);
            if (m_ret.size() > 3) begin void'(m_ret.pop_front()); e_ovf = 1; end
            m_top = m_fetch + 10'(inc); n_call++;
          end
          PC_RET: begin
            if (m_ret.size() == 0) e_unf = 1;
            else begin m_top = m_fetch + 10'(inc); void'(m_ret.pop_back()); n_ret++; end
          end
          PC_LOAD: begin m_top = na; m_ret.delete(); end
          default: ;
        endcase
      end
      @(posedge clk); #1;
      if (!(en && op == PC_RET && e_unf)) check(top == m_top, "top of stack");
      check(depth == 2'(m_ret.size()), "depth");
      if (en) begin
        check(ovf == e_ovf && unf == e_unf, "overflow/underflow flags");
        n_ovf += int'(e_ovf); n_unf += int'(e_unf);
      end
      // after an underflow the popped entry is unknown to the model: reload
      if (en && op == PC_RET && e_unf) begin
        @(negedge clk); op = PC_LOAD; en = 1; na = 10'($urandom);
        m_top = na; m_ret.delete();
        @(posedge clk); #1;
      end
    end
    check(n_ovf > 0 && n_unf > 0 && n_call > 100 && n_ret > 100, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
