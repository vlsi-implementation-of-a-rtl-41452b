// tb_loop_counter: checks load, decrement, hold at zero and the zero flag
// of the 16-bit loop counter against a model under random controls.
module tb_loop_counter;
  logic clk = 0, rst_n = 0, en = 0, load = 0, dec = 0, zero;
  logic [15:0] d = 0, count;
  logic [15:0] m = 0;
  int checks = 0, failures = 0, zeros = 0;

  loop_counter #(.WIDTH(16)) dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(zero && count == 0, "reset to zero");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom % 4 != 0); load = ($urandom % 20 == 0); dec = 1'($urandom);
      d = 16'($urandom % 12);
      if (en) begin
        if (load) m = d;
        else if (dec && m != 0) m = m - 1;
      end
      @(posedge clk); #1;
      check(count == m, "count");
      check(zero == (m == 0), "zero flag");
      if (zero) zeros++;
    end
    check(zeros > 100, "counted down to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
