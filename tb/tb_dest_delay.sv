// tb_dest_delay: checks that each destination entry appears at the output
// exactly four enabled edges after it entered, under a random enable
// pattern, and that reset clears the line.
module tb_dest_delay;
  import np_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  dest_t d = '0, q;
  dest_t hist[$];
  int checks = 0, failures = 0;

  dest_delay #(.STAGES(4)) dut (.*);

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
    #1 check(q == '0, "cleared by reset");
    repeat (4) hist.push_back('0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d = dest_t'({$urandom, $urandom});
      if (en) hist.push_back(d);
      @(posedge clk); #1;
      if (en) void'(hist.pop_front());
      check(q == hist[0], "entry four M-cycles old");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
