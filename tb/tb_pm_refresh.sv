// tb_pm_refresh: checks that a refresh is requested in exactly every
// 16th M-cycle and that the 5-bit row address advances by one per refresh
// and wraps after 32 rows, with M-cycle ends spaced four steps apart.
module tb_pm_refresh;
  logic clk = 0, rst_n = 0, en = 0, refresh;
  logic [4:0] row;
  int checks = 0, failures = 0, mcycles = 0, refreshes = 0;

  pm_refresh #(.PERIOD(16), .ROW_BITS(5)) dut (.*);

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
    for (int i = 0; i < 4 * 16 * 70; i++) begin
      @(negedge clk);
      en = (i % 4 == 3);
      if (en) begin
        mcycles++;
        check(refresh == (mcycles % 16 == 0), $sformatf("refresh in M-cycle %0d", mcycles));
        if (refresh) begin
          check(row == 5'(refreshes), "row address");
          refreshes++;
        end
      end else check(!refresh || (mcycles % 16 == 15), "refresh only in the 16th M-cycle");
    end
    check(refreshes == 70, "70 refreshes in 1120 M-cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
