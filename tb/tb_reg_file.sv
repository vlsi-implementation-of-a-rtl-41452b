// tb_reg_file: self-checking test of the 256 x 32 register file. It
// writes every register, reads them back in random order, then mixes
// random writes and reads against a shadow array, including a read of a
// register in the step after it was written.
module tb_reg_file;
  logic clk = 0, we = 0;
  logic [7:0] raddr = 0, waddr = 0;
  logic [31:0] rdata, wdata = 0;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  reg_file dut (.*);

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
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk); raddr = 8'($urandom);
      #1 check(rdata == shadow[raddr], $sformatf("read %0d", raddr));
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = $urandom;
      raddr = ($urandom % 2) ? waddr : 8'($urandom);
      #1 check(rdata == shadow[raddr], $sformatf("read %0d before write", raddr));
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1 check(rdata == shadow[raddr], $sformatf("read %0d after write", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
