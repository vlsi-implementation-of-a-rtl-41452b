// tb_prog_mem: self-checking test of the program memory and its PMDR.
// It loads random 50-bit words, then fetches at random addresses with a
// random mix of refresh requests, holds and flushes, and checks that the
// PMDR takes the addressed word only when a fetch is not taken by a
// refresh, that a refresh empties the PMDR instead, and that the row
// last refreshed is recorded.
module tb_prog_mem;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, we = 0, en = 0, fetch = 0, flush = 0, refresh = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [49:0] wdata = 0, ir;
  logic [4:0] ref_row = 0, ref_row_q;
  logic ir_valid;
  logic [49:0] shadow [DEPTH];
  logic [49:0] exp_ir;
  logic exp_valid;
  int checks = 0, failures = 0, steals = 0, fetches = 0;

  prog_mem #(.DEPTH(DEPTH), .WIDTH(50), .ROW_BITS(5)) dut (.*);

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
    @(negedge clk);
    check(!ir_valid, "empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = {18'($urandom), 32'($urandom)}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    exp_valid = 0;
    exp_ir = ir;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = 1'($urandom); fetch = ($urandom % 4 != 0); refresh = ($urandom % 8 == 0);
      flush = ($urandom % 50 == 0); raddr = 10'($urandom); ref_row = 5'($urandom);
      if (flush) exp_valid = 0;
      else if (en && fetch) begin
        exp_valid = !refresh;
        if (!refresh) begin exp_ir = shadow[raddr]; fetches++; end
        else steals++;
      end
      @(posedge clk); #1;
      check(ir_valid == exp_valid, "PMDR valid");
      if (exp_valid) check(ir == exp_ir, "PMDR word");
      if (en && refresh) check(ref_row_q == ref_row, "refresh row");
    end
    check(steals > 50 && fetches > 500, "fetches and stolen fetches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
