// tb_async_fifo: self-checking test of the dual-clock buffer used as the
// input and the output buffer. The write and read clocks run at unrelated
// periods; writer and reader push and pop at random, in phases that fill
// the buffer to full and drain it to empty. Every word must come out once,
// in order; the buffer must reach full at DEPTH words, never accept a
// word when full, and the read-side full flag must be seen.
module tb_async_fifo;
  localparam int DEPTH = 32;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata;
  logic wfull, rempty, rfull;
  int checks = 0, failures = 0;
  int writes = 0, reads = 0, full_seen = 0, rfull_seen = 0, max_fill = 0;
  logic [31:0] q[$];
  bit fill_phase = 1, stop = 0;

  async_fifo #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5  wclk = ~wclk;
  always #7  rclk = ~rclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (wr && !wfull) begin q.push_back(wdata); writes++; end
    if (q.size() > max_fill) max_fill = q.size();
    check(q.size() <= DEPTH, "never holds more than DEPTH words");
    if (wfull) begin
      full_seen++;
      // the read pointer reaches this side late, so full may show early
      check(q.size() >= DEPTH - 4, $sformatf("full at %0d words", q.size()));
    end
    wr    <= stop ? 1'b0 : fill_phase ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
    wdata <= $urandom;
  end

  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (rd && !rempty) begin
      check(q.size() > 0 && rdata == q[0], "word order");
      void'(q.pop_front());
      reads++;
    end
    if (rfull) rfull_seen++;
    rd <= fill_phase ? ($urandom % 8 == 0) : ($urandom % 2 == 0);
  end

  initial begin
    #30 wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < 12; i++) begin
      fill_phase = 1; #20000;
      fill_phase = 0; #20000;
    end
    fill_phase = 0; stop = 1;
    #5000;
    check(q.size() == 0 && rempty, "drained");
    check(full_seen > 0 && rfull_seen > 0, "full reached");
    check(max_fill == DEPTH, "fills to depth");
    check(reads > 1000, $sformatf("%0d words through", reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
