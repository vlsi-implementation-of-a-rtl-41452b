// tb_fp_mul: self-checking test of the three-stage floating point
// multiplier. Random operands (including zeros, products needing the
// one-place normalization shift or not, overflow and underflow) enter
// with a random issue and enable pattern. Each product is compared with
// an integer reference, with the real-valued product (relative error
// below 2^-22) and with the three-stage latency (the result is in the output register after the third
// enabled edge, counting the edge that takes the operands).
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  int checks = 0, failures = 0;
  int shifted = 0, unshifted = 0;

  fp_mul dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic [31:0] a, b; int t; } op_t;
  op_t q[$];
  int en_count = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && en) begin
    en_count <= en_count + 1;
    #1;
    if (out_valid) begin
      op_t o;
      logic [31:0] exp_y;
      real ra, rb, ry, err, p;
      if (q.size() == 0) check(0, "result without operation");
      else begin
        o = q.pop_front();
        exp_y = ref_mul(o.a, o.b);
        check(y === exp_y, $sformatf("%h * %h = %h, expected %h", o.a, o.b, y, exp_y));
        check(en_count - o.t == 2, $sformatf("latency %0d", en_count - o.t));
        if (o.a[30:23] != 0 && o.b[30:23] != 0 && y[30:23] inside {[8'd2:8'd250]}) begin
          ra = to_real(o.a); rb = to_real(o.b);
          ry = to_real(y); p = ra * rb;
          err = ry - p; if (err < 0) err = -err;
          check(err <= (p < 0 ? -p : p) * (1.0 / 4194304.0), $sformatf("value error %e for %e * %e", err, ra, rb));
          if ({1'b1, o.a[22:0]} * 48'({1'b1, o.b[22:0]}) >= 48'h8000_0000_0000) shifted++;
          else unshifted++;
        end
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] z);
    @(negedge clk);
    while (!en) @(negedge clk);
    a = x; b = z; in_valid = 1;
    q.push_back('{x, z, en_count + 1});
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) en <= ($urandom % 4 != 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    issue(32'h3F80_0000, 32'h3F80_0000);   // 1 * 1
    issue(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // (2-ulp)^2
    issue(32'hC040_0000, 32'h4080_0000);   // -3 * 4
    issue(32'h0000_0000, 32'h4080_0000);   // 0 * 4
    issue(32'h7F00_0000, 32'h4100_0000);   // overflow
    issue(32'h0100_0000, 32'h0100_0000);   // underflow
    issue(32'h3F00_0000, 32'h0100_0000);   // 0.5 * 2^-125
    for (int i = 0; i < 3000; i++) begin
      issue(rand_fp(80, 174), rand_fp(80, 174));
      if ($urandom % 3 == 0) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    check(q.size() == 0, "all operations completed");
    check(shifted > 100 && unshifted > 100, "both normalization cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
