// tb_fp_add: self-checking test of the three-stage floating point adder.
// Random operands (near and far exponents, opposite signs, zeros, exact
// cancellation, overflow) enter with a random issue pattern under a
// random enable pattern. Each result is compared with an integer
// reference, with the value computed in real arithmetic (error at most
// one unit of the larger operand), with the status bits, and with the
// three-stage latency (the result is in the output register after the third
// enabled edge, counting the edge that takes the operands).
module tb_fp_add;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid, pos, neg, zero;
  int checks = 0, failures = 0;

  fp_add dut (.*);

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

  // scoreboard: sample outputs after each enabled edge
  always @(posedge clk) if (rst_n && en) begin
    en_count <= en_count + 1;
    #1;
    if (out_valid) begin
      op_t o;
      logic [31:0] exp_y;
      real ra, rb, ry, err, big;
      if (q.size() == 0) check(0, "result without operation");
      else begin
        o = q.pop_front();
        exp_y = ref_add(o.a, o.b);
        check(y === exp_y, $sformatf("%h + %h = %h, expected %h", o.a, o.b, y, exp_y));
        check(en_count - o.t == 2, $sformatf("latency %0d", en_count - o.t));
        check(zero == (exp_y[30:0] == 0) && neg == (exp_y[31] && exp_y[30:0] != 0)
              && pos == (!exp_y[31] && exp_y[30:0] != 0), "status bits");
        if (o.a[30:23] inside {[8'd2:8'd250]} && o.b[30:23] inside {[8'd2:8'd250]}
            && y[30:23] inside {[8'd2:8'd250]}) begin
          ra = to_real(o.a); rb = to_real(o.b);
          ry = to_real(y);
          err = ry - (ra + rb); if (err < 0) err = -err;
          big = (ra < 0 ? -ra : ra); if ((rb < 0 ? -rb : rb) > big) big = (rb < 0 ? -rb : rb);
          check(err <= big * (1.0 / 4194304.0), $sformatf("value error %e for %e + %e", err, ra, rb));
        end
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] z);
    // wait for an enabled edge at which to present the operands
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

  // random enable: mostly every cycle, sometimes gaps like an M-cycle
  always @(posedge clk) en <= ($urandom % 4 != 0);

  initial begin
    logic [31:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed cases
    issue(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1
    issue(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1
    issue(32'h4049_0FDB, 32'hC049_0FDB);   // pi - pi
    issue(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24 (lost)
    issue(32'h3F80_0000, 32'hB380_0000);   // 1 - 2^-24
    issue(32'h4000_0000, 32'hBF7F_FFFF);   // 2 - (1-ulp)
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    issue(32'h0080_0000, 32'h8080_0001);   // underflow
    issue(32'h0000_0000, 32'hC1A0_0000);   // 0 + -20
    issue(32'h4120_0000, 32'h0000_0000);   // 10 + 0
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(100, 154);
      case ($urandom % 4)
        0: issue(x, rand_fp(100, 154));
        1: issue(x, {~x[31], x[30:23], 23'($urandom)});            // near cancellation
        2: issue(x, {1'($urandom), 8'(x[30:23] - $urandom % 30), 23'($urandom)});
        default: issue(x, x);
      endcase
      if ($urandom % 3 == 0) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    check(q.size() == 0, "all operations completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
