// tb_cla_adder: checks the carry-lookahead adder against plain addition at
// the widths and lookahead depths the function units use (8 and 24 bits
// with a full tree, 24 bits with lookahead inside 4-bit groups only, 48
// bits with a full tree) plus an odd width. Operands are random, with runs
// of all-ones and all-zeros mixed in so that long carry chains occur.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;    logic c8i, c8o;
  logic [23:0] a24, b24, s24f, s24g; logic c24i, c24fo, c24go;
  logic [47:0] a48, b48, s48; logic c48i, c48o;
  logic [12:0] a13, b13, s13; logic c13i, c13o;

  cla_adder #(.W(8))               u8   (.a(a8),  .b(b8),  .cin(c8i),  .s(s8),   .cout(c8o));
  cla_adder #(.W(24))              u24f (.a(a24), .b(b24), .cin(c24i), .s(s24f), .cout(c24fo));
  cla_adder #(.W(24), .LEVELS(1))  u24g (.a(a24), .b(b24), .cin(c24i), .s(s24g), .cout(c24go));
  cla_adder #(.W(48))              u48  (.a(a48), .b(b48), .cin(c48i), .s(s48),  .cout(c48o));
  cla_adder #(.W(13), .LEVELS(2))  u13  (.a(a13), .b(b13), .cin(c13i), .s(s13),  .cout(c13o));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [63:0] pick();
    unique case ($urandom % 4)
      0:       return '1;
      1:       return '0;
      2:       return {$urandom, $urandom} | 64'hFFFF_FFF0_0000_0000 >> ($urandom % 40);
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    // exhaustive at 8 bits
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); c8i = 1'(ci);
          #1;
          check({c8o, s8} == 9'(x) + 9'(y) + 9'(ci), $sformatf("8-bit %0d+%0d+%0d", x, y, ci));
        end
    for (int n = 0; n < 20000; n++) begin
      a24 = 24'(pick()); b24 = 24'(pick()); c24i = 1'($urandom);
      a48 = 48'(pick()); b48 = 48'(pick()); c48i = 1'($urandom);
      a13 = 13'(pick()); b13 = 13'(pick()); c13i = 1'($urandom);
      #1;
      check({c24fo, s24f} == 25'(a24) + 25'(b24) + 25'(c24i), $sformatf("24-bit tree %h+%h", a24, b24));
      check({c24go, s24g} == 25'(a24) + 25'(b24) + 25'(c24i), $sformatf("24-bit groups %h+%h", a24, b24));
      check({c48o, s48} == 49'(a48) + 49'(b48) + 49'(c48i), $sformatf("48-bit %h+%h", a48, b48));
      check({c13o, s13} == 14'(a13) + 14'(b13) + 14'(c13i), $sformatf("13-bit %h+%h", a13, b13));
    end
    // the longest carry chain: all ones plus a carry in
    a48 = '1; b48 = '0; c48i = 1; a24 = '1; b24 = '0; c24i = 1;
    #1;
    check(s48 == '0 && c48o, "48-bit full carry chain");
    check(s24f == '0 && c24fo && s24g == '0 && c24go, "24-bit full carry chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
