// fp_add: the adder unit (AU), a three-stage pipelined adder for 32-bit
// floating point numbers in the normalized single format
// X = (-1)^S * 2^(E-127) * 1.F.
//
// Stage 1 aligns: an 8-bit exponent subtraction picks the operand with the
// larger exponent and gives the shift count; the other 24-bit significand
// is shifted right by that count in a five-level barrel shifter (counts of
// 24 or more give zero). Stage 2 adds or subtracts the two 24-bit
// significands, producing a 25-bit magnitude and the result sign. The
// exponent subtraction uses full carry lookahead and the significand adder
// lookahead within groups of four bits (cla_adder), as the document
// describes. Stage 3
// normalizes: a carry out shifts right by one, otherwise a leading-zero
// count drives a left barrel shift, and the exponent is adjusted.
//
// Interface: `en` advances all stages by one M-cycle; `in_valid` marks an
// issued operation and travels with it. The result `y` and the status bits
// `pos`, `neg`, `zero` appear three enabled edges after the operands.
//
// As the document specifies, rounding, infinities, denormals and most
// exceptions are left out. This design's choices for the unspecified
// cases: bits shifted out during alignment are dropped (truncation),
// an exponent field of zero is read as the value zero, a result that
// underflows becomes +0, and one that overflows is clamped to the largest
// finite magnitude.
module fp_add (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y,
  output logic        pos,
  output logic        neg,
  output logic        zero
);

  // ---------------- stage 1: alignment ----------------
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [7:0]  d_ab, d_ba;      // ea - eb and eb - ea
  logic        a_big;
  logic [7:0]  shamt;
  logic [23:0] m_small, m_aligned;

  assign ea = a[30:23];
  assign eb = b[30:23];

  // 8-bit exponent subtractors with full lookahead; the carry out of
  // ea + ~eb + 1 is set when ea >= eb
  cla_adder #(.W(8)) u_eab (.a(ea), .b(~eb), .cin(1'b1), .s(d_ab), .cout(a_big));
  cla_adder #(.W(8)) u_eba (.a(eb), .b(~ea), .cin(1'b1), .s(d_ba), .cout());

  always_comb begin
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    shamt = a_big ? d_ab : d_ba;
    m_small = a_big ? mb : ma;
    // five-level barrel shifter; any count of 24 or more clears the word
    m_aligned = m_small;
    for (int l = 0; l < 5; l++)
      if (shamt[l]) m_aligned = m_aligned >> (1 << l);
    if (shamt[7:5] != 3'd0 || shamt[4:0] > 5'd23) m_aligned = 24'd0;
  end

  logic        s1_v, s1_sbig, s1_ssmall;
  logic [7:0]  s1_e;
  logic [23:0] s1_mbig, s1_msmall;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s1_v <= 1'b0;
    else if (en) s1_v <= in_valid;

  always_ff @(posedge clk)
    if (en) begin
      s1_sbig   <= a_big ? a[31] : b[31];
      s1_ssmall <= a_big ? b[31] : a[31];
      s1_e      <= a_big ? ea : eb;
      s1_mbig   <= a_big ? ma : mb;
      s1_msmall <= m_aligned;
    end

  // ---------------- stage 2: significand addition ----------------
  // 24-bit adders with lookahead inside 4-bit groups, rippling between
  // groups. u_main adds, or subtracts the smaller-exponent operand; its
  // carry out then says whether the result is nonnegative. If it is not
  // (possible only for equal exponents) u_rev gives the reversed
  // difference.
  logic        sub, c_main;
  logic [23:0] m_main, m_rev;
  logic [24:0] sum;
  logic        sum_sign;

  assign sub = s1_sbig ^ s1_ssmall;

  cla_adder #(.W(24), .LEVELS(1)) u_main (
    .a(s1_mbig), .b(sub ? ~s1_msmall : s1_msmall), .cin(sub), .s(m_main), .cout(c_main)
  );
  cla_adder #(.W(24), .LEVELS(1)) u_rev (
    .a(s1_msmall), .b(~s1_mbig), .cin(1'b1), .s(m_rev), .cout()
  );

  always_comb begin
    if (!sub) begin
      sum      = {c_main, m_main};
      sum_sign = s1_sbig;
    end else if (c_main) begin
      sum      = {1'b0, m_main};
      sum_sign = s1_sbig;
    end else begin
      sum      = {1'b0, m_rev};
      sum_sign = s1_ssmall;
    end
  end

  logic        s2_v, s2_s;
  logic [7:0]  s2_e;
  logic [24:0] s2_m;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s2_v <= 1'b0;
    else if (en) s2_v <= s1_v;

  always_ff @(posedge clk)
    if (en) begin
      s2_s <= sum_sign;
      s2_e <= s1_e;
      s2_m <= sum;
    end

  // ---------------- stage 3: normalization ----------------
  logic [4:0]  lz;
  logic [23:0] m_norm;
  logic [9:0]  e_norm;          // signed headroom for over/underflow
  logic [31:0] res;

  always_comb begin
    lz = 5'd0;
    for (int i = 0; i < 24; i++)
      if (s2_m[i]) lz = 5'(23 - i);
    if (s2_m[24]) begin
      m_norm = s2_m[24:1];
      e_norm = {2'b00, s2_e} + 10'd1;
    end else begin
      // second five-level barrel shifter, driven by the leading-zero count
      m_norm = s2_m[23:0];
      for (int k = 0; k < 5; k++)
        if (lz[k]) m_norm = m_norm << (1 << k);
      e_norm = {2'b00, s2_e} - {5'd0, lz};
    end
    if (s2_m == 25'd0 || e_norm[9] || e_norm == 10'd0)
      res = 32'd0;
    else if (e_norm >= 10'd255)
      res = {s2_s, 8'hFE, 23'h7F_FFFF};
    else
      res = {s2_s, e_norm[7:0], m_norm[22:0]};
  end

  logic        s3_v;
  logic [31:0] s3_y;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s3_v <= 1'b0;
    else if (en) s3_v <= s2_v;

  always_ff @(posedge clk)
    if (en) s3_y <= res;

  assign out_valid = s3_v;
  assign y         = s3_y;
  assign zero      = (s3_y[30:0] == 31'd0);
  assign neg       = !zero && s3_y[31];
  assign pos       = !zero && !s3_y[31];

endmodule
