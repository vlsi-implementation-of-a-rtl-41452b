// fp_mul: the multiplier unit (MU), a three-stage pipelined multiplier for
// 32-bit normalized floating point numbers X = (-1)^S * 2^(E-127) * 1.F.
//
// Stage 1 forms the 24 partial products of the two 24-bit significands
// with an AND array and reduces them in a tree of 3-input to 2-output
// carry-save adders (24 -> 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2 rows) to a
// sum word and a carry word. Stage 2 adds those two 48-bit words into the
// unnormalized product. Stage 3 normalizes with at most a one-place right
// shift, truncates the significand to 24 bits and adds the exponents,
// counting the normalization shift in the same addition.
//
// Interface: `en` advances all stages by one M-cycle; `in_valid` travels
// with the operation. `y` appears three enabled edges after the operands.
//
// Structure and stage split follow the document, including the stage 2
// adder: a lookahead tree over groups of four bits (cla_adder). This
// design's own choices: an exponent field of zero reads as zero; underflow gives +0
// and overflow is clamped to the largest finite magnitude.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);

  localparam int N      = 24;   // significand width
  localparam int PW     = 2*N;  // product width
  localparam int LEVELS = 7;    // carry-save levels needed for 24 rows

  function automatic int rows_at(int lvl);
    int n = N;
    for (int i = 0; i < lvl; i++) n = 2*(n/3) + n%3;
    return n;
  endfunction

  // ---------------- stage 1: partial products and CSA tree ----------------
  logic [N-1:0]  ma, mb;
  logic          a_zero, b_zero;
  logic [PW-1:0] pp [N];

  assign a_zero = (a[30:23] == 8'd0);
  assign b_zero = (b[30:23] == 8'd0);
  assign ma = {1'b1, a[22:0]};
  assign mb = {1'b1, b[22:0]};

  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = PW'(mb & {N{ma[i]}}) << i;
  end

  // Level l reduces rows_at(l) rows to rows_at(l+1); each level keeps its
  // rows in its own array, `rows`.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int NR = rows_at(l);
    logic [PW-1:0] rows [NR];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_row
        assign rows[i] = pp[i];
      end
    end else begin : g_csa_level
      localparam int NP = rows_at(l-1);
      localparam int NG = NP / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        logic [PW-1:0] x, y3, z;
        assign x  = g_lvl[l-1].rows[3*g];
        assign y3 = g_lvl[l-1].rows[3*g+1];
        assign z  = g_lvl[l-1].rows[3*g+2];
        assign rows[2*g]   = x ^ y3 ^ z;
        assign rows[2*g+1] = ((x & y3) | (x & z) | (y3 & z)) << 1;
      end
      for (genvar r = 0; r < NP % 3; r++) begin : g_pass
        assign rows[2*NG+r] = g_lvl[l-1].rows[3*NG+r];
      end
    end
  end

  logic          s1_v, s1_s, s1_z;
  logic [7:0]    s1_ea, s1_eb;
  logic [PW-1:0] s1_sum, s1_carry;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s1_v <= 1'b0;
    else if (en) s1_v <= in_valid;

  always_ff @(posedge clk)
    if (en) begin
      s1_s     <= a[31] ^ b[31];
      s1_z     <= a_zero | b_zero;
      s1_ea    <= a[30:23];
      s1_eb    <= b[30:23];
      s1_sum   <= g_lvl[LEVELS].rows[0];
      s1_carry <= g_lvl[LEVELS].rows[1];
    end

  // ---------------- stage 2: carry-propagate addition ----------------
  logic          s2_v, s2_s, s2_z;
  logic [7:0]    s2_ea, s2_eb;
  logic [PW-1:0] s2_p;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s2_v <= 1'b0;
    else if (en) s2_v <= s1_v;

  // 48-bit adder, one lookahead tree of 4-bit groups (height 3)
  logic [PW-1:0] p_sum;

  cla_adder #(.W(PW)) u_cpa (
    .a(s1_sum), .b(s1_carry), .cin(1'b0), .s(p_sum), .cout()
  );

  always_ff @(posedge clk)
    if (en) begin
      s2_s  <= s1_s;
      s2_z  <= s1_z;
      s2_ea <= s1_ea;
      s2_eb <= s1_eb;
      s2_p  <= p_sum;
    end

  // ---------------- stage 3: normalize, truncate, exponent add ----------------
  logic [N-1:0] m_norm;
  logic [9:0]   e_sum;          // signed headroom
  logic [31:0]  res;

  always_comb begin
    m_norm = s2_p[PW-1] ? s2_p[PW-1:N] : s2_p[PW-2:N-1];
    e_sum  = {2'b00, s2_ea} + {2'b00, s2_eb} - 10'd127 + {9'd0, s2_p[PW-1]};
    if (s2_z || e_sum[9] || e_sum == 10'd0)
      res = 32'd0;
    else if (e_sum >= 10'd255)
      res = {s2_s, 8'hFE, 23'h7F_FFFF};
    else
      res = {s2_s, e_sum[7:0], m_norm[22:0]};
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

endmodule
