// fp_ref_pkg: reference arithmetic for the testbenches. It computes the
// results the adder and multiplier must give (normalized single format,
// truncating, exponent field 0 read as zero, underflow to +0, overflow
// clamped to the largest finite magnitude) with plain integer arithmetic,
// and draws random operands.
package fp_ref_pkg;

  localparam logic [31:0] FP_MAXPOS = 32'h7F7F_FFFF;

  function automatic logic [31:0] pack(bit s, longint e, longint m);
    if (m == 0 || e <= 0) return 32'd0;
    if (e >= 255) return {s, FP_MAXPOS[30:0]};
    return {s, 8'(e), 23'(m)};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    longint ea, eb, e, ta, tb, s, mag;
    ea = a[30:23];
    eb = b[30:23];
    ta = (ea == 0) ? 0 : (64'h80_0000 | a[22:0]);
    tb = (eb == 0) ? 0 : (64'h80_0000 | b[22:0]);
    e  = (ea > eb) ? ea : eb;
    ta = (e - ea >= 32) ? 0 : ta >> (e - ea);
    tb = (e - eb >= 32) ? 0 : tb >> (e - eb);
    s  = (a[31] ? -ta : ta) + (b[31] ? -tb : tb);
    mag = (s < 0) ? -s : s;
    if (mag == 0) return 32'd0;
    while (mag >= 64'h100_0000) begin mag = mag >> 1; e++; end
    while (mag <  64'h80_0000)  begin mag = mag << 1; e--; end
    return pack(s < 0, e, mag);
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    longint e, p;
    if (a[30:23] == 0 || b[30:23] == 0) return 32'd0;
    p = longint'({1'b1, a[22:0]}) * longint'({1'b1, b[22:0]});
    e = longint'(a[30:23]) + longint'(b[30:23]) - 127;
    if (p >= (64'd1 << 47)) begin p = p >> 24; e++; end
    else p = p >> 23;
    return pack(a[31] ^ b[31], e, p);
  endfunction

  function automatic real to_real(logic [31:0] v);
    real r;
    int  e;
    if (v[30:23] == 0) return 0.0;
    r = real'({1'b1, v[22:0]}) / 8388608.0;
    e = int'(v[30:23]) - 127;
    while (e > 0) begin r = r * 2.0; e--; end
    while (e < 0) begin r = r / 2.0; e++; end
    return v[31] ? -r : r;
  endfunction

  // A random operand: mostly exponents in [lo, hi], sometimes zero.
  function automatic logic [31:0] rand_fp(int lo, int hi);
    logic [31:0] v;
    v[31]    = 1'($urandom);
    v[30:23] = 8'(lo + int'($urandom % (hi - lo + 1)));
    v[22:0]  = 23'($urandom);
    if ($urandom % 16 == 0) v[30:0] = '0;
    return v;
  endfunction

endpackage
