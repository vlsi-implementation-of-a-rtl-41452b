// cla_adder: a carry-lookahead adder built from groups of four.
//
// Level 0 forms the bit generate (a & b) and propagate (a ^ b) signals.
// Each higher level combines four neighbouring blocks of the level below
// into one block with a group generate G = g3 | p3 g2 | p3 p2 g1 |
// p3 p2 p1 g0 and a group propagate P = p3 p2 p1 p0. Carries then run back
// down the tree: the carry into each block comes from its parent's carry
// and the G and P of the siblings to its right. Blocks at the top level
// pass the carry along in a ripple, so LEVELS sets how much of the width
// is looked ahead: with the default (as many levels as it takes to reach
// a single block) the whole adder is one lookahead tree of height
// ceil(log4 W); with LEVELS = 1 only the carries inside each 4-bit group
// are looked ahead and the groups ripple.
//
// Interface: purely combinational; s = a + b + cin, cout the carry out.
//
// Groups of four and a lookahead tree follow the document's description
// of the adders in the two function units; the parameterisation is this
// design's own.
module cla_adder #(
  parameter int unsigned W      = 24,
  parameter int unsigned LEVELS = 0     // 0: full tree
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // number of blocks at level l
  function automatic int nblk(int l);
    int n = W;
    for (int i = 0; i < l; i++) n = (n + 3) / 4;
    return n;
  endfunction

  function automatic int full_levels();
    int l = 0;
    while (nblk(l) > 1) l++;
    return l;
  endfunction

  localparam int LV = (LEVELS == 0 || LEVELS > full_levels()) ? full_levels() : LEVELS;

  for (genvar l = 0; l <= LV; l++) begin : g_lv
    localparam int NB = nblk(l);
    logic [NB-1:0] g, p, c;

    // generate and propagate, upwards
    if (l == 0) begin : g_bits
      assign g = a & b;
      assign p = a ^ b;
    end else begin : g_groups
      localparam int NC = nblk(l - 1);
      always_comb begin
        logic gg, pp;
        for (int j = 0; j < NB; j++) begin
          gg = 1'b0;
          pp = 1'b1;
          for (int k = 0; k < 4; k++)
            if (4*j + k < NC) begin
              gg = g_lv[l-1].g[4*j + k] | (g_lv[l-1].p[4*j + k] & gg);
              pp = pp & g_lv[l-1].p[4*j + k];
            end
          g[j] = gg;
          p[j] = pp;
        end
      end
    end

    // carries, downwards
    if (l == LV) begin : g_top
      always_comb begin
        logic cc;
        cc = cin;
        for (int j = 0; j < NB; j++) begin
          c[j] = cc;
          cc   = g[j] | (p[j] & cc);
        end
      end
    end else begin : g_down
      localparam int NPAR = nblk(l + 1);
      always_comb begin
        logic cc;
        for (int j = 0; j < NPAR; j++) begin
          cc = g_lv[l+1].c[j];
          for (int k = 0; k < 4; k++)
            if (4*j + k < NB) begin
              c[4*j + k] = cc;
              cc = g[4*j + k] | (p[4*j + k] & cc);
            end
        end
      end
    end
  end

  assign s    = g_lv[0].p ^ g_lv[0].c;
  assign cout = g_lv[LV].g[nblk(LV) - 1] | (g_lv[LV].p[nblk(LV) - 1] & g_lv[LV].c[nblk(LV) - 1]);

endmodule
