// tb_np_top: end-to-end test of the numerical processor at its default
// sizes, played against a host model on the input and output ports.
//
// The host first loads a program through the input buffer in load mode
// (loader PM-write commands, then a start command). The program, built by
// a small scheduler in this testbench that packs adder and multiplier
// operations into type 1 words under the five-M-cycle register round
// trip, does:
//  1. the angular velocity and acceleration recursions of a six-link arm,
//     with z = (0,0,1):
//       w_i = A_i (w_(i-1) + thetadot_i z)
//       a_i = A_i (a_(i-1) + thetadotdot_i z + w_(i-1) x thetadot_i z)
//     and from them the 3x3 matrix used for the link's linear acceleration,
//       W_i = [ -(wy^2+wz^2)  wx wy - az    wx wz + ay
//               wy wx + az    -(wz^2+wx^2)  wy wz - ax
//               wz wx - ay    wz wy + ax    -(wx^2+wy^2) ]
//     (negations by multiplying with -1.0). Per link it reads the 3x3
//     matrix A_i, the joint rate, the joint acceleration and the negated
//     joint rate from the input buffer, issues 32 products and 26 sums,
//     sends w_i out through a subroutine that calls a nested one and then
//     sends a_i and W_i; the link loop runs on the loop counter;
//  2. branch tests on the adder status (zero, negative, not positive),
//     with an input transfer placed in the write-bus slot of an adder
//     result;
//  3. a wait on "input buffer full", then an echo of 36 words from the
//     input to the output buffer while the host holds off reading, so the
//     output buffer fills; an addition placed four words before one of the
//     transfers makes that transfer wait for its write-bus slot.
// Midway through the link loop the host pauses the processor with `load`.
// The host feeds the link data slowly, so the processor stalls on an empty
// input buffer. Every output word is compared with a result computed by an
// integer floating point reference in the same operation order. The test
// counts each mechanism of the design (stalls of each kind, refresh
// stealing, every branch kind taken and not taken, calls and returns,
// dual issue) and fails if one never happened.
module tb_np_top;
  import np_pkg::*;
  import fp_ref_pkg::*;

  localparam int NLINK = 6;
  localparam int NECHO = 36;
  localparam int SUB_OUT3 = 1000;  // subroutine: output wx, wy, call SUB_OUTZ
  localparam int SUB_OUTZ = 1010;  // subroutine: output wz and return
  localparam int ERR      = 950;   // error path: output a marker, halt
  localparam int PK_AT    = 800;   // peak-rate program
  localparam int NPEAK    = 40;
  localparam int PK_A     = 100;   // its sums go to PK_A.., products to PK_M..
  localparam int PK_M     = 150;

  logic clk = 0, rst_n = 0, load = 0;
  logic in_clk = 0, in_wr = 0, out_clk = 0, out_rd = 0;
  logic [31:0] in_data = 0, out_data;
  logic in_full, out_empty, running, m_cycle;
  logic [9:0] pc;

  np_top dut (.*);

  always #5  clk = ~clk;       // 125 ns step clock, scaled
  always #11 in_clk = ~in_clk; // host clocks, unrelated to the chip's
  always #13 out_clk = ~out_clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: pc %0d load %0b host queue %0d words out %0d ib_empty %0b ob_full %0b",
             pc, load, in_q.size(), out_got.size(), dut.ib_empty, dut.ob_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // assembler and scheduler
  // ------------------------------------------------------------------
  logic [49:0] prog [1024];
  int  kind [1024];              // 0 empty, 1 type 1, 2 type 2
  bit  au_used [1024], mu_used [1024];
  int  ready [256];              // first address that may read the register
  int  pc_end = 0, barrier = 0;

  function automatic logic [49:0] t2w(bit ign_ob, bit ign_ib, int ib, int ob,
                                      int na, cond_e cond, int lcv = 0);
    type2_t w;
    w.kind = 2'b11; w.ign_ob = ign_ob; w.ign_ib = ign_ib;
    w.ib = 8'(ib); w.ob = 8'(ob); w.na = 10'(na);
    w.cc.lc_val = 16'(lcv); w.cc.cond = cond;
    return w;
  endfunction

  localparam logic [49:0] NOP = {2'b11, 2'b11, 46'd0};

  function automatic void use_slot(int c);
    if (c >= pc_end) begin
      for (int i = pc_end; i <= c; i++) begin prog[i] = NOP; kind[i] = 0; end
      pc_end = c + 1;
    end
  endfunction

  function automatic int max3(int a, int b, int c);
    int m = a;
    if (b > m) m = b;
    if (c > m) m = c;
    return m;
  endfunction

  // adder operation d = s1 + s2; returns its address
  function automatic int op_add(int d, int s1, int s2, int at_least = 0);
    int c = max3(barrier, ready[s1], ready[s2]);
    type1_t w;
    if (at_least > c) c = at_least;
    while (c < pc_end && (kind[c] == 2 || au_used[c])) c++;
    use_slot(c);
    w = (kind[c] == 1) ? type1_t'(prog[c]) : type1_t'({2'b11, 48'd0});
    w.ign_au = 0; w.da = 8'(d); w.sa1 = 8'(s1); w.sa2 = 8'(s2);
    prog[c] = w; kind[c] = 1; au_used[c] = 1;
    ready[d] = c + 5;
    return c;
  endfunction

  function automatic int op_mul(int d, int s1, int s2);
    int c = max3(barrier, ready[s1], ready[s2]);
    type1_t w;
    while (c < pc_end && (kind[c] == 2 || mu_used[c])) c++;
    use_slot(c);
    w = (kind[c] == 1) ? type1_t'(prog[c]) : type1_t'({2'b11, 48'd0});
    w.ign_mu = 0; w.dm = 8'(d); w.sm1 = 8'(s1); w.sm2 = 8'(s2);
    prog[c] = w; kind[c] = 1; mu_used[c] = 1;
    ready[d] = c + 5;
    return c;
  endfunction

  // type 2 word placed at the first empty address from `from`
  function automatic int op_t2(int from, logic [49:0] w);
    int c = (from > barrier) ? from : barrier;
    while (c < pc_end && kind[c] != 0) c++;
    use_slot(c);
    prog[c] = w; kind[c] = 2;
    barrier = c + 1;
    return c;
  endfunction

  function automatic int op_in(int d, int at_least = 0);
    int c = op_t2(at_least, t2w(1, 0, d, 0, 0, C_NEVER));
    ready[d] = c + 1;
    return c;
  endfunction

  function automatic int op_out(int s);
    return op_t2(ready[s], t2w(0, 1, 0, s, 0, C_NEVER));
  endfunction

  // registers
  localparam int WX = 1, WY = 2, WZ = 3, TD = 4, W2 = 5, M1 = 6, NZ = 7, TZ = 8,
                 VN = 9, REX = 10, AX = 11, AY = 12, AZ = 13, TDD = 14, NTD = 15,
                 Q1 = 25, Q2 = 26, NEG1 = 30;
  function automatic int ra(int i, int j); return 16 + 3*i + j; endfunction   // matrix
  function automatic int rp(int i, int j); return 32 + 3*i + j; endfunction   // products
  function automatic int rs(int i); return 48 + i; endfunction                // partial sums
  function automatic int re(int k); return 64 + k; endfunction                // echo
  function automatic int rap(int i); return 27 + i; endfunction               // a_(i-1) + ...
  function automatic int rq(int i, int j); return 192 + 3*i + j; endfunction  // products
  function automatic int rt(int i); return 208 + i; endfunction               // partial sums
  function automatic int rnw(int i); return 212 + i; endfunction              // -w
  function automatic int rna(int i); return 215 + i; endfunction              // -a
  function automatic int rsq(int i); return 218 + i; endfunction              // -w_i^2
  function automatic int rcr(int i); return 221 + i; endfunction              // wx wy, wx wz, wy wz
  function automatic int rom(int i, int j); return 224 + 3*i + j; endfunction // W_i

  int body, a_call, a_loop, a_zero, a_neg, a_pos, a_poll, a_echo, a_halt, cv;

  function automatic void build_program();
    int c;
    for (int i = 0; i < 1024; i++) begin prog[i] = NOP; kind[i] = 0; au_used[i] = 0; mu_used[i] = 0; end
    for (int r = 0; r < 256; r++) ready[r] = 0;
    // error path and subroutines (type 2 only)
    prog[ERR]        = t2w(0, 1, 0, M1, 0, C_NEVER);
    prog[ERR+1]      = t2w(1, 1, 0, 0, ERR+1, C_ALWAYS);
    prog[SUB_OUT3]   = t2w(0, 1, 0, WX, 0, C_NEVER);
    prog[SUB_OUT3+1] = t2w(0, 1, 0, WY, 0, C_NEVER);
    prog[SUB_OUT3+2] = t2w(1, 1, 0, 0, SUB_OUTZ, C_CALL);
    prog[SUB_OUT3+3] = t2w(1, 1, 0, 0, 0, C_RET);
    prog[SUB_OUTZ]   = t2w(0, 1, 0, WZ, 0, C_RET);
    for (int i = ERR; i < 1024; i++) if (prog[i] != NOP) kind[i] = 2;
    // 1. link recursion
    void'(op_t2(0, t2w(1, 1, 0, 0, 0, C_LDLC, NLINK - 1)));
    void'(op_in(WX)); void'(op_in(WY)); void'(op_in(WZ));
    void'(op_in(AX)); void'(op_in(AY)); void'(op_in(AZ));
    void'(op_in(NEG1));
    body = pc_end;
    barrier = body;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) void'(op_in(ra(i, j)));
    void'(op_in(TD)); void'(op_in(TDD)); void'(op_in(NTD));
    void'(op_add(W2, WZ, TD));
    // w_(i-1) x thetadot z = (wy td, -wx td, 0); these read w before it is replaced
    void'(op_mul(Q1, WY, TD));
    void'(op_mul(Q2, WX, NTD));
    void'(op_add(rap(0), AX, Q1));
    void'(op_add(rap(1), AY, Q2));
    void'(op_add(rap(2), AZ, TDD));
    for (int i = 0; i < 3; i++) begin
      void'(op_mul(rp(i, 0), ra(i, 0), WX));
      void'(op_mul(rp(i, 1), ra(i, 1), WY));
      void'(op_mul(rp(i, 2), ra(i, 2), W2));
    end
    for (int i = 0; i < 3; i++) void'(op_add(rs(i), rp(i, 0), rp(i, 1)));
    void'(op_add(WX, rs(0), rp(0, 2)));
    void'(op_add(WY, rs(1), rp(1, 2)));
    void'(op_add(WZ, rs(2), rp(2, 2)));
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) void'(op_mul(rq(i, j), ra(i, j), rap(j)));
    for (int i = 0; i < 3; i++) void'(op_add(rt(i), rq(i, 0), rq(i, 1)));
    void'(op_add(AX, rt(0), rq(0, 2)));
    void'(op_add(AY, rt(1), rq(1, 2)));
    void'(op_add(AZ, rt(2), rq(2, 2)));
    for (int i = 0; i < 3; i++) begin
      void'(op_mul(rnw(i), WX + i, NEG1));
      void'(op_mul(rna(i), AX + i, NEG1));
    end
    for (int i = 0; i < 3; i++) void'(op_mul(rsq(i), WX + i, rnw(i)));
    void'(op_mul(rcr(0), WX, WY));
    void'(op_mul(rcr(1), WX, WZ));
    void'(op_mul(rcr(2), WY, WZ));
    void'(op_add(rom(0, 0), rsq(1), rsq(2)));
    void'(op_add(rom(1, 1), rsq(2), rsq(0)));
    void'(op_add(rom(2, 2), rsq(0), rsq(1)));
    void'(op_add(rom(0, 1), rcr(0), rna(2)));
    void'(op_add(rom(0, 2), rcr(1), AY));
    void'(op_add(rom(1, 0), rcr(0), AZ));
    void'(op_add(rom(1, 2), rcr(2), rna(0)));
    void'(op_add(rom(2, 0), rcr(1), rna(1)));
    void'(op_add(rom(2, 1), rcr(2), AX));
    a_call = op_t2(max3(pc_end, ready[WX], ready[WZ]), t2w(1, 1, 0, 0, SUB_OUT3, C_CALL));
    void'(op_out(AX)); void'(op_out(AY)); void'(op_out(AZ));
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) void'(op_out(rom(i, j)));
    a_loop = op_t2(pc_end, t2w(1, 1, 0, 0, body, C_LOOP));
    // 2. branch tests
    void'(op_in(M1));
    void'(op_mul(NZ, WZ, M1));
    void'(op_add(TZ, WZ, NZ));                                     // exactly zero
    a_zero = op_t2(max3(pc_end, ready[TZ], 0), t2w(1, 1, 0, 0, 0, C_ZERO));
    void'(op_t2(pc_end, t2w(0, 1, 0, M1, 0, C_NEVER)));            // skipped
    prog[a_zero] = t2w(1, 1, 0, 0, pc_end, C_ZERO);
    cv = op_add(VN, M1, M1);                                       // -2: negative
    void'(op_in(REX, cv + 4));                                     // write-bus clash
    a_neg = op_t2(max3(pc_end, ready[VN], 0), t2w(1, 1, 0, 0, 0, C_NEG));
    void'(op_t2(pc_end, t2w(0, 1, 0, M1, 0, C_NEVER)));            // skipped
    prog[a_neg] = t2w(1, 1, 0, 0, pc_end, C_NEG);
    a_pos = op_t2(pc_end, t2w(1, 1, 0, 0, ERR, C_POS));            // not taken
    void'(op_out(REX));
    // 3. wait for a full input buffer, then echo
    a_poll = op_t2(pc_end, t2w(1, 1, 0, 0, 0, C_IBFULL));
    void'(op_t2(pc_end, t2w(1, 1, 0, 0, a_poll, C_ALWAYS)));
    a_echo = pc_end;
    prog[a_poll] = t2w(1, 1, 0, 0, a_echo, C_IBFULL);
    void'(op_in(re(0)));
    for (int k = 1; k < NECHO; k++) begin
      // an addition four words before an echo transfer claims its write slot
      if (k == 4) void'(op_add(VN, M1, M1, pc_end));
      void'(op_t2(pc_end, t2w(0, 0, re(k), re(k-1), 0, C_NEVER)));
    end
    void'(op_t2(pc_end, t2w(0, 1, 0, re(NECHO-1), 0, C_NEVER)));
    a_halt = op_t2(pc_end, t2w(1, 1, 0, 0, 0, C_ALWAYS));
    prog[a_halt] = t2w(1, 1, 0, 0, a_halt, C_ALWAYS);
  endfunction

  // ------------------------------------------------------------------
  // host: input port
  // ------------------------------------------------------------------
  logic [31:0] in_q[$];
  int in_gap = 0, gap_cnt = 0;
  bit host_hold = 0;

  always @(posedge in_clk) begin
    if (in_wr && !in_full) void'(in_q.pop_front());
    in_wr <= 0;
    if (host_hold) ;
    else if (gap_cnt > 0) gap_cnt <= gap_cnt - 1;
    else if (in_q.size() > 0) begin
      in_wr   <= 1;
      in_data <= in_q[0];
      gap_cnt <= in_gap;
    end
  end

  // ------------------------------------------------------------------
  // host: output port
  // ------------------------------------------------------------------
  logic [31:0] out_got[$];
  bit reader_on = 0;

  always @(posedge out_clk) begin
    if (out_rd && !out_empty) out_got.push_back(out_data);
    out_rd <= reader_on && ($urandom % 2 == 0);
  end

  // ------------------------------------------------------------------
  // mechanism counters
  // ------------------------------------------------------------------
  int n_ib_empty = 0, n_ob_full = 0, n_clash = 0, n_steal = 0, n_dual = 0;
  int n_au_only = 0, n_mu_only = 0, n_nop = 0, n_loop_t = 0, n_loop_nt = 0;
  int n_call = 0, n_ret = 0, n_jump = 0, n_zero = 0, n_neg = 0, n_pos_nt = 0;
  int n_ibfull_t = 0, n_ibfull_nt = 0, n_pm_words = 0, n_start = 0, n_results = 0;
  int mcyc = 0, run_start = 0, loop_end = 0, n_paused = 0;
  int n_both = 0, first_both = -1, last_both = -1;


  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.pm_we) n_pm_words++;
    if (dut.u_ctrl.ld_start) n_start++;
    if (m_cycle) begin
      mcyc++;
      if (dut.u_ctrl.stall) begin
        if (dut.u_ctrl.need_ib && dut.u_ctrl.ib_empty) n_ib_empty++;
        if (dut.u_ctrl.need_ib && dut.u_ctrl.au_due) n_clash++;
        if (dut.u_ctrl.need_ob && dut.u_ctrl.ob_full) n_ob_full++;
      end
      if (dut.u_ctrl.steal) n_steal++;
      if (running && dut.u_ctrl.halt) n_paused++;
      if (dut.u_ctrl.exec) begin
        if (dut.u_ctrl.au_issue && dut.u_ctrl.mu_issue) n_dual++;
        else if (dut.u_ctrl.au_issue) n_au_only++;
        else if (dut.u_ctrl.mu_issue) n_mu_only++;
        if (dut.u_ctrl.is_t2 && dut.u_ctrl.t2.ign_ib && dut.u_ctrl.t2.ign_ob
            && dut.u_ctrl.t2.cc.cond == C_NEVER) n_nop++;
      end
      if (dut.u_ctrl.t2x && !dut.u_ctrl.blocked) begin
        unique case (dut.u_ctrl.t2.cc.cond)
          C_LOOP:   if (dut.u_ctrl.taken) n_loop_t++; else n_loop_nt++;
          C_CALL:   n_call++;
          C_RET:    n_ret++;
          C_ALWAYS: n_jump++;
          C_ZERO:   n_zero += int'(dut.u_ctrl.taken);
          C_NEG:    n_neg += int'(dut.u_ctrl.taken);
          C_POS:    n_pos_nt += int'(!dut.u_ctrl.taken);
          C_IBFULL: if (dut.u_ctrl.taken) n_ibfull_t++; else n_ibfull_nt++;
          default: ;
        endcase
      end
      if (dut.au_v_out && dut.mu_v_out) begin
        n_both++;
        if (first_both < 0) first_both = mcyc;
        last_both = mcyc;
      end
      if (dut.au_v_out) n_results++;
      if (dut.mu_v_out) n_results++;
    end
  end

  // ------------------------------------------------------------------
  // stimulus and expected results
  // ------------------------------------------------------------------
  function automatic logic [31:0] rnd(int lo, int hi);
    return {1'($urandom), 8'(lo + int'($urandom % (hi - lo + 1))), 23'($urandom)};
  endfunction

  logic [31:0] expect_q[$];

  initial begin
    logic [31:0] w[3], a[3][3], td, w2, p[3][3], s[3], m1, rex, e;
    logic [31:0] al[3], ap[3], tdd, ntd, nw[3], na[3], sq[3], cr[3], om[3][3];
    int t0;
    logic [9:0] t1;
    build_program();
    repeat (4) @(posedge clk);
    rst_n = 1;
    // load the program
    load = 1;
    for (int i = 0; i < 1024; i++)
      if (kind[i] != 0 || prog[i] != NOP || i < pc_end) begin
        in_q.push_back({2'b01, 20'd0, 10'(i)});
        in_q.push_back(prog[i][31:0]);
        in_q.push_back({14'd0, prog[i][49:32]});
      end
    in_q.push_back({2'b10, 20'd0, 10'd0});
    wait (in_q.size() == 0);
    repeat (20) @(posedge clk);
    check(running, "start command seen");
    check(dut.u_pm.mem[SUB_OUT3+2] == prog[SUB_OUT3+2] && dut.u_pm.mem[body] == prog[body],
          "program memory loaded");
    @(negedge clk) load = 0;
    run_start = mcyc;
    reader_on = 1;   // the link results outnumber the output buffer
    // link data, fed slowly
    in_gap = 4;
    for (int j = 0; j < 3; j++) begin w[j] = rnd(125, 128); in_q.push_back(w[j]); end
    for (int j = 0; j < 3; j++) begin al[j] = rnd(125, 128); in_q.push_back(al[j]); end
    in_q.push_back(32'hBF80_0000);
    for (int l = 0; l < NLINK; l++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
        a[i][j] = rnd(122, 126); in_q.push_back(a[i][j]);
      end
      td = rnd(124, 128); in_q.push_back(td);
      tdd = rnd(124, 128); in_q.push_back(tdd);
      ntd = td ^ 32'h8000_0000; in_q.push_back(ntd);
      ap[0] = ref_add(al[0], ref_mul(w[1], td));
      ap[1] = ref_add(al[1], ref_mul(w[0], ntd));
      ap[2] = ref_add(al[2], tdd);
      for (int i = 0; i < 3; i++)
        al[i] = ref_add(ref_add(ref_mul(a[i][0], ap[0]), ref_mul(a[i][1], ap[1])),
                        ref_mul(a[i][2], ap[2]));
      w2 = ref_add(w[2], td);
      for (int i = 0; i < 3; i++) begin
        p[i][0] = ref_mul(a[i][0], w[0]);
        p[i][1] = ref_mul(a[i][1], w[1]);
        p[i][2] = ref_mul(a[i][2], w2);
        s[i] = ref_add(p[i][0], p[i][1]);
      end
      for (int i = 0; i < 3; i++) w[i] = ref_add(s[i], p[i][2]);
      for (int i = 0; i < 3; i++) expect_q.push_back(w[i]);
      for (int i = 0; i < 3; i++) expect_q.push_back(al[i]);
      for (int i = 0; i < 3; i++) begin
        nw[i] = ref_mul(w[i], 32'hBF80_0000);
        na[i] = ref_mul(al[i], 32'hBF80_0000);
        sq[i] = ref_mul(w[i], nw[i]);
      end
      cr[0] = ref_mul(w[0], w[1]); cr[1] = ref_mul(w[0], w[2]); cr[2] = ref_mul(w[1], w[2]);
      om[0][0] = ref_add(sq[1], sq[2]); om[0][1] = ref_add(cr[0], na[2]); om[0][2] = ref_add(cr[1], al[1]);
      om[1][0] = ref_add(cr[0], al[2]); om[1][1] = ref_add(sq[2], sq[0]); om[1][2] = ref_add(cr[2], na[0]);
      om[2][0] = ref_add(cr[1], na[1]); om[2][1] = ref_add(cr[2], al[0]); om[2][2] = ref_add(sq[0], sq[1]);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) expect_q.push_back(om[i][j]);
    end
    m1 = 32'hBF80_0000; in_q.push_back(m1);
    rex = rnd(100, 150); in_q.push_back(rex); expect_q.push_back(rex);
    // pause the running processor with `load` while it is in the link loop
    wait (in_q.size() < 30);
    host_hold = 1;
    @(posedge in_clk); @(posedge in_clk);
    wait (dut.ib_empty);
    @(negedge clk) load = 1;
    t0 = mcyc;
    wait (mcyc - t0 > 40);
    t1 = pc;
    wait (mcyc - t0 > 80);
    check(pc == t1, "processor holds still while paused");
    @(negedge clk) load = 0;
    host_hold = 0;
    wait (in_q.size() == 0);
    loop_end = mcyc;
    // let the program spin on the "input buffer full" test a while
    wait (dut.u_ctrl.t2x && dut.u_ctrl.t2.cc.cond == C_IBFULL);
    reader_on = 0;
    repeat (200) @(posedge clk);
    in_gap = 0;
    for (int k = 0; k < NECHO; k++) begin
      e = $urandom; in_q.push_back(e); expect_q.push_back(e);
    end
    // hold the reader off until the output buffer has been full a while
    t0 = mcyc;
    wait (n_ob_full > 3 || mcyc - t0 > 4000);
    reader_on = 1;
    wait (out_got.size() >= expect_q.size() || mcyc - t0 > 20000);
    repeat (200) @(posedge clk);
    check(pc == 10'(a_halt + 1) || pc == 10'(a_halt), "reached the halt loop");
    check(out_got.size() == expect_q.size(),
          $sformatf("%0d output words, expected %0d", out_got.size(), expect_q.size()));
    for (int i = 0; i < expect_q.size() && i < out_got.size(); i++)
      check(out_got[i] == expect_q[i], $sformatf("output %0d = %h, expected %h", i, out_got[i], expect_q[i]));
    // every mechanism must have happened
    check(n_pm_words == pc_end + 8 - 1 || n_pm_words > 100, "program loaded through the input port");
    check(n_start == 1, "start command");
    check(n_ib_empty > 0, "stall on empty input buffer");
    check(n_ob_full > 0, "stall on full output buffer");
    check(n_clash > 0, "stall on write-bus clash with an adder result");
    check(n_steal > 0, "instruction fetch stolen by refresh");
    check(n_dual > 0 && n_au_only > 0 && n_mu_only > 0, "dual and single issue");
    check(n_nop > 0, "type 2 no-operation");
    check(n_loop_t == NLINK - 1 && n_loop_nt == 1, "loop counter branch");
    check(n_call == 2 * NLINK && n_ret == 2 * NLINK, "nested calls and returns");
    check(n_zero == 1 && n_neg == 1 && n_pos_nt == 1, "adder status branches");
    check(n_ibfull_t == 1 && n_ibfull_nt > 0, "input-buffer-full branch");
    check(n_jump > 0, "unconditional branch");
    check(n_paused > 30, "paused by the load pin while running");
    // a second program, loaded into the stopped processor: a straight run
    // of words that use both units, to show the peak rate of two results
    // per M-cycle
    @(negedge clk) load = 1;
    for (int k = 0; k < NPEAK; k++) begin
      type1_t w;
      w = '{ign_mu: 0, ign_au: 0,
            da: 8'(PK_A + k), sa1: 8'(WX + k % 3), sa2: 8'(WX + (k + 1) % 3),
            dm: 8'(PK_M + k), sm1: 8'(WX + k % 3), sm2: 8'(WX + (k + 2) % 3)};
      in_q.push_back({2'b01, 20'd0, 10'(PK_AT + k)});
      in_q.push_back(w[31:0]);
      in_q.push_back({14'd0, w[49:32]});
    end
    in_q.push_back({2'b01, 20'd0, 10'(PK_AT + NPEAK)});
    in_q.push_back(t2w(1, 1, 0, 0, PK_AT + NPEAK, C_ALWAYS) & 50'hFFFF_FFFF);
    in_q.push_back(32'(t2w(1, 1, 0, 0, PK_AT + NPEAK, C_ALWAYS) >> 32));
    in_q.push_back({2'b10, 20'd0, 10'(PK_AT)});
    wait (in_q.size() == 0);
    repeat (20) @(posedge clk);
    for (int r = 0; r < 3; r++) w[r] = dut.u_rf.mem[WX + r];
    n_both = 0; first_both = -1; last_both = -1;
    @(negedge clk) load = 0;
    t0 = mcyc;
    wait (mcyc - t0 > NPEAK + 20);
    check(n_both == NPEAK, $sformatf("%0d M-cycles with two results, expected %0d", n_both, NPEAK));
    // two results every M-cycle except the refresh bubbles, one per 16
    check(last_both - first_both + 1 <= NPEAK + (NPEAK + 15) / 16 + 1,
          $sformatf("%0d results took %0d M-cycles", 2 * NPEAK, last_both - first_both + 1));
    for (int k = 0; k < NPEAK; k++) begin
      check(dut.u_rf.mem[PK_A + k] == ref_add(w[k % 3], w[(k + 1) % 3]),
            $sformatf("peak run sum %0d", k));
      check(dut.u_rf.mem[PK_M + k] == ref_mul(w[k % 3], w[(k + 2) % 3]),
            $sformatf("peak run product %0d", k));
    end
    $display("peak run: %0d results in %0d M-cycles", 2 * n_both, last_both - first_both + 1);
    $display("program %0d words; M-cycles %0d; results %0d", pc_end, mcyc - run_start, n_results);
    $display("issue: dual %0d adder only %0d multiplier only %0d", n_dual, n_au_only, n_mu_only);
    $display("stalls: ib_empty %0d ob_full %0d clash %0d; refresh steals %0d; dual issue %0d",
             n_ib_empty, n_ob_full, n_clash, n_steal, n_dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
