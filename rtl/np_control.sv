// np_control: the control logic of the numerical processor, with the
// program counter stack, the destination delay lines, the loop counter,
// the condition code logic and the refresh register it drives.
//
// Timing. `clk` is a step clock of 125 ns; four steps make one 500 ns
// M-cycle, and `m_end` marks the last step. The instruction in the PMDR
// executes during one M-cycle:
//  * type 1: the shared RF read bus carries SA1, SA2, SM1, SM2 in steps
//    0..3 into the AU and MU operand latches; at the end of the M-cycle the
//    operands enter the AU/MU pipelines and DA, DM and the two leading bits
//    enter the four-stage delay lines. Four M-cycles later the delay lines
//    present the destinations: the shared RF write bus writes the AU result
//    to DA in the first half of that M-cycle (step 1) and the MU result to
//    DM in the second half (step 3). A register written by an instruction
//    is readable by the instruction issued five M-cycles after it.
//  * type 2: step 0 reads register OB onto the tail of the output buffer;
//    step 1 writes the head word of the input buffer into register IB; at
//    the end of the M-cycle the condition in CC picks the next address.
//    With both ignore bits set nothing is transferred; the condition is
//    still evaluated, so a word with both bits set and a zero CC field is
//    the no-operation, and one with a nonzero CC is a pure branch (the
//    document's format, read strictly, has no branch without a transfer).
// The write-bus slot for the input buffer is the AU's slot; this design
// gives it to the IB only when no AU result is due. A type 2 instruction
// that cannot complete (IB empty, OB full, or an AU result due in the
// same slot) is held in the PMDR and retried next M-cycle: the decision
// is taken in step 0 and kept for the rest of the M-cycle. Pipelines and
// delay lines advance regardless, so results already in flight land on
// time.
//
// Fetch: at the end of each M-cycle the PMDR loads the instruction at the
// address chosen by the program counter stack. Every 16th M-cycle the
// refresh register takes that fetch; the PMDR is then empty for an
// M-cycle and the same address is fetched next time.
//
// Loading: while `load` is high nothing executes and words from the input
// buffer are taken as loader commands: a word with bits 31:30 = 01 is
// followed by two words, the low 32 and the high 18 bits of a PM word
// written at the address in bits 9:0; a word with bits 31:30 = 10 sets the
// program counter to bits 9:0, empties the stack and the PMDR and marks
// the processor running. `load` is sampled at the end of each M-cycle:
// loading begins, and execution pauses or resumes, at M-cycle
// boundaries. The document says only that PM and PCS are loaded through the input port; this
// command format is this design's own.
module np_control
  import np_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  // PMDR
  input  logic [IW-1:0] ir,
  input  logic          ir_valid,
  // buffers
  input  logic          ib_empty,
  input  logic          ib_full,
  input  logic [DW-1:0] ib_head,
  input  logic          ob_full,
  // AU status
  input  logic          au_out_valid,
  input  logic          au_pos,
  input  logic          au_neg,
  input  logic          au_zero,
  input  logic          mu_out_valid,
  // step timing
  output logic [1:0]    phase,
  output logic          m_end,
  // register file buses
  output logic [RA-1:0] rf_raddr,
  output logic          rf_we,
  output logic [RA-1:0] rf_waddr,
  output wsel_e         rf_wsel,
  // function unit issue (sampled at m_end)
  output logic          au_issue,
  output logic          mu_issue,
  // buffers
  output logic          ib_pop,
  output logic          ob_push,
  // program memory
  output logic          pm_we,
  output logic [PA-1:0] pm_waddr,
  output logic [IW-1:0] pm_wdata,
  output logic          pm_fetch,
  output logic [PA-1:0] pm_raddr,
  output logic          pm_flush,
  output logic          refresh,
  output logic [4:0]    ref_row,
  // status
  output logic          running,
  output logic [PA-1:0] pc,
  output logic          stall,
  output logic          steal
);

  // ---------------- step counter ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 2'd0;
    else        phase <= phase + 2'd1;

  assign m_end = (phase == 2'd3);

  // ---------------- decode ----------------
  type1_t t1;
  type2_t t2;
  logic   exec, is_t2, t2x, need_ib, need_ob;

  assign t1      = type1_t'(ir);
  assign t2      = type2_t'(ir);
  // `load` takes effect at M-cycle boundaries only, so that no type 2
  // transfer is cut in half
  logic halt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) halt <= 1'b1;
    else if (m_end) halt <= load;

  assign exec    = ir_valid && running && !halt;
  assign is_t2   = (ir[IW-1 -: 2] == 2'b11);
  assign t2x     = exec && is_t2;
  assign need_ib = t2x && !t2.ign_ib;
  assign need_ob = t2x && !t2.ign_ob;

  assign au_issue = exec && !is_t2 && !t1.ign_au;
  assign mu_issue = exec && !is_t2 && !t1.ign_mu;

  // ---------------- destination delay lines ----------------
  dest_t dl_in, dl_out;
  logic  au_due, mu_due;

  assign dl_in = '{valid:  exec && !is_t2,
                   ign_mu: t1.ign_mu,
                   ign_au: t1.ign_au,
                   da:     t1.da,
                   dm:     t1.dm};

  dest_delay #(.STAGES(DEST_DLY)) u_delay (
    .clk, .rst_n, .en(m_end), .d(dl_in), .q(dl_out)
  );

  assign au_due = dl_out.valid && !dl_out.ign_au;
  assign mu_due = dl_out.valid && !dl_out.ign_mu;

  // ---------------- type 2 completion decision ----------------
  logic blocked0, blocked_q, blocked;

  assign blocked0 = (need_ib && (ib_empty || au_due)) || (need_ob && ob_full);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) blocked_q <= 1'b0;
    else if (phase == 2'd0) blocked_q <= blocked0;

  assign blocked = (phase == 2'd0) ? blocked0 : blocked_q;
  assign stall   = m_end && t2x && blocked;

  // ---------------- register file buses ----------------
  logic ib_xfer;

  always_comb begin
    if (is_t2) rf_raddr = t2.ob;
    else
      unique case (phase)
        2'd0:    rf_raddr = t1.sa1;
        2'd1:    rf_raddr = t1.sa2;
        2'd2:    rf_raddr = t1.sm1;
        default: rf_raddr = t1.sm2;
      endcase
  end

  assign ob_push = (phase == 2'd0) && need_ob && !blocked0;
  assign ib_xfer = (phase == 2'd1) && need_ib && !blocked_q;

  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = dl_out.da;
    rf_wsel  = WS_AU;
    if (phase == 2'd1) begin
      if (au_due) begin
        rf_we = 1'b1;
      end else if (ib_xfer) begin
        rf_we    = 1'b1;
        rf_waddr = t2.ib;
        rf_wsel  = WS_IB;
      end
    end else if (phase == 2'd3 && mu_due) begin
      rf_we    = 1'b1;
      rf_waddr = dl_out.dm;
      rf_wsel  = WS_MU;
    end
  end

  // ---------------- loop counter and condition code ----------------
  logic            lc_load, lc_dec, lc_zero, taken;
  logic [LCW-1:0]  lc_count;
  logic [2:0]      flags;
  pc_op_e          cc_op;

  loop_counter #(.WIDTH(LCW)) u_lc (
    .clk, .rst_n, .en(m_end), .load(lc_load), .d(t2.cc.lc_val), .dec(lc_dec),
    .count(lc_count), .zero(lc_zero)
  );

  cond_code u_cc (
    .clk, .rst_n, .en(m_end),
    .au_valid(au_out_valid), .au_pos, .au_neg, .au_zero,
    .ib_full, .ob_full, .lc_zero,
    .exec(t2x && !blocked), .cond(cond_e'(t2.cc.cond)),
    .pc_op(cc_op), .taken, .lc_load, .lc_dec, .flags
  );

  // ---------------- refresh register ----------------
  pm_refresh #(.PERIOD(16), .ROW_BITS(5)) u_refresh (
    .clk, .rst_n, .en(m_end), .refresh, .row(ref_row)
  );

  // ---------------- loader ----------------
  typedef enum logic [1:0] {LD_CMD, LD_LO, LD_HI} ld_state_e;
  ld_state_e    ld_state;
  logic [31:0]  ld_lo;
  logic         ld_pop, ld_start;

  assign ld_pop   = load && halt && !ib_empty;
  assign ld_start = ld_pop && ld_state == LD_CMD && ib_head[31:30] == LD_START;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ld_state <= LD_CMD;
      pm_waddr <= '0;
      ld_lo    <= '0;
      running  <= 1'b0;
    end else if (ld_pop) begin
      unique case (ld_state)
        LD_CMD: begin
          if (ib_head[31:30] == LD_PM) begin
            pm_waddr <= ib_head[PA-1:0];
            ld_state <= LD_LO;
          end
          if (ib_head[31:30] == LD_START) running <= 1'b1;
        end
        LD_LO: begin
          ld_lo    <= ib_head;
          ld_state <= LD_HI;
        end
        default: ld_state <= LD_CMD;
      endcase
    end

  assign pm_we    = ld_pop && ld_state == LD_HI;
  assign pm_wdata = {ib_head[IW-33:0], ld_lo};
  assign pm_flush = ld_start;
  assign ib_pop   = ld_pop || ib_xfer;

  // ---------------- program counter stack ----------------
  pc_op_e       pcs_op;
  logic [PA-1:0] pcs_na;

  always_comb begin
    pcs_op = PC_HOLD;
    pcs_na = t2.na;
    if (ld_start) begin
      pcs_op = PC_LOAD;
      pcs_na = ib_head[PA-1:0];
    end else if (running && !halt && !(t2x && blocked))
      pcs_op = cc_op;
  end

  assign pm_fetch = (pcs_op != PC_HOLD) && (pcs_op != PC_LOAD);
  assign steal    = m_end && pm_fetch && refresh;

  pc_stack #(.DEPTH(4), .AW(PA)) u_pcs (
    .clk, .rst_n, .en(m_end || ld_start), .op(pcs_op), .inc(!refresh),
    .na(pcs_na), .fetch_addr(pm_raddr), .top(pc), .depth(),
    .ovf(), .unf()
  );

  // ---------------- rules of the schedule ----------------
  // A result that the delay lines say is due must be in the unit's output.
  a_au_due: assert property (@(posedge clk) disable iff (!rst_n)
                             (phase == 2'd1 && au_due) |-> au_out_valid);
  a_mu_due: assert property (@(posedge clk) disable iff (!rst_n)
                             (phase == 2'd3 && mu_due) |-> mu_out_valid);

endmodule
