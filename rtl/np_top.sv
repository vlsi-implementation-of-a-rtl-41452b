// np_top: a single-chip numerical processor for real-time robot arm
// control, attached to a host computer through an input and an output
// port.
//
// Two pipelined floating point units, an adder (AU) and a multiplier (MU),
// each three stages deep, work concurrently under a 50-bit horizontal
// microinstruction held in the PMDR. Operands and results live in a 256 x
// 32 register file (RF) reached through one shared read bus and one
// shared write bus, each time-multiplexed within the 500 ns M-cycle. A
// 32-word input buffer (IB) and output buffer (OB) decouple the chip from
// the host's clocks. The program, up to 1K words, sits in a writeable
// program memory (PM) addressed by a four-entry program counter stack.
// With both units streaming, two results are produced per M-cycle.
//
// Interface: `clk` is the 125 ns step clock (four steps per M-cycle);
// `in_clk`/`in_wr`/`in_data` push words into the IB; `out_clk`/`out_rd`
// pop words from the OB, whose head is on `out_data`. With `load` high the
// IB words are loader commands (see np_control); `running` rises once a
// start command has been seen. `m_cycle` pulses in the last step of every
// M-cycle and `pc` shows the next fetch address.
//
// The block set and the connections follow the published block diagram;
// the step-level bus timing, the loader protocol and the stall rules are
// this design's own, described in np_control.
module np_top
  import np_pkg::*;
#(
  parameter int unsigned PM_DEPTH   = 1024,
  parameter int unsigned RF_DEPTH   = 256,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  // input port
  input  logic          in_clk,
  input  logic          in_wr,
  input  logic [DW-1:0] in_data,
  output logic          in_full,
  // output port
  input  logic          out_clk,
  input  logic          out_rd,
  output logic [DW-1:0] out_data,
  output logic          out_empty,
  // status
  output logic          running,
  output logic [PA-1:0] pc,
  output logic          m_cycle
);

  // ---------------- control ----------------
  logic [IW-1:0] ir;
  logic          ir_valid;
  logic          ib_empty, ib_full, ob_full, ob_rfull;
  logic [DW-1:0] ib_head, rf_rdata;
  logic          au_v_out, au_pos, au_neg, au_zero, mu_v_out;
  logic [DW-1:0] au_y, mu_y;
  logic [1:0]    phase;
  logic          m_end;
  logic [RA-1:0] rf_raddr, rf_waddr;
  logic          rf_we;
  wsel_e         rf_wsel;
  logic          au_issue, mu_issue, ib_pop, ob_push;
  logic          pm_we, pm_fetch, pm_flush, refresh;
  logic [PA-1:0] pm_waddr, pm_raddr;
  logic [IW-1:0] pm_wdata;
  logic [4:0]    ref_row, ref_row_q;
  logic          stall, steal;

  np_control u_ctrl (
    .clk, .rst_n, .load,
    .ir, .ir_valid,
    .ib_empty, .ib_full, .ib_head, .ob_full,
    .au_out_valid(au_v_out), .au_pos, .au_neg, .au_zero, .mu_out_valid(mu_v_out),
    .phase, .m_end,
    .rf_raddr, .rf_we, .rf_waddr, .rf_wsel,
    .au_issue, .mu_issue, .ib_pop, .ob_push,
    .pm_we, .pm_waddr, .pm_wdata, .pm_fetch, .pm_raddr, .pm_flush,
    .refresh, .ref_row,
    .running, .pc, .stall, .steal
  );

  assign m_cycle = m_end;

  // ---------------- program memory and PMDR ----------------
  prog_mem #(.DEPTH(PM_DEPTH), .WIDTH(IW), .ROW_BITS(5)) u_pm (
    .clk, .rst_n,
    .we(pm_we), .waddr(pm_waddr[$clog2(PM_DEPTH)-1:0]), .wdata(pm_wdata),
    .en(m_end), .fetch(pm_fetch), .raddr(pm_raddr[$clog2(PM_DEPTH)-1:0]),
    .flush(pm_flush), .refresh, .ref_row,
    .ir, .ir_valid, .ref_row_q
  );

  // ---------------- register file ----------------
  logic [DW-1:0] rf_wdata;

  always_comb
    unique case (rf_wsel)
      WS_MU:   rf_wdata = mu_y;
      WS_IB:   rf_wdata = ib_head;
      default: rf_wdata = au_y;
    endcase

  reg_file #(.DEPTH(RF_DEPTH), .WIDTH(DW)) u_rf (
    .clk,
    .raddr(rf_raddr[$clog2(RF_DEPTH)-1:0]), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr[$clog2(RF_DEPTH)-1:0]), .wdata(rf_wdata)
  );

  // ---------------- operand transfer: one read-bus step per input ----------------
  logic [DW-1:0] lat_a1, lat_a2, lat_m1;
  logic [DW-1:0] au_a, au_b, mu_a, mu_b;
  logic          au_v_in, mu_v_in;

  always_ff @(posedge clk) begin
    if (phase == 2'd0) lat_a1 <= rf_rdata;
    if (phase == 2'd1) lat_a2 <= rf_rdata;
    if (phase == 2'd2) lat_m1 <= rf_rdata;
    if (m_end) begin
      au_a <= lat_a1;
      au_b <= lat_a2;
      mu_a <= lat_m1;
      mu_b <= rf_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      au_v_in <= 1'b0;
      mu_v_in <= 1'b0;
    end else if (m_end) begin
      au_v_in <= au_issue;
      mu_v_in <= mu_issue;
    end

  // ---------------- function units ----------------
  fp_add u_au (
    .clk, .rst_n, .en(m_end), .in_valid(au_v_in), .a(au_a), .b(au_b),
    .out_valid(au_v_out), .y(au_y), .pos(au_pos), .neg(au_neg), .zero(au_zero)
  );

  fp_mul u_mu (
    .clk, .rst_n, .en(m_end), .in_valid(mu_v_in), .a(mu_a), .b(mu_b),
    .out_valid(mu_v_out), .y(mu_y)
  );

  // ---------------- input and output buffers ----------------
  async_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(DW)) u_ib (
    .wclk(in_clk), .wrst_n(rst_n), .wr(in_wr), .wdata(in_data), .wfull(in_full),
    .rclk(clk), .rrst_n(rst_n), .rd(ib_pop), .rdata(ib_head), .rempty(ib_empty),
    .rfull(ib_full)
  );

  async_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(DW)) u_ob (
    .wclk(clk), .wrst_n(rst_n), .wr(ob_push), .wdata(rf_rdata), .wfull(ob_full),
    .rclk(out_clk), .rrst_n(rst_n), .rd(out_rd), .rdata(out_data), .rempty(out_empty),
    .rfull(ob_rfull)
  );

endmodule
