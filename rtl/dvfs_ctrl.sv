// dvfs_ctrl: fine-grained DVFS controller of one VF domain, as mapped on the
// FPGA prototype. Only one tile per domain carries it; its clock and its
// freeze serve every tile of the domain.
//
// Structure (one instance of each):
//   clk_mux4      glitch-free selection among the four fixed operating-point
//                 clocks clk_op[3:0]; its output outclk is the domain clock.
//                 It takes the place of run-time PLL reconfiguration.
//   pll_ctrl_fsm  on refclk: applies a requested point to the clock mux
//                 (fctrl/fchange) and acknowledges once it is locked.
//   sync_2ff x2   request into refclk, acknowledge back into outclk.
//   dvfs_fsm      on outclk: policy evaluation and VF transitions; drives
//                 vctrl (voltage reference for the regulator) and freeze.
//   dvfs_regs     memory-mapped registers on outclk (see dvfs_regs).
//   window_counter x2  idle and traffic statistics of the current window.
//   clock_gate    freezes clk_logic, the clock of the domain's tiles,
//                 during VF transients.
//   perf_counters DVFS probe: cycles spent powered at each operating point
//                 (0..3), cycles frozen (4) and cycles switched off (5), for
//                 profiling and for the energy estimate E = sum_i E_i * C_i.
//
// Switch-off: when no accelerator of the domain is enabled, vr_off asks the
// regulator to turn the domain off; it is registered, so it follows the
// enable probes by one cycle and turns on again the cycle after an
// accelerator is started. The domain can only be switched off when every
// accelerator in it is inactive; that rule is the source's. That the clocks
// keep running while off (so the configuration registers of the tiles stay
// reachable and a start can wake the domain), and that the DVFS FSM keeps
// running, are this design's choices.
//
// Interface: acc_idle[i], acc_en[i] and noc_bp[i] are the probes of tile i,
// synchronous to outclk (the tiles run on clk_logic, a gated copy of it). The register
// bus and the probe read port are synchronous to outclk. rst_n is an
// asynchronous active-low reset for every clock domain; outclk starts a few
// cycles of clk_op[RESET_OP] after it is released.
module dvfs_ctrl
  import dvfs_pkg::*;
#(
  parameter int unsigned N_ACC     = 3,   // tiles in the domain
  parameter int unsigned VR_CYCLES = 64,
  parameter int unsigned CNT_W     = 32
) (
  input  logic               refclk,
  input  logic               rst_n,
  input  logic [3:0]         clk_op,      // clk_op[i] runs at operating point i
  output logic               outclk,
  output logic               clk_logic,
  // register bus (outclk)
  input  logic               reg_req,
  input  logic               reg_we,
  input  logic [REG_AW-1:0]  reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // probes from the tiles (outclk)
  input  logic [N_ACC-1:0]   acc_idle,
  input  logic [N_ACC-1:0]   acc_en,
  input  logic [N_ACC-1:0]   noc_bp,
  // regulator and clock source
  output logic [VCTRL_W-1:0] vctrl,
  output op_t                fctrl,
  output logic               fchange,
  output logic               freeze,
  output logic               vr_off,      // regulator off request
  output op_t                cur_op,
  output dvfs_state_e        state,
  // DVFS probe counters (outclk)
  input  logic               prb_clear,
  input  logic               prb_snapshot,
  input  logic [2:0]         prb_idx,
  output logic [CNT_W-1:0]   prb_data,
  output logic [CNT_W-1:0]   prb_snap
);
  dvfs_cfg_t   cfg;
  logic [31:0] idle_cnt, trf_cnt, last_idle, last_traffic, ntrans;
  logic        cnt_clear, cnt_en;
  logic        pll_req, pll_req_s, pll_ack, pll_ack_s, lock;
  op_t         pll_target;

  clk_mux4 u_mux (
    .rst_n(rst_n), .clk_in(clk_op), .sel(fctrl),
    .clk_out(outclk), .lock(lock), .en()
  );

  sync_2ff u_sync_req (.clk(refclk), .rst_n(rst_n), .d(pll_req), .q(pll_req_s));
  sync_2ff u_sync_ack (.clk(outclk), .rst_n(rst_n), .d(pll_ack), .q(pll_ack_s));

  pll_ctrl_fsm u_pllc (
    .refclk(refclk), .rst_n(rst_n), .req(pll_req_s), .target(pll_target),
    .lock(lock), .fctrl(fctrl), .fchange(fchange), .ack(pll_ack)
  );

  dvfs_fsm #(.VR_CYCLES(VR_CYCLES)) u_fsm (
    .clk(outclk), .rst_n(rst_n), .cfg(cfg),
    .idle_cnt(idle_cnt), .trf_cnt(trf_cnt),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en),
    .pll_req(pll_req), .pll_target(pll_target), .pll_ack(pll_ack_s),
    .vctrl(vctrl), .freeze(freeze), .cur_op(cur_op), .state(state),
    .last_idle(last_idle), .last_traffic(last_traffic), .ntrans(ntrans)
  );

  dvfs_regs u_regs (
    .clk(outclk), .rst_n(rst_n),
    .req(reg_req), .we(reg_we), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .cfg(cfg),
    .cur_op(cur_op), .state(state), .freeze(freeze), .off(vr_off), .vctrl(vctrl),
    .last_idle(last_idle), .last_traffic(last_traffic), .ntrans(ntrans)
  );

  window_counter #(.N(N_ACC)) u_idle_cnt (
    .clk(outclk), .rst_n(rst_n), .clear(cnt_clear), .en(cnt_en),
    .cond(acc_idle), .count(idle_cnt)
  );
  window_counter #(.N(N_ACC)) u_trf_cnt (
    .clk(outclk), .rst_n(rst_n), .clear(cnt_clear), .en(cnt_en),
    .cond(noc_bp), .count(trf_cnt)
  );

  clock_gate u_cg (.clk(outclk), .freeze(freeze), .gclk(clk_logic));

  // switch-off request: no accelerator of the domain is enabled
  always_ff @(posedge outclk or negedge rst_n)
    if (!rst_n) vr_off <= 1'b1;
    else        vr_off <= ~|acc_en;

  logic [5:0] prb_ev;
  always_comb begin
    prb_ev = '0;
    prb_ev[3'(cur_op)] = !vr_off;
    prb_ev[4]      = freeze;
    prb_ev[5]      = vr_off;
  end
  perf_counters #(.N(6), .W(CNT_W)) u_dvfs_probe (
    .clk(outclk), .rst_n(rst_n), .clear(prb_clear), .snapshot(prb_snapshot),
    .ev(prb_ev), .rd_idx(prb_idx), .rd_data(prb_data), .snap_data(prb_snap)
  );
endmodule
