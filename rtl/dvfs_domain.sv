// dvfs_domain: one voltage/frequency domain of the tile-based SoC, the unit
// at which fine-grained DVFS is applied. It holds the domain's DVFS
// controller and N_TILES accelerator tiles. The controller picks the domain
// clock among four fixed operating-point clocks, drives the voltage
// reference of the domain's regulator (vctrl), and freezes the tiles'
// clock (clk_logic) during VF transitions. It decides from two probes per
// tile: accelerator idle and NoC back-pressure. A third probe, accelerator
// enabled, lets it ask the regulator to switch the domain off (vr_off) while
// no accelerator of the domain is enabled.
//
// Clocks: refclk (external reference, clocks the PLL control FSM), clk_op[i]
// (fixed clock of operating point i, fastest first), clk_noc (NoC side of the
// tiles' dual-clock FIFOs). Outputs outclk (ungated domain clock; the DVFS
// register bus and DVFS probe port are synchronous to it) and clk_logic (the
// gated copy; the tiles' CTRL buses, accelerator ports and ACC probe ports
// are synchronous to it). rst_n is an asynchronous active-low reset for all.
// Per-tile ports are packed arrays indexed by tile. The accelerators, the NoC
// routers, the regulator and its DAC are outside this module. Three tiles per
// domain is the split of twelve accelerators over four domains in the
// example SoC; tile i is NoC source SRC_BASE+i and talks to memory tile
// MEM_ID (identifiers are this design's choice).
module dvfs_domain
  import dvfs_pkg::*;
#(
  parameter int unsigned N_TILES   = 3,
  parameter int unsigned N_CFG     = 8,
  parameter int unsigned FIFO_AW   = 3,
  parameter int unsigned VR_CYCLES = 64,
  parameter int unsigned CNT_W     = 32,
  parameter logic [7:0]  SRC_BASE  = 8'd4,
  parameter logic [7:0]  MEM_ID    = 8'd1
) (
  input  logic                                  refclk,
  input  logic [3:0]                            clk_op,
  input  logic                                  clk_noc,
  input  logic                                  rst_n,
  output logic                                  outclk,
  output logic                                  clk_logic,
  // DVFS controller registers (outclk)
  input  logic                                  reg_req,
  input  logic                                  reg_we,
  input  logic [REG_AW-1:0]                     reg_addr,
  input  logic [31:0]                           reg_wdata,
  output logic [31:0]                           reg_rdata,
  // regulator / clock source
  output logic [VCTRL_W-1:0]                    vctrl,
  output op_t                                   fctrl,
  output logic                                  fchange,
  output logic                                  freeze,
  output logic                                  vr_off,
  output op_t                                   cur_op,
  output dvfs_state_e                           dvfs_state,
  // DVFS probe (outclk)
  input  logic                                  dprb_clear,
  input  logic                                  dprb_snapshot,
  input  logic [2:0]                            dprb_idx,
  output logic [CNT_W-1:0]                      dprb_data,
  output logic [CNT_W-1:0]                      dprb_snap,
  // per tile: CTRL bus (clk_logic)
  input  logic [N_TILES-1:0]                    ctl_req,
  input  logic [N_TILES-1:0]                    ctl_we,
  input  logic [N_TILES-1:0][3:0]               ctl_addr,
  input  logic [N_TILES-1:0][31:0]              ctl_wdata,
  output logic [N_TILES-1:0][31:0]              ctl_rdata,
  output logic [N_TILES-1:0]                    irq,
  // per tile: accelerator (clk_logic)
  output logic [N_TILES-1:0]                    acc_start,
  input  logic [N_TILES-1:0]                    acc_done,
  input  logic [N_TILES-1:0]                    acc_computing,
  output logic [N_TILES-1:0][N_CFG-1:0][31:0]   acc_cfg,
  input  logic [N_TILES-1:0]                    rd_valid,
  output logic [N_TILES-1:0]                    rd_ready,
  input  logic [N_TILES-1:0][31:0]              rd_addr,
  input  logic [N_TILES-1:0][14:0]              rd_len,
  input  logic [N_TILES-1:0]                    wr_valid,
  output logic [N_TILES-1:0]                    wr_ready,
  input  logic [N_TILES-1:0][31:0]              wr_addr,
  input  logic [N_TILES-1:0][14:0]              wr_len,
  input  logic [N_TILES-1:0]                    out_valid,
  output logic [N_TILES-1:0]                    out_ready,
  input  logic [N_TILES-1:0][31:0]              out_data,
  output logic [N_TILES-1:0]                    in_valid,
  input  logic [N_TILES-1:0]                    in_ready,
  output logic [N_TILES-1:0][31:0]              in_data,
  // per tile: NoC local port (clk_noc)
  output logic [N_TILES-1:0]                    noc_tx_valid,
  input  logic [N_TILES-1:0]                    noc_tx_ready,
  output logic [N_TILES-1:0][FLIT_W-1:0]        noc_tx_flit,
  input  logic [N_TILES-1:0]                    noc_rx_valid,
  output logic [N_TILES-1:0]                    noc_rx_ready,
  input  logic [N_TILES-1:0][FLIT_W-1:0]        noc_rx_flit,
  // per tile: ACC probe (clk_logic)
  input  logic [N_TILES-1:0]                    aprb_clear,
  input  logic [N_TILES-1:0]                    aprb_snapshot,
  input  logic [N_TILES-1:0][2:0]               aprb_idx,
  output logic [N_TILES-1:0][CNT_W-1:0]         aprb_data,
  output logic [N_TILES-1:0][CNT_W-1:0]         aprb_snap
);
  logic [N_TILES-1:0] acc_idle, acc_en, noc_bp;

  dvfs_ctrl #(.N_ACC(N_TILES), .VR_CYCLES(VR_CYCLES), .CNT_W(CNT_W)) u_dvfs (
    .refclk(refclk), .rst_n(rst_n), .clk_op(clk_op),
    .outclk(outclk), .clk_logic(clk_logic),
    .reg_req(reg_req), .reg_we(reg_we), .reg_addr(reg_addr),
    .reg_wdata(reg_wdata), .reg_rdata(reg_rdata),
    .acc_idle(acc_idle), .acc_en(acc_en), .noc_bp(noc_bp),
    .vctrl(vctrl), .fctrl(fctrl), .fchange(fchange), .freeze(freeze), .vr_off(vr_off),
    .cur_op(cur_op), .state(dvfs_state),
    .prb_clear(dprb_clear), .prb_snapshot(dprb_snapshot), .prb_idx(dprb_idx),
    .prb_data(dprb_data), .prb_snap(dprb_snap)
  );

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    acc_tile #(
      .N_CFG(N_CFG), .FIFO_AW(FIFO_AW), .SRC_ID(SRC_BASE + 8'(t)),
      .MEM_ID(MEM_ID), .CNT_W(CNT_W)
    ) u_tile (
      .clk(clk_logic), .clk_noc(clk_noc), .rst_n(rst_n),
      .ctl_req(ctl_req[t]), .ctl_we(ctl_we[t]), .ctl_addr(ctl_addr[t]),
      .ctl_wdata(ctl_wdata[t]), .ctl_rdata(ctl_rdata[t]), .irq(irq[t]),
      .acc_start(acc_start[t]), .acc_done(acc_done[t]),
      .acc_computing(acc_computing[t]), .acc_cfg(acc_cfg[t]),
      .rd_valid(rd_valid[t]), .rd_ready(rd_ready[t]), .rd_addr(rd_addr[t]), .rd_len(rd_len[t]),
      .wr_valid(wr_valid[t]), .wr_ready(wr_ready[t]), .wr_addr(wr_addr[t]), .wr_len(wr_len[t]),
      .out_valid(out_valid[t]), .out_ready(out_ready[t]), .out_data(out_data[t]),
      .in_valid(in_valid[t]), .in_ready(in_ready[t]), .in_data(in_data[t]),
      .noc_tx_valid(noc_tx_valid[t]), .noc_tx_ready(noc_tx_ready[t]), .noc_tx_flit(noc_tx_flit[t]),
      .noc_rx_valid(noc_rx_valid[t]), .noc_rx_ready(noc_rx_ready[t]), .noc_rx_flit(noc_rx_flit[t]),
      .acc_idle(acc_idle[t]), .acc_enabled(acc_en[t]), .noc_bp(noc_bp[t]),
      .prb_clear(aprb_clear[t]), .prb_snapshot(aprb_snapshot[t]), .prb_idx(aprb_idx[t]),
      .prb_data(aprb_data[t]), .prb_snap(aprb_snap[t])
    );
  end
endmodule
