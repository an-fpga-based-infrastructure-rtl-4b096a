// acc_tile: accelerator tile shell. Everything here runs on clk, the gated
// clock of the tile's VF domain, except the NoC side of the two dual-clock
// FIFOs, which runs on clk_noc. The accelerator itself sits outside: its
// start/done/config signals, its DMA requests and data streams, and its
// "computing" probe are ports of this module.
//
//   acc_ctrl       memory-mapped configuration registers, start, irq
//   dmac           accelerator read/write requests <-> NoC packets
//   dc_fifo x2     tile -> NoC (tx) and NoC -> tile (rx) clock crossing
//   perf_counters  ACC probe: cycles enabled (0), computing (1),
//                  transferring (2), computing and transferring (3),
//                  under back-pressure (4)
//
// Probe outputs to the domain's DVFS controller: acc_idle is high when the
// accelerator is not computing (disabled, or waiting for data), acc_enabled
// while it has been started and has not finished (the domain may be switched
// off only when no accelerator in it is enabled), noc_bp when the tile
// receives back-pressure from the NoC. All are synchronous to clk.
module acc_tile
  import dvfs_pkg::*;
#(
  parameter int unsigned N_CFG   = 8,
  parameter int unsigned FIFO_AW = 3,
  parameter logic [7:0]  SRC_ID  = 8'd0,
  parameter logic [7:0]  MEM_ID  = 8'd1,
  parameter int unsigned CNT_W   = 32
) (
  input  logic                        clk,
  input  logic                        clk_noc,
  input  logic                        rst_n,
  // CTRL register bus (clk)
  input  logic                        ctl_req,
  input  logic                        ctl_we,
  input  logic [3:0]                  ctl_addr,
  input  logic [31:0]                 ctl_wdata,
  output logic [31:0]                 ctl_rdata,
  output logic                        irq,
  // accelerator
  output logic                        acc_start,
  input  logic                        acc_done,
  input  logic                        acc_computing,
  output logic [N_CFG-1:0][31:0]      acc_cfg,
  input  logic                        rd_valid,
  output logic                        rd_ready,
  input  logic [31:0]                 rd_addr,
  input  logic [14:0]                 rd_len,
  input  logic                        wr_valid,
  output logic                        wr_ready,
  input  logic [31:0]                 wr_addr,
  input  logic [14:0]                 wr_len,
  input  logic                        out_valid,
  output logic                        out_ready,
  input  logic [31:0]                 out_data,
  output logic                        in_valid,
  input  logic                        in_ready,
  output logic [31:0]                 in_data,
  // NoC local port (clk_noc)
  output logic                        noc_tx_valid,
  input  logic                        noc_tx_ready,
  output logic [FLIT_W-1:0]           noc_tx_flit,
  input  logic                        noc_rx_valid,
  output logic                        noc_rx_ready,
  input  logic [FLIT_W-1:0]           noc_rx_flit,
  // probes
  output logic                        acc_idle,
  output logic                        acc_enabled,
  output logic                        noc_bp,
  input  logic                        prb_clear,
  input  logic                        prb_snapshot,
  input  logic [2:0]                  prb_idx,
  output logic [CNT_W-1:0]            prb_data,
  output logic [CNT_W-1:0]            prb_snap
);
  logic              busy, xfer;
  logic [31:0]       cfg_u [N_CFG];
  logic              tx_valid, tx_ready, rx_valid, rx_ready;
  logic [FLIT_W-1:0] tx_flit, rx_flit;

  acc_ctrl #(.N_CFG(N_CFG)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .req(ctl_req), .we(ctl_we), .addr(ctl_addr),
    .wdata(ctl_wdata), .rdata(ctl_rdata), .start(acc_start), .done(acc_done),
    .busy(busy), .irq(irq), .cfg(cfg_u)
  );
  always_comb for (int i = 0; i < N_CFG; i++) acc_cfg[i] = cfg_u[i];

  dmac #(.SRC_ID(SRC_ID), .MEM_ID(MEM_ID)) u_dmac (
    .clk(clk), .rst_n(rst_n),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr), .rd_len(rd_len),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_len(wr_len),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_flit(tx_flit),
    .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_flit(rx_flit),
    .xfer(xfer), .bp(noc_bp)
  );

  dc_fifo #(.W(FLIT_W), .AW(FIFO_AW)) u_tx_fifo (
    .rst_n(rst_n),
    .wclk(clk), .wvalid(tx_valid), .wready(tx_ready), .wdata(tx_flit),
    .rclk(clk_noc), .rvalid(noc_tx_valid), .rready(noc_tx_ready), .rdata(noc_tx_flit)
  );
  dc_fifo #(.W(FLIT_W), .AW(FIFO_AW)) u_rx_fifo (
    .rst_n(rst_n),
    .wclk(clk_noc), .wvalid(noc_rx_valid), .wready(noc_rx_ready), .wdata(noc_rx_flit),
    .rclk(clk), .rvalid(rx_valid), .rready(rx_ready), .rdata(rx_flit)
  );

  assign acc_idle = !acc_computing;
  assign acc_enabled = busy;

  logic computing;
  assign computing = acc_computing && busy;
  perf_counters #(.N(5), .W(CNT_W)) u_acc_probe (
    .clk(clk), .rst_n(rst_n), .clear(prb_clear), .snapshot(prb_snapshot),
    .ev({noc_bp, computing && xfer, xfer, computing, busy}),
    .rd_idx(prb_idx), .rd_data(prb_data), .snap_data(prb_snap)
  );
endmodule
