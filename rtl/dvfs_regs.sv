// dvfs_regs: memory-mapped registers of the DVFS controller (status,
// override, policy, thresholds, window, budget). Software uses them to pick
// the local policy and its thresholds, to sweep the temporal granularity
// (window) and, through override and budget, to impose system-level
// decisions on the local controller.
//
// Bus: one access per cycle with req; writes (we=1) take effect at the clock
// edge, reads return rdata combinationally in the same cycle. Unused bits read
// as zero; writes to read-only addresses are ignored. Register map (word
// addresses, see dvfs_pkg): 0 STATUS {off[16], vctrl[15:8], state[7:4], freeze[3],
// busy[2], cur_op[1:0]}; 1 OVERRIDE {op[5:4], en[0]}; 2 POLICY {pn_op[5:4],
// pl_en[2], policy[1:0]}; 3 traffic threshold; 4 burst threshold; 5 window;
// 6 BUDGET {op[1:0]}; 7 idle count and 8 traffic count of the last window;
// 9 number of VF transitions. The reset values are the coarsest setting of
// the policy table (window 131072, traffic 4096, burst 114688) with policy
// PN at the fastest point; the layout is this design's choice.
module dvfs_regs
  import dvfs_pkg::*;
#(
  parameter logic [31:0] RST_WINDOW  = 32'd131072,
  parameter logic [31:0] RST_THR_TRF = 32'd4096,
  parameter logic [31:0] RST_THR_BST = 32'd114688
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              req,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  // to the FSM
  output dvfs_cfg_t         cfg,
  // status from the FSM
  input  op_t               cur_op,
  input  dvfs_state_e       state,
  input  logic              freeze,
  input  logic              off,
  input  logic [VCTRL_W-1:0] vctrl,
  input  logic [31:0]       last_idle,
  input  logic [31:0]       last_traffic,
  input  logic [31:0]       ntrans
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.policy      <= POL_PN;
      cfg.pl_en       <= 1'b0;
      cfg.pn_op       <= OP_FASTEST;
      cfg.ovr_en      <= 1'b0;
      cfg.ovr_op      <= OP_FASTEST;
      cfg.budget      <= OP_FASTEST;
      cfg.window      <= RST_WINDOW;
      cfg.thr_traffic <= RST_THR_TRF;
      cfg.thr_burst   <= RST_THR_BST;
    end else if (req && we) begin
      case (addr)
        A_OVERRIDE: begin
          cfg.ovr_en <= wdata[0];
          cfg.ovr_op <= wdata[5:4];
        end
        A_POLICY: begin
          cfg.policy <= (wdata[1:0] == 2'd3) ? POL_PN : policy_e'(wdata[1:0]);
          cfg.pl_en  <= wdata[2];
          cfg.pn_op  <= wdata[5:4];
        end
        A_THR_TRF: cfg.thr_traffic <= wdata;
        A_THR_BST: cfg.thr_burst   <= wdata;
        A_WINDOW:  cfg.window      <= wdata;
        A_BUDGET:  cfg.budget      <= wdata[1:0];
        default: ;
      endcase
    end
  end

  logic busy;
  assign busy = (state != S_IDLE) && (state != S_EVAL);

  always_comb begin
    rdata = '0;
    case (addr)
      A_STATUS:   rdata = {15'd0, off, vctrl, state, freeze, busy, cur_op};
      A_OVERRIDE: rdata = {26'd0, cfg.ovr_op, 3'd0, cfg.ovr_en};
      A_POLICY:   rdata = {26'd0, cfg.pn_op, 1'b0, cfg.pl_en, cfg.policy};
      A_THR_TRF:  rdata = cfg.thr_traffic;
      A_THR_BST:  rdata = cfg.thr_burst;
      A_WINDOW:   rdata = cfg.window;
      A_BUDGET:   rdata = {30'd0, cfg.budget};
      A_IDLE_CNT: rdata = last_idle;
      A_TRF_CNT:  rdata = last_traffic;
      A_NTRANS:   rdata = ntrans;
      default:    rdata = '0;
    endcase
  end
endmodule
