// dvfs_fsm: the central FSM of the DVFS controller. It regulates voltage
// (vctrl, the reference of the domain's voltage regulator) and frequency
// (through the PLL control FSM) of one VF domain.
//
// Policy evaluation. In S_IDLE a timer runs for max(window, MIN_WINDOW)
// cycles while the external statistics counters accumulate (cnt_en). At the
// timeout the FSM enters S_EVAL and follows the policy flow chart:
//   - with PL enabled and the current point faster than the budget, step
//     down unless already at the lowest point;
//   - PN: hold the set point (a different set point is applied directly;
//     with PL it is limited to the budget point);
//   - PT: back-pressure count >= traffic threshold means "traffic";
//   - PB: "traffic" or idle count >= burst threshold ("long burst");
//   - traffic (or long burst): step down one point unless at the lowest;
//     otherwise step up one point unless at the highest point in budget
//     (the budget point with PL, the fastest point without).
// A software override, when enabled, replaces the local decision with its
// own operating point. Thresholds compare with ">=".
//
// VF transition. S_STEP_DOWN/S_STEP_UP lead to S_FREEZE, which freezes the
// accelerators through the clock gate. Going faster, the voltage is raised
// first (S_VOLT, a watchdog of VR_CYCLES cycles covering the regulator
// transient), then the frequency is changed (S_FREQ_REQ/S_FREQ_REL,
// four-phase req/ack with the PLL control FSM through synchronizers). Going
// slower, the frequency is lowered first and the voltage afterwards. S_RELEASE
// unfreezes, records the new point in cur_op and restarts the window, which
// is the configurable timeout after each transition. The order of voltage and
// frequency changes, the one-cycle decision states and the direct jump to a
// PN or override set point are this design's choices. The FSM runs on the
// ungated domain clock and never waits on a gated one, so it cannot deadlock
// while the accelerators are frozen.
module dvfs_fsm
  import dvfs_pkg::*;
#(
  parameter int unsigned VR_CYCLES = 64,        // VR transient watchdog
  parameter op_t         RESET_OP  = OP_FASTEST
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dvfs_cfg_t         cfg,
  // statistics counters
  input  logic [31:0]       idle_cnt,
  input  logic [31:0]       trf_cnt,
  output logic              cnt_clear,
  output logic              cnt_en,
  // PLL control FSM
  output logic              pll_req,
  output op_t               pll_target,
  input  logic              pll_ack,   // synchronized to clk
  // voltage regulator reference and clock gating
  output logic [VCTRL_W-1:0] vctrl,
  output logic              freeze,
  // status
  output op_t               cur_op,
  output dvfs_state_e       state,
  output logic [31:0]       last_idle,
  output logic [31:0]       last_traffic,
  output logic [31:0]       ntrans
);
  logic [31:0] timer;
  logic [31:0] eff_window;
  logic [$clog2(VR_CYCLES+1)-1:0] wd;
  logic        going_up;
  op_t         target;

  assign eff_window = (cfg.window < 32'(MIN_WINDOW)) ? 32'(MIN_WINDOW) : cfg.window;

  // Decision of the flow chart, evaluated in S_EVAL
  dvfs_state_e dec_state;
  op_t         dec_target;
  always_comb begin
    op_t  top;
    logic slow;
    op_t  setp;
    logic use_setp;
    top        = cfg.pl_en ? cfg.budget : OP_FASTEST;
    slow       = 1'b0;
    setp       = cur_op;
    use_setp   = 1'b0;
    dec_state  = S_IDLE;
    dec_target = cur_op;
    if (cfg.ovr_en) begin
      use_setp = 1'b1;
      setp     = cfg.ovr_op;
    end else if (cfg.pl_en && (cur_op < cfg.budget)) begin
      slow = 1'b1;                                   // budget not OK
    end else begin
      case (cfg.policy)
        POL_PT:  slow = (trf_cnt >= cfg.thr_traffic);
        POL_PB:  slow = (trf_cnt >= cfg.thr_traffic) || (idle_cnt >= cfg.thr_burst);
        default: begin
          use_setp = 1'b1;
          setp     = (cfg.pl_en && (cfg.pn_op < cfg.budget)) ? cfg.budget : cfg.pn_op;
        end
      endcase
    end
    if (use_setp) begin
      dec_target = setp;
      if (setp > cur_op)      dec_state = S_STEP_DOWN;
      else if (setp < cur_op) dec_state = S_STEP_UP;
    end else if (slow) begin
      if (cur_op != OP_SLOWEST) begin             // lowest VF?  No
        dec_state  = S_STEP_DOWN;
        dec_target = cur_op + 1'b1;
      end
    end else if (cur_op > top) begin              // highest VF in budget?  No
      dec_state  = S_STEP_UP;
      dec_target = cur_op - 1'b1;
    end
  end

  assign cnt_en     = (state == S_IDLE);
  assign cnt_clear  = (state == S_EVAL) || (state == S_RELEASE);
  assign pll_target = target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      timer        <= '0;
      wd           <= '0;
      going_up     <= 1'b0;
      target       <= RESET_OP;
      cur_op       <= RESET_OP;
      vctrl        <= op_vctrl(RESET_OP);
      freeze       <= 1'b0;
      pll_req      <= 1'b0;
      last_idle    <= '0;
      last_traffic <= '0;
      ntrans       <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (timer >= eff_window - 1) begin
            timer <= '0;
            state <= S_EVAL;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_EVAL: begin
          last_idle    <= idle_cnt;
          last_traffic <= trf_cnt;
          target       <= dec_target;
          state        <= dec_state;
        end
        S_STEP_DOWN: begin
          going_up <= 1'b0;
          freeze   <= 1'b1;
          state    <= S_FREEZE;
        end
        S_STEP_UP: begin
          going_up <= 1'b1;
          freeze   <= 1'b1;
          state    <= S_FREEZE;
        end
        S_FREEZE: begin
          if (going_up) begin
            vctrl <= op_vctrl(target);
            wd    <= '0;
            state <= S_VOLT;
          end else begin
            pll_req <= 1'b1;
            state   <= S_FREQ_REQ;
          end
        end
        S_VOLT: begin
          if (32'(wd) >= VR_CYCLES - 1) begin
            if (going_up) begin
              pll_req <= 1'b1;
              state   <= S_FREQ_REQ;
            end else begin
              state   <= S_RELEASE;
            end
          end else begin
            wd <= wd + 1'b1;
          end
        end
        S_FREQ_REQ: if (pll_ack) begin
          pll_req <= 1'b0;
          state   <= S_FREQ_REL;
        end
        S_FREQ_REL: if (!pll_ack) begin
          if (going_up) begin
            state <= S_RELEASE;
          end else begin
            vctrl <= op_vctrl(target);
            wd    <= '0;
            state <= S_VOLT;
          end
        end
        S_RELEASE: begin
          freeze <= 1'b0;
          cur_op <= target;
          ntrans <= ntrans + 1'b1;
          timer  <= '0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The request may only fall after an acknowledge, and the target must not
  // change while a request is pending.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) pll_req |-> $stable(target);
  endproperty
  a_req_stable: assert property (p_req_stable);
  a_freeze_during_req: assert property (@(posedge clk) disable iff (!rst_n) pll_req |-> freeze);
endmodule
