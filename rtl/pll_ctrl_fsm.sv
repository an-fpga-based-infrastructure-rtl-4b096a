// pll_ctrl_fsm: PLL control FSM of the DVFS controller. It runs on the
// external reference clock, so it keeps working while the domain clock it
// configures is changing frequency.
//
// Handshake with the DVFS FSM (four-phase, level based): the DVFS FSM puts the
// requested operating point on target and raises req; target stays stable
// while req is high. req arrives here already synchronized to refclk. The FSM
// then loads target into fctrl (the frequency control of the clock source),
// pulses fchange for one refclk cycle, waits SETTLE refclk cycles so that the
// synchronized lock reflects the new setting, waits for lock, and raises ack.
// When req falls it drops ack and is ready for the next request.
//
// On the FPGA prototype fctrl drives the select of a glitch-free clock
// multiplexer and lock is that multiplexer's lock output; with a
// reconfigurable PLL the same ports would drive its configuration pins.
// lock is synchronized internally. The settle time and the state encoding
// are this design's choices.
module pll_ctrl_fsm
  import dvfs_pkg::*;
#(
  parameter int unsigned SETTLE   = 3,
  parameter op_t         RESET_OP = OP_FASTEST
) (
  input  logic refclk,
  input  logic rst_n,
  input  logic req,       // synchronized to refclk
  input  op_t  target,    // bundled with req
  input  logic lock,      // asynchronous
  output op_t  fctrl,
  output logic fchange,
  output logic ack
);
  typedef enum logic [1:0] {P_IDLE, P_SETTLE, P_LOCK, P_ACK} pstate_e;
  pstate_e st;
  logic lock_s;
  logic [$clog2(SETTLE+1)-1:0] cnt;

  sync_2ff u_sync_lock (.clk(refclk), .rst_n(rst_n), .d(lock), .q(lock_s));

  always_ff @(posedge refclk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P_IDLE;
      fctrl   <= RESET_OP;
      fchange <= 1'b0;
      ack     <= 1'b0;
      cnt     <= '0;
    end else begin
      fchange <= 1'b0;
      case (st)
        P_IDLE: if (req) begin
          fctrl   <= target;
          fchange <= 1'b1;
          cnt     <= '0;
          st      <= P_SETTLE;
        end
        P_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == SETTLE - 1) st <= P_LOCK;
        end
        P_LOCK: if (lock_s) begin
          ack <= 1'b1;
          st  <= P_ACK;
        end
        P_ACK: if (!req) begin
          ack <= 1'b0;
          st  <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
