// dvfs_pkg: types and constants shared by the DVFS controller and the
// accelerator tile.
//
// Operating points follow the four VF pairs of the policy table: index 0 is
// the fastest (1.0 V, 1.0 GHz on silicon, 100 MHz on the FPGA prototype) and
// index 3 the slowest (0.75 V, 0.6 GHz, 60 MHz on FPGA). "Step down" means a
// larger index. The voltage code driven on vctrl is the voltage in 10 mV
// units (a choice of this design; the DAC behind it is not specified).
// Register addresses, field layouts and the flit format are this design's
// own choices.
package dvfs_pkg;

  localparam int unsigned N_OP = 4;
  typedef logic [1:0] op_t;
  localparam op_t OP_FASTEST = 2'd0;
  localparam op_t OP_SLOWEST = 2'd3;

  // vctrl code per operating point, in 10 mV units: 1.00, 0.90, 0.80, 0.75 V
  localparam int unsigned VCTRL_W = 8;
  function automatic logic [VCTRL_W-1:0] op_vctrl(op_t op);
    case (op)
      2'd0:    return 8'd100;
      2'd1:    return 8'd90;
      2'd2:    return 8'd80;
      default: return 8'd75;
    endcase
  endfunction

  // Local DVFS policies (PL is a separate enable bit on top of these)
  typedef enum logic [1:0] {
    POL_PN = 2'd0,   // none: hold a fixed operating point
    POL_PT = 2'd1,   // traffic: back-pressure cycles against a threshold
    POL_PB = 2'd2    // burst: traffic or long idle (communication) bursts
  } policy_e;

  // Controller states; the first five carry the names of the flow chart
  typedef enum logic [3:0] {
    S_IDLE      = 4'd0,  // window timer running, counters accumulating
    S_EVAL      = 4'd1,  // timeout reached: evaluate policy
    S_STEP_DOWN = 4'd2,  // decided to move to a slower point
    S_STEP_UP   = 4'd3,  // decided to move to a faster point
    S_FREEZE    = 4'd4,  // clock to the accelerators gated
    S_VOLT      = 4'd5,  // new vctrl applied, VR watchdog running
    S_FREQ_REQ  = 4'd6,  // PLL request raised, waiting for ack
    S_FREQ_REL  = 4'd7,  // PLL request dropped, waiting for ack to drop
    S_RELEASE   = 4'd8   // unfreeze, restart the window
  } dvfs_state_e;

  // Configuration seen by the FSM (written through dvfs_regs)
  typedef struct packed {
    policy_e     policy;
    logic        pl_en;       // policy "limit" on top of the local policy
    op_t         pn_op;       // operating point held by policy PN
    logic        ovr_en;      // software override of local decisions
    op_t         ovr_op;
    op_t         budget;      // fastest point the supervisor allows (PL)
    logic [31:0] window;      // evaluation period in cycles (>= 64)
    logic [31:0] thr_traffic; // back-pressure cycles per window
    logic [31:0] thr_burst;   // idle (non-computing) cycles per window
  } dvfs_cfg_t;

  // DVFS register map (word addresses on the register bus)
  localparam int unsigned REG_AW = 4;
  localparam logic [REG_AW-1:0] A_STATUS   = 4'h0;  // RO
  localparam logic [REG_AW-1:0] A_OVERRIDE = 4'h1;  // [0] en, [5:4] op
  localparam logic [REG_AW-1:0] A_POLICY   = 4'h2;  // [1:0] policy, [2] PL, [5:4] PN op
  localparam logic [REG_AW-1:0] A_THR_TRF  = 4'h3;
  localparam logic [REG_AW-1:0] A_THR_BST  = 4'h4;
  localparam logic [REG_AW-1:0] A_WINDOW   = 4'h5;
  localparam logic [REG_AW-1:0] A_BUDGET   = 4'h6;  // [1:0]
  localparam logic [REG_AW-1:0] A_IDLE_CNT = 4'h7;  // RO, last window
  localparam logic [REG_AW-1:0] A_TRF_CNT  = 4'h8;  // RO, last window
  localparam logic [REG_AW-1:0] A_NTRANS   = 4'h9;  // RO, VF transitions done

  localparam int unsigned MIN_WINDOW = 64;

  // NoC flits: 2-bit type + 32-bit payload
  localparam int unsigned FLIT_W = 34;
  typedef enum logic [1:0] {
    FL_BODY = 2'b00,
    FL_HEAD = 2'b01,
    FL_TAIL = 2'b10,
    FL_HT   = 2'b11   // single-flit packet
  } flit_type_e;

endpackage
