// tb_dvfs_ctrl: the whole DVFS controller with real clocks: four
// operating-point clocks (100, 90, 80, 60 MHz, as on the FPGA prototype) and
// a 50 MHz reference. Through the register bus it selects policy PT with a
// 64-cycle window and drives the back-pressure probe high, so the domain must
// step down point by point to 60 MHz; the period of outclk is measured at
// each point and vctrl checked. Clearing back-pressure steps back up; PL
// with a budget stops the climb; an override jumps straight to a point. It
// checks that clk_logic stops while frozen, that idle and traffic counts of
// the last window are readable, and that the DVFS probe counted cycles at
// each point and while frozen. With no accelerator enabled the domain must
// request switch-off (vr_off, STATUS bit 16, probe counter 5); enabling one
// must turn it on within a cycle.
module tb_dvfs_ctrl;
  import dvfs_pkg::*;
  logic refclk = 0, rst_n = 1;
  logic [3:0] clk_op = '0;
  logic outclk, clk_logic;
  logic reg_req = 0, reg_we = 0;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [2:0] acc_idle = '0, acc_en = '0, noc_bp = '0;
  logic [7:0] vctrl;
  op_t fctrl, cur_op;
  logic fchange, freeze, vr_off;
  dvfs_state_e state;
  logic prb_clear = 0, prb_snapshot = 0;
  logic [2:0] prb_idx = '0;
  logic [31:0] prb_data, prb_snap;
  int checks = 0, failures = 0;
  realtime half [4] = '{5.0, 5.5555, 6.25, 8.3333};

  dvfs_ctrl #(.N_ACC(3)) dut (.refclk, .rst_n, .clk_op, .outclk, .clk_logic, .reg_req, .reg_we,
    .reg_addr, .reg_wdata, .reg_rdata, .acc_idle, .acc_en, .noc_bp, .vctrl, .fctrl, .fchange,
    .freeze, .vr_off, .cur_op, .state, .prb_clear, .prb_snapshot, .prb_idx, .prb_data, .prb_snap);

  always #(half[0]) clk_op[0] = ~clk_op[0];
  always #(half[1]) clk_op[1] = ~clk_op[1];
  always #(half[2]) clk_op[2] = ~clk_op[2];
  always #(half[3]) clk_op[3] = ~clk_op[3];
  always #10 refclk = ~refclk;
  initial #1 rst_n = 0;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge outclk); reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge outclk); reg_req = 0; reg_we = 0;
  endtask
  task automatic rd(input logic [REG_AW-1:0] a, output logic [31:0] d);
    @(negedge outclk); reg_req = 1; reg_we = 0; reg_addr = a; #0.1 d = reg_rdata;
    reg_req = 0;
  endtask
  task automatic check_period(input op_t op, input string what);
    realtime t0, t1;
    @(posedge outclk); t0 = $realtime;
    @(posedge outclk); t1 = $realtime;
    chk((t1 - t0) > 2 * half[op] - 0.01 && (t1 - t0) < 2 * half[op] + 0.01, what);
  endtask
  task automatic wait_point(input op_t op, input string what);
    int n = 0;
    while (!(cur_op == op && state == S_IDLE) && n < 20000) begin
      @(posedge outclk);
      n++;
    end
    chk(cur_op == op, {what, ": reached"});
    chk(vctrl == op_vctrl(op) && fctrl == op, {what, ": vctrl and fctrl"});
    check_period(op, {what, ": outclk period"});
  endtask

  // clk_logic must not toggle while freeze is high for a whole cycle
  int frozen_edges = 0, freeze_cycles = 0;
  logic freeze_d = 0;
  always @(posedge outclk) begin
    if (freeze_d && freeze) freeze_cycles++;
    freeze_d <= freeze;
  end
  always @(posedge clk_logic) if (freeze_d && freeze) frozen_edges++;

  initial begin
    logic [31:0] d;
    #30 rst_n = 1;
    wait_point(2'd0, "after reset");
    chk(vr_off, "off while no accelerator is enabled");
    rd(A_STATUS, d);
    chk(d[16], "status shows off");
    @(negedge outclk); acc_en = 3'b100;
    @(posedge outclk); #0.1;
    chk(!vr_off, "on one cycle after an accelerator is enabled");
    wr(A_WINDOW, 32'd64);
    wr(A_THR_TRF, 32'd32);
    wr(A_POLICY, 32'd1);              // PT
    noc_bp = 3'b010;
    wait_point(2'd1, "PT step 1");
    wait_point(2'd2, "PT step 2");
    wait_point(2'd3, "PT step 3");
    rd(A_TRF_CNT, d);
    chk(d == 32'd64, "traffic count of last window");
    noc_bp = 3'b000; acc_idle = 3'b100;
    wait_point(2'd0, "PT back up");
    rd(A_IDLE_CNT, d);
    chk(d == 32'd64, "idle count of last window");
    wr(A_BUDGET, 32'd2);
    wr(A_POLICY, 32'd5);              // PT + PL
    wait_point(2'd2, "PL budget forces down");
    repeat (300) @(posedge outclk);
    chk(cur_op == 2'd2, "PL holds at budget");
    wr(A_OVERRIDE, 32'h11);           // override to point 1
    wait_point(2'd1, "override");
    rd(A_STATUS, d);
    chk(d[1:0] == 2'd1 && d[15:8] == 8'd90, "status register");
    rd(A_NTRANS, d);
    chk(d >= 32'd8, "transition count");
    chk(frozen_edges == 0 && freeze_cycles > 0, "clk_logic stopped while frozen");
    // DVFS probe: cycles at every point and frozen cycles
    @(negedge outclk); prb_snapshot = 1; @(negedge outclk); prb_snapshot = 0;
    for (int i = 0; i < 6; i++) begin
      prb_idx = 3'(i); #0.1;
      chk(prb_snap > 0, "DVFS probe counter nonzero");
    end
    prb_idx = 3'd4; #0.1;
    chk(prb_snap >= 32'(freeze_cycles), "frozen cycles counted");
    // switching off: counter 5 runs, the per-point counter stops
    @(negedge outclk); acc_en = 3'b000;
    @(posedge outclk); #0.1;
    chk(vr_off, "off one cycle after the last accelerator is disabled");
    repeat (2) @(negedge outclk);
    prb_snapshot = 1; @(negedge outclk); prb_snapshot = 0;
    prb_idx = 3'd1; #0.1; d = prb_snap;
    repeat (50) @(negedge outclk);
    prb_snapshot = 1; @(negedge outclk); prb_snapshot = 0;
    #0.1 chk(prb_snap == d, "no cycles counted at a point while off");
    prb_idx = 3'd5; #0.1; d = prb_snap;
    chk(d >= 32'd50, "off cycles counted");
    $display("frozen cycles %0d, off cycles %0d", freeze_cycles, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
