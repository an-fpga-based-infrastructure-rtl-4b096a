// tb_dvfs_fsm: drives the configuration and the two statistics counts of
// the DVFS FSM directly and answers its PLL requests after a random delay.
// A monitor measures, for every evaluation and transition, the window length
// (cycles in S_IDLE), the order of the frequency request and the vctrl
// change, the length of the regulator watchdog, and that freeze covers the
// whole transition. The scenarios walk the policy flow chart: PN hold, window
// clamp to 64, PT step-down to the lowest point and no further, PT step-up,
// PL budget limiting a step-up, budget violation forcing a step-down, PB on
// traffic and on long bursts, a PN set point and a software override.
module tb_dvfs_fsm;
  import dvfs_pkg::*;
  localparam int VR = 64;
  logic clk = 0, rst_n = 1;
  dvfs_cfg_t cfg;
  logic [31:0] idle_cnt = 0, trf_cnt = 0, last_idle, last_traffic, ntrans;
  logic cnt_clear, cnt_en, pll_req, pll_ack = 0, freeze;
  op_t pll_target, cur_op;
  logic [7:0] vctrl;
  dvfs_state_e state;
  int checks = 0, failures = 0;

  dvfs_fsm #(.VR_CYCLES(VR)) dut (.clk, .rst_n, .cfg, .idle_cnt, .trf_cnt, .cnt_clear, .cnt_en,
    .pll_req, .pll_target, .pll_ack, .vctrl, .freeze, .cur_op, .state, .last_idle,
    .last_traffic, .ntrans);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // PLL model: ack a random 3..20 cycles after req, drop it after req falls
  int ack_wait = 0;
  always @(posedge clk) begin
    if (pll_req && !pll_ack) begin
      if (ack_wait == 0) ack_wait = $urandom_range(3, 20);
      else if (--ack_wait == 0) pll_ack <= 1'b1;
    end else if (!pll_req) pll_ack <= 1'b0;
  end

  // monitor
  int cyc = 0, idle_run = 0, last_window = 0, volt_run = 0, last_volt = 0;
  int req_cyc = -1, vchg_cyc = -1, n_eval = 0;
  logic [7:0] vprev;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (state == S_IDLE) idle_run++;
    if (state == S_EVAL) begin last_window = idle_run; idle_run = 0; n_eval++; end
    if (state == S_VOLT) volt_run++; else if (volt_run != 0) begin last_volt = volt_run; volt_run = 0; end
    if (pll_req && !$past(pll_req)) req_cyc = cyc;
    if (vctrl != vprev) vchg_cyc = cyc;
    vprev = vctrl;
    if (state inside {S_VOLT, S_FREQ_REQ, S_FREQ_REL} && !freeze) begin
      failures++; $display("freeze low during transition at %0t", $time);
    end
  end

  // Wait for the next evaluation and its outcome.
  task automatic next_eval(output dvfs_state_e outcome);
    @(posedge clk iff state == S_EVAL);
    @(negedge clk);
    outcome = state;
  endtask

  task automatic expect_hold(input string what);
    dvfs_state_e o;
    op_t op_before;
    op_before = cur_op;
    next_eval(o);
    chk(o == S_IDLE && cur_op == op_before, {what, ": no transition"});
  endtask

  task automatic expect_step(input op_t to, input string what);
    dvfs_state_e o;
    op_t from;
    int n0;
    from = cur_op; n0 = ntrans;
    req_cyc = -1; vchg_cyc = -1;
    next_eval(o);
    chk(o == ((to > from) ? S_STEP_DOWN : S_STEP_UP), {what, ": decision state"});
    @(posedge clk iff state == S_RELEASE);
    @(negedge clk);
    chk(cur_op == to && ntrans == n0 + 1 && !freeze, {what, ": new operating point"});
    chk(vctrl == op_vctrl(to), {what, ": vctrl"});
    chk(last_volt == VR, {what, ": regulator watchdog length"});
    if (to > from) chk(req_cyc > 0 && vchg_cyc > req_cyc, {what, ": frequency lowered op_before voltage"});
    else           chk(vchg_cyc > 0 && req_cyc > vchg_cyc, {what, ": voltage raised op_before frequency"});
  endtask

  initial begin
    cfg = '0;
    cfg.policy = POL_PN; cfg.pn_op = 0; cfg.window = 32'd100;
    cfg.thr_traffic = 32'd50; cfg.thr_burst = 32'd80; cfg.budget = 0;
    vprev = 8'd100;
    #3 rst_n = 1;
    chk(cur_op == 0 && vctrl == 8'd100 && state == S_IDLE, "reset point");
    expect_hold("PN");
    expect_hold("PN");
    chk(last_window == 100, "window of 100 cycles");
    cfg.window = 32'd10;
    expect_hold("PN");
    expect_hold("PN");
    chk(last_window == 64, "window clamped to 64 cycles");
    chk(cnt_en == (state == S_IDLE), "counters enabled in idle");

    // PT, heavy traffic: step down to the lowest point, then hold
    cfg.policy = POL_PT; trf_cnt = 60;
    expect_step(1, "PT down 0->1");
    chk(last_window == 64, "window after transition");
    expect_step(2, "PT down 1->2");
    expect_step(3, "PT down 2->3");
    expect_hold("PT at lowest");
    chk(last_traffic == 60, "last traffic count latched");
    // PT, light traffic: step up
    trf_cnt = 49;
    expect_step(2, "PT up 3->2");
    // PL: budget 1 allows one more step up, then holds
    cfg.pl_en = 1; cfg.budget = 1;
    expect_step(1, "PL up 2->1");
    expect_hold("PL at budget");
    // budget lowered below the current point: step down despite no traffic
    cfg.budget = 3;
    expect_step(2, "PL budget violated 1->2");
    expect_step(3, "PL budget violated 2->3");
    cfg.pl_en = 0;
    // PB: long burst alone steps down, neither steps up
    cfg.policy = POL_PB; trf_cnt = 0; idle_cnt = 90;
    expect_hold("PB burst at lowest");
    idle_cnt = 10;
    expect_step(2, "PB up 3->2");
    idle_cnt = 80;
    expect_step(3, "PB long burst 2->3");
    idle_cnt = 0; trf_cnt = 70;
    expect_hold("PB traffic at lowest");
    // PN set point applied directly
    cfg.policy = POL_PN; cfg.pn_op = 1;
    expect_step(1, "PN set point 3->1");
    expect_hold("PN hold");
    // override wins over the local policy
    cfg.policy = POL_PT; trf_cnt = 1000;
    cfg.ovr_en = 1; cfg.ovr_op = 0;
    expect_step(0, "override 1->0");
    expect_hold("override hold");
    cfg.ovr_en = 0;
    expect_step(1, "PT after override 0->1");
    $display("evaluations %0d transitions %0d", n_eval, ntrans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
