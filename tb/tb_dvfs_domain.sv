// tb_dvfs_domain: end-to-end test of one VF domain at its default size
// (three accelerator tiles), with the FPGA clocking: operating-point clocks
// of 100, 90, 80 and 60 MHz, a 50 MHz reference and a 100 MHz NoC clock.
// Each tile has an accelerator model (tb_acc_model) that is started again
// through its CTRL registers every time its interrupt fires, and its own
// memory-tile model (tb_noc_mem) whose acceptance rate sets the congestion.
// Every finished run is checked word by word in memory.
//
// The DVFS controller is driven through its registers through these phases:
//   congestion + PT   -> step-downs to the lowest point
//   free network + PT -> step-ups to the fastest point
//   slow compute + PB -> step-downs on long bursts
//   PL with budget 2  -> climbs only to the budget point and holds there
//   override to 3     -> software decision wins
//   PN at point 0     -> back to the fastest point
//   all tiles paused  -> the domain asks to be switched off, and on again
//                        when software restarts the accelerators
// Mechanisms counted (each must happen at least once): step-down, step-up,
// clock freeze with clk_logic stopped, NoC back-pressure, dual-clock FIFO
// full, a transition held by the budget, override, interrupts, cycles at
// every operating point, cycles switched off. At the end the DVFS probe's
// per-point and switched-off cycle counts must add up to the cycles of
// outclk, and its switched-off count must match the testbench's own.
module tb_dvfs_domain;
  import dvfs_pkg::*;
  localparam int NT = 3;
  logic refclk = 0, clk_noc = 0, rst_n = 1;
  logic [3:0] clk_op = '0;
  logic outclk, clk_logic;
  logic reg_req = 0, reg_we = 0;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [7:0] vctrl;
  op_t fctrl, cur_op;
  logic fchange, freeze, vr_off;
  dvfs_state_e dvfs_state;
  logic dprb_clear = 0, dprb_snapshot = 0;
  logic [2:0] dprb_idx = '0;
  logic [31:0] dprb_data, dprb_snap;
  wire  [NT-1:0] ctl_req, ctl_we;
  wire  [NT-1:0][3:0] ctl_addr;
  wire  [NT-1:0][31:0] ctl_wdata;
  logic [NT-1:0][31:0] ctl_rdata;
  logic [NT-1:0] irq, acc_start;
  wire  [NT-1:0] acc_done, acc_computing;
  logic [NT-1:0][7:0][31:0] acc_cfg;
  wire  [NT-1:0] rd_valid, wr_valid, out_valid, in_ready;
  logic [NT-1:0] rd_ready, wr_ready, out_ready, in_valid;
  wire  [NT-1:0][31:0] rd_addr, wr_addr, out_data;
  wire  [NT-1:0][14:0] rd_len, wr_len;
  logic [NT-1:0][31:0] in_data;
  logic [NT-1:0] noc_tx_valid, noc_rx_ready;
  wire  [NT-1:0] noc_tx_ready, noc_rx_valid;
  logic [NT-1:0][FLIT_W-1:0] noc_tx_flit;
  wire  [NT-1:0][FLIT_W-1:0] noc_rx_flit;
  logic [NT-1:0] aprb_clear = '0, aprb_snapshot = '0;
  logic [NT-1:0][2:0] aprb_idx = '0;
  logic [NT-1:0][31:0] aprb_data, aprb_snap;
  int checks = 0, failures = 0;
  realtime half [4] = '{5.0, 5.5555, 6.25, 8.3333};
  int ready_pct = 100, cpw = 1;
  bit pause = 0;                       // software holds every restart

  dvfs_domain dut (.refclk, .clk_op, .clk_noc, .rst_n, .outclk, .clk_logic,
    .reg_req, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .vctrl, .fctrl, .fchange, .freeze, .vr_off,
    .cur_op, .dvfs_state, .dprb_clear, .dprb_snapshot, .dprb_idx, .dprb_data, .dprb_snap,
    .ctl_req, .ctl_we, .ctl_addr, .ctl_wdata, .ctl_rdata, .irq, .acc_start, .acc_done,
    .acc_computing, .acc_cfg, .rd_valid, .rd_ready, .rd_addr, .rd_len, .wr_valid, .wr_ready,
    .wr_addr, .wr_len, .out_valid, .out_ready, .out_data, .in_valid, .in_ready, .in_data,
    .noc_tx_valid, .noc_tx_ready, .noc_tx_flit, .noc_rx_valid, .noc_rx_ready, .noc_rx_flit,
    .aprb_clear, .aprb_snapshot, .aprb_idx, .aprb_data, .aprb_snap);

  always #(half[0]) clk_op[0] = ~clk_op[0];
  always #(half[1]) clk_op[1] = ~clk_op[1];
  always #(half[2]) clk_op[2] = ~clk_op[2];
  always #(half[3]) clk_op[3] = ~clk_op[3];
  always #10 refclk = ~refclk;
  always #5.2 clk_noc = ~clk_noc;
  initial #1 rst_n = 0;

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- per tile: accelerator, memory, driver, checker
  int runs [NT];
  int n_bp = 0, n_fifo_full = 0;
  for (genvar t = 0; t < NT; t++) begin : g_t
    logic        req = 0, we = 0;
    logic [3:0]  addr = '0;
    logic [31:0] wdata = '0;
    assign ctl_req[t] = req; assign ctl_we[t] = we;
    assign ctl_addr[t] = addr; assign ctl_wdata[t] = wdata;

    tb_acc_model acc (.clk(clk_logic), .start(acc_start[t]), .done(acc_done[t]),
      .computing(acc_computing[t]), .src(acc_cfg[t][0]), .dst(acc_cfg[t][1]),
      .len(acc_cfg[t][2]), .cpw(acc_cfg[t][3]),
      .rd_valid(rd_valid[t]), .rd_ready(rd_ready[t]), .rd_addr(rd_addr[t]), .rd_len(rd_len[t]),
      .wr_valid(wr_valid[t]), .wr_ready(wr_ready[t]), .wr_addr(wr_addr[t]), .wr_len(wr_len[t]),
      .out_valid(out_valid[t]), .out_ready(out_ready[t]), .out_data(out_data[t]),
      .in_valid(in_valid[t]), .in_ready(in_ready[t]), .in_data(in_data[t]));
    tb_noc_mem #(.READY_PCT(100)) mem (.clk(clk_noc), .rst_n,
      .req_valid(noc_tx_valid[t]), .req_ready(noc_tx_ready[t]), .req_flit(noc_tx_flit[t]),
      .rsp_valid(noc_rx_valid[t]), .rsp_ready(noc_rx_ready[t]), .rsp_flit(noc_rx_flit[t]));
    always @(ready_pct) mem.ready_pct = ready_pct;

    task automatic wr(input logic [3:0] a, input logic [31:0] d);
      @(negedge clk_logic); req = 1; we = 1; addr = a; wdata = d;
      @(negedge clk_logic); req = 0; we = 0;
    endtask

    initial begin
      logic [31:0] src, dst, len;
      runs[t] = 0;
      wait (rst_n);
      repeat (5) @(negedge clk_logic);
      wr(4'd2, 32'd1);                         // interrupt enable
      forever begin
        src = 32'h1000 * (t + 1) + 32'(runs[t] * 64);
        dst = 32'h8000 * (t + 1) + 32'(runs[t] * 64);
        len = 32'd8 + 32'(4 * t);
        wr(4'd4, src); wr(4'd5, dst); wr(4'd6, len); wr(4'd7, 32'(cpw));
        wait (!pause);
        wr(4'd0, 32'd1);
        @(posedge clk_logic iff irq[t]);
        repeat (60) @(posedge clk_noc);          // tx FIFO drains into memory
        for (int i = 0; i < int'(len); i++) begin
          checks++;
          if (!mem.mem.exists(dst + 32'(i)) ||
              mem.mem[dst + 32'(i)] != mem.init_word(src + 32'(i)) + 1) begin
            failures++; $display("tile %0d run %0d word %0d wrong", t, runs[t], i);
          end
        end
        wr(4'd1, 32'd2);                         // clear done / irq
        runs[t]++;
      end
    end
  end

  // ---------------- mechanism counters
  int n_down = 0, n_up = 0, n_frozen_edges = 0, n_freeze = 0, n_budget_hold = 0;
  int n_override = 0, n_at [4] = '{0, 0, 0, 0}, outclk_cycles = 0, n_off = 0;
  logic freeze_d = 0;
  bit counting = 0;
  always @(posedge outclk) if (rst_n) begin
    if (dvfs_state == S_STEP_DOWN) n_down++;
    if (dvfs_state == S_STEP_UP) n_up++;
    if (freeze && !freeze_d) n_freeze++;
    freeze_d <= freeze;
    n_at[cur_op]++;
    if (|dut.g_tile[0].u_tile.noc_bp || |dut.g_tile[1].u_tile.noc_bp || |dut.g_tile[2].u_tile.noc_bp) n_bp++;
    if (counting) outclk_cycles++;
    if (counting && vr_off) n_off++;
  end
  always @(posedge clk_logic) if (freeze_d && freeze) n_frozen_edges++;
  always @(posedge clk_logic) begin
    if (!dut.g_tile[0].u_tile.u_tx_fifo.wready || !dut.g_tile[1].u_tile.u_tx_fifo.wready ||
        !dut.g_tile[2].u_tile.u_tx_fifo.wready) n_fifo_full++;
  end

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge outclk); reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge outclk); reg_req = 0; reg_we = 0;
  endtask
  task automatic rd_status_off(input logic exp);
    @(negedge outclk); reg_req = 1; reg_we = 0; reg_addr = A_STATUS;
    #0.1 chk(reg_rdata[16] == exp, "STATUS shows the switch-off state");
    reg_req = 0;
  endtask
  task automatic wait_point(input op_t op, input int max_cycles, input string what);
    int n = 0;
    while (!(cur_op == op && dvfs_state == S_IDLE) && n < max_cycles) begin
      @(posedge outclk); n++;
    end
    chk(cur_op == op && vctrl == op_vctrl(op) && fctrl == op, what);
  endtask

  initial begin
    int irq_total;
    #40 rst_n = 1;
    wait_point(2'd0, 2000, "start at the fastest point");
    @(negedge outclk); dprb_clear = 1; @(negedge outclk); dprb_clear = 0;
    counting = 1;
    // congestion with policy PT, 64-cycle window
    ready_pct = 15;
    wr(A_WINDOW, 32'd64);
    wr(A_THR_TRF, 32'd16);
    wr(A_POLICY, 32'd1);
    wait_point(2'd3, 20000, "PT: congestion drives the domain to the lowest point");
    // free network: back up
    ready_pct = 100;
    wr(A_THR_TRF, 32'd48);
    wait_point(2'd0, 20000, "PT: free network brings it back to the fastest point");
    // slow computation with PB: long idle bursts
    cpw = 40;
    wr(A_THR_BST, 32'd56);
    wr(A_POLICY, 32'd2);
    wait_point(2'd3, 40000, "PB: long bursts drive it down");
    // PL with budget 2 and no congestion, fast compute
    cpw = 0;
    wr(A_THR_BST, 32'd65);   // more than a window: bursts never count
    wr(A_BUDGET, 32'd2);
    wr(A_POLICY, 32'd5);     // PT + PL
    wait_point(2'd2, 40000, "PL: climbs to the budget point");
    repeat (500) @(posedge outclk);
    chk(cur_op == 2'd2, "PL: holds at the budget point");
    n_budget_hold = (cur_op == 2'd2) ? 1 : 0;
    // software override
    wr(A_OVERRIDE, 32'h31);
    wait_point(2'd3, 20000, "override applied");
    n_override = (cur_op == 2'd3) ? 1 : 0;
    repeat (300) @(posedge outclk);
    wr(A_OVERRIDE, 32'h0);
    wr(A_POLICY, 32'd0);
    wait_point(2'd0, 20000, "PN returns to the fastest point");
    // no accelerator enabled: the domain asks to be switched off
    pause = 1;
    begin
      int n = 0;
      while (!vr_off && n < 40000) begin @(posedge outclk); n++; end
      chk(vr_off, "domain switched off once every accelerator is done");
      repeat (300) @(posedge outclk);
      chk(vr_off, "domain stays off while nothing is enabled");
      rd_status_off(1'b1);
      pause = 0;
      n = 0;
      while (vr_off && n < 200) begin @(posedge outclk); n++; end
      chk(!vr_off, "domain switched on when an accelerator is started");
    end
    // let every tile finish at least one more run
    begin
      int r0 [NT];
      for (int t = 0; t < NT; t++) r0[t] = runs[t];
      for (int t = 0; t < NT; t++) begin
        int n;
        n = 0;
        while (runs[t] == r0[t] && n < 20000) begin @(posedge outclk); n++; end
        chk(runs[t] > r0[t], "tile keeps running after the transitions");
      end
    end
    // DVFS probe: per-point cycles add up to all cycles since the clear
    counting = 0;
    @(negedge outclk); dprb_snapshot = 1; @(negedge outclk); dprb_snapshot = 0;
    begin
      longint sum = 0;
      for (int i = 0; i < 4; i++) begin
        dprb_idx = 3'(i); #0.1;
        sum += dprb_snap;
        $display("cycles at point %0d: %0d", i, dprb_snap);
      end
      dprb_idx = 3'd5; #0.1;
      sum += dprb_snap;
      $display("cycles switched off: %0d (testbench count %0d)", dprb_snap, n_off);
      chk(n_off >= 300 && int'(dprb_snap) + 4 >= n_off && int'(dprb_snap) <= n_off + 4,
          "switched-off cycles counted");
      chk(sum + 4 >= longint'(outclk_cycles) && sum <= longint'(outclk_cycles) + 4,
          "DVFS probe cycles add up");
      // counter 4: frozen cycles; each transition must stay short
      dprb_idx = 3'd4; #0.1;
      $display("frozen cycles %0d over %0d freezes", dprb_snap, n_freeze);
      chk(n_freeze > 0 && dprb_snap / n_freeze >= 64 && dprb_snap / n_freeze < 200,
          "frozen time per transition covers the watchdog and stays bounded");
    end
    irq_total = runs[0] + runs[1] + runs[2];
    $display("runs %0d %0d %0d, step-downs %0d, step-ups %0d, freezes %0d",
             runs[0], runs[1], runs[2], n_down, n_up, n_freeze);
    $display("back-pressure cycles %0d, FIFO-full cycles %0d, cycles per point %0d %0d %0d %0d",
             n_bp, n_fifo_full, n_at[0], n_at[1], n_at[2], n_at[3]);
    chk(n_down > 0, "step-down happened");
    chk(n_up > 0, "step-up happened");
    chk(n_freeze > 0 && n_frozen_edges == 0, "freeze happened and stopped clk_logic");
    chk(n_bp > 0, "NoC back-pressure happened");
    chk(n_fifo_full > 0, "dual-clock FIFO filled up");
    chk(n_budget_hold > 0, "budget limit held a step-up");
    chk(n_override > 0, "override happened");
    chk(irq_total >= 2 * NT, "interrupts from every tile");
    for (int i = 0; i < 4; i++) chk(n_at[i] > 0, "time spent at every operating point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
