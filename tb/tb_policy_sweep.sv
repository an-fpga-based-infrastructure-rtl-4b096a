// tb_policy_sweep: workload test of one VF domain at its default size (three
// accelerator tiles) over a sweep of DVFS policy settings, the way the
// prototype is used for design-space exploration. For every setting the same
// work is done: each tile runs its accelerator RUNS times on LEN words, with
// a memory tile that accepts a request flit only CONG_PCT percent of the
// time, so the network is congested and the accelerators often wait for
// data. The operating-point clocks are those of the FPGA (100, 90, 80 and
// 60 MHz).
//
// Per setting the DVFS probe gives the cycles C_i the domain spent powered at
// each operating point, and the testbench forms the energy estimate
// E = sum over tiles and points of E_i * C_i. The per-cycle energies are
// those of three accelerators characterised at the four points (a 2-D FFT,
// a filter and an image warp; units of 0.01 energy units per cycle). After
// the work is done, every accelerator is idle and the domain switches off,
// so the estimate stops growing.
//
// Settings: PN at each point; PT and PB with windows of 64, 256 and 1024
// cycles; PT and PB with a supervisor budget (PL). Window and threshold
// endpoints (window 64, traffic 32, burst 56 = 7/8 of the window) are those
// of the policy table. The intermediate thresholds are this testbench's
// choice: traffic threshold half the window, burst threshold 7/8 of it.
//
// Checks: every result word is correct; under PN all powered cycles are at
// the set point; PN3 is slower but uses less energy than PN0, and PN energy
// falls point by point; PT and PB with the 64-cycle window step down under
// congestion; with a budget (PL) the same policy uses less energy; under PL
// the domain leaves the points faster than the budget within a few windows;
// the probe's powered and switched-off cycles add up to the cycles of
// outclk. A table of time and energy, relative to PN0, is printed. Whether
// PT or PB saves energy against PN0 depends on how window and thresholds
// suit the traffic, so that is reported, not checked: with a 64-cycle
// window a transition (about 90 frozen cycles) outlasts the window.
module tb_policy_sweep;
  import dvfs_pkg::*;
  localparam int NT       = 3;
  localparam int RUNS     = 4;
  localparam int LEN      = 32;
  localparam int CPW      = 2;
  localparam int CONG_PCT = 20;
  localparam int NSET     = 12;

  // per-cycle energy (x100) of the accelerator of each tile at each point
  localparam int E100 [NT][4] = '{'{7519, 6492, 5676, 5583},
                                  '{2882, 2368, 1962, 1941},
                                  '{3601, 2998, 2579, 2550}};

  typedef struct {
    string       name;
    logic [31:0] policy;   // POLICY register value
    logic [31:0] window, thr_trf, thr_bst, budget;
  } setting_t;

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
  logic [NT-1:0] ctl_req, ctl_we, irq, acc_start, acc_done, acc_computing;
  logic [NT-1:0][3:0] ctl_addr;
  logic [NT-1:0][31:0] ctl_wdata, ctl_rdata;
  logic [NT-1:0][7:0][31:0] acc_cfg;
  logic [NT-1:0] rd_valid, rd_ready, wr_valid, wr_ready, out_valid, out_ready, in_valid, in_ready;
  logic [NT-1:0][31:0] rd_addr, wr_addr, out_data, in_data;
  logic [NT-1:0][14:0] rd_len, wr_len;
  logic [NT-1:0] noc_tx_valid, noc_tx_ready, noc_rx_valid, noc_rx_ready;
  logic [NT-1:0][FLIT_W-1:0] noc_tx_flit, noc_rx_flit;
  logic [NT-1:0] aprb_clear = '0, aprb_snapshot = '0;
  logic [NT-1:0][2:0] aprb_idx = '0;
  logic [NT-1:0][31:0] aprb_data, aprb_snap;
  int checks = 0, failures = 0;
  realtime half [4] = '{5.0, 5.5555, 6.25, 8.3333};

  dvfs_domain dut (.refclk, .clk_op, .clk_noc, .rst_n, .outclk, .clk_logic,
    .reg_req, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .vctrl, .fctrl, .fchange, .freeze,
    .vr_off, .cur_op, .dvfs_state, .dprb_clear, .dprb_snapshot, .dprb_idx, .dprb_data,
    .dprb_snap, .ctl_req, .ctl_we, .ctl_addr, .ctl_wdata, .ctl_rdata, .irq, .acc_start,
    .acc_done, .acc_computing, .acc_cfg, .rd_valid, .rd_ready, .rd_addr, .rd_len, .wr_valid,
    .wr_ready, .wr_addr, .wr_len, .out_valid, .out_ready, .out_data, .in_valid, .in_ready,
    .in_data, .noc_tx_valid, .noc_tx_ready, .noc_tx_flit, .noc_rx_valid, .noc_rx_ready,
    .noc_rx_flit, .aprb_clear, .aprb_snapshot, .aprb_idx, .aprb_data, .aprb_snap);

  always #(half[0]) clk_op[0] = ~clk_op[0];
  always #(half[1]) clk_op[1] = ~clk_op[1];
  always #(half[2]) clk_op[2] = ~clk_op[2];
  always #(half[3]) clk_op[3] = ~clk_op[3];
  always #10 refclk = ~refclk;
  always #5.2 clk_noc = ~clk_noc;
  initial #1 rst_n = 0;

  initial begin
    #40000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- per tile: accelerator, memory, software driver
  int runs [NT];
  int target = 0;                          // runs each tile must have done
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
    tb_noc_mem #(.READY_PCT(CONG_PCT)) mem (.clk(clk_noc), .rst_n,
      .req_valid(noc_tx_valid[t]), .req_ready(noc_tx_ready[t]), .req_flit(noc_tx_flit[t]),
      .rsp_valid(noc_rx_valid[t]), .rsp_ready(noc_rx_ready[t]), .rsp_flit(noc_rx_flit[t]));

    task automatic wr(input logic [3:0] a, input logic [31:0] d);
      @(negedge clk_logic); req = 1; we = 1; addr = a; wdata = d;
      @(negedge clk_logic); req = 0; we = 0;
    endtask

    initial begin
      logic [31:0] src, dst;
      runs[t] = 0;
      wait (rst_n);
      repeat (5) @(negedge clk_logic);
      wr(4'd2, 32'd1);                         // interrupt enable
      forever begin
        wait (runs[t] < target);
        src = 32'h0001_0000 + 32'(runs[t] * 64);
        dst = 32'h0008_0000 + 32'(runs[t] * 64);
        wr(4'd4, src); wr(4'd5, dst); wr(4'd6, 32'(LEN)); wr(4'd7, 32'(CPW));
        wr(4'd0, 32'd1);
        @(posedge clk_logic iff irq[t]);
        begin                                    // tx FIFO drains into memory
          int n;
          n = 0;
          while (!mem.mem.exists(dst + 32'(LEN - 1)) && n < 20000) begin
            @(posedge clk_noc); n++;
          end
          repeat (4) @(posedge clk_noc);
        end
        for (int i = 0; i < LEN; i++) begin
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

  // ---------------- DVFS register access from the testbench
  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge outclk); reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge outclk); reg_req = 0; reg_we = 0;
  endtask
  task automatic wait_point(input op_t op, input string what);
    int n = 0;
    while (!(cur_op == op && dvfs_state == S_IDLE) && n < 20000) begin
      @(posedge outclk); n++;
    end
    chk(cur_op == op, what);
  endtask

  int outclk_cycles = 0;
  bit counting = 0;
  always @(posedge outclk) if (counting) outclk_cycles++;


  // cycles counted from the probe clear until the domain first left the
  // points faster than the budget (PL settings)
  int above_budget = 0;
  op_t budget_op = 2'd0;
  always @(posedge outclk) if (counting && cur_op < budget_op) above_budget++;

  setting_t set [NSET];
  longint   energy [NSET];
  realtime  dur [NSET];
  longint   cyc [NSET][4];

  initial begin
    set[0]  = '{"pn0",        32'h00, 32'd64,   32'd32,  32'd56,   32'd0};
    set[1]  = '{"pn1",        32'h10, 32'd64,   32'd32,  32'd56,   32'd0};
    set[2]  = '{"pn2",        32'h20, 32'd64,   32'd32,  32'd56,   32'd0};
    set[3]  = '{"pn3",        32'h30, 32'd64,   32'd32,  32'd56,   32'd0};
    set[4]  = '{"pt w64",     32'h01, 32'd64,   32'd32,  32'd56,   32'd0};
    set[5]  = '{"pt w256",    32'h01, 32'd256,  32'd128, 32'd224,  32'd0};
    set[6]  = '{"pt w1024",   32'h01, 32'd1024, 32'd512, 32'd896,  32'd0};
    set[7]  = '{"pb w64",     32'h02, 32'd64,   32'd32,  32'd56,   32'd0};
    set[8]  = '{"pb w256",    32'h02, 32'd256,  32'd128, 32'd224,  32'd0};
    set[9]  = '{"pb w1024",   32'h02, 32'd1024, 32'd512, 32'd896,  32'd0};
    set[10] = '{"pt w64 +pl", 32'h05, 32'd64,   32'd32,  32'd56,   32'd2};
    set[11] = '{"pb w64 +pl", 32'h06, 32'd64,   32'd32,  32'd56,   32'd1};
  end

  initial begin
    #40 rst_n = 1;
    wait_point(2'd0, "start at the fastest point");
    for (int s = 0; s < NSET; s++) begin
      realtime t0;
      longint sum;
      logic [31:0] c [6];
      bit is_pn;
      op_t p;
      is_pn = (set[s].policy[1:0] == 2'd0);
      p = op_t'(set[s].policy[5:4]);
      // start every setting from the same state: PN, 64-cycle window
      wr(A_WINDOW, 32'd64);
      wr(A_BUDGET, 32'd0);
      wr(A_POLICY, is_pn ? set[s].policy : 32'h00);
      wait_point(is_pn ? p : 2'd0, {set[s].name, ": initial point"});
      wr(A_THR_TRF, set[s].thr_trf);
      wr(A_THR_BST, set[s].thr_bst);
      wr(A_WINDOW, set[s].window);
      wr(A_BUDGET, set[s].budget);
      wr(A_POLICY, set[s].policy);
      // clear the probe and release the work
      @(negedge outclk); dprb_clear = 1; @(negedge outclk); dprb_clear = 0;
      outclk_cycles = 0; above_budget = 0; budget_op = op_t'(set[s].budget);
      counting = 1;
      t0 = $realtime;
      target += RUNS;
      for (int t = 0; t < NT; t++) begin
        int n;
        n = 0;
        while (runs[t] < target && n < 400000) begin @(posedge outclk); n++; end
        chk(runs[t] >= target, {set[s].name, ": work completed"});
      end
      dur[s] = $realtime - t0;
      // every accelerator idle: the domain switches off and energy stops
      repeat (20) @(posedge outclk);
      chk(vr_off, {set[s].name, ": domain off after the work"});
      counting = 0;
      @(negedge outclk); dprb_snapshot = 1; @(negedge outclk); dprb_snapshot = 0;
      sum = 0;
      for (int i = 0; i < 6; i++) begin
        dprb_idx = 3'(i); #0.1 c[i] = dprb_snap;
      end
      for (int i = 0; i < 4; i++) begin cyc[s][i] = c[i]; sum += c[i]; end
      sum += c[5];
      chk(sum + 4 >= longint'(outclk_cycles) && sum <= longint'(outclk_cycles) + 4,
          {set[s].name, ": powered and off cycles add up"});
      energy[s] = 0;
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < 4; i++) energy[s] += longint'(E100[t][i]) * longint'(c[i]);
      if (is_pn)
        chk(longint'(c[p]) == sum - longint'(c[5]), {set[s].name, ": all powered cycles at the set point"});
      if (set[s].budget != 0)
        chk(above_budget < 4 * 64 + 400, {set[s].name, ": budget reached within a few windows"});
    end

    // relations between settings
    chk(dur[3] > dur[0], "pn3 takes longer than pn0");
    chk(energy[3] < energy[0], "pn3 uses less energy than pn0");
    chk(energy[1] < energy[0] && energy[2] < energy[1], "pn energy falls with the point");
    for (int s = 4; s < NSET; s++)
      if (set[s].window == 64)
        chk(cyc[s][1] + cyc[s][2] + cyc[s][3] > 0, {set[s].name, ": stepped down under congestion"});
    chk(energy[10] < energy[4], "pt w64: the budget saves energy");
    chk(energy[11] < energy[7], "pb w64: the budget saves energy");

    $display("setting      time(us)  time/pn0  energy/pn0   C0      C1      C2      C3");
    for (int s = 0; s < NSET; s++)
      $display("%-11s %9.2f %9.3f %10.3f %7d %7d %7d %7d", set[s].name, dur[s] / 1000.0,
               dur[s] / dur[0], real'(energy[s]) / real'(energy[0]),
               cyc[s][0], cyc[s][1], cyc[s][2], cyc[s][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
