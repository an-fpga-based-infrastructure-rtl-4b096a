// tb_dvfs_regs: checks reset values, writes and read-back of every writable
// DVFS register, the decoded configuration fields, the read-only status and
// counter registers, that read-only addresses ignore writes, and that the
// unused policy encoding falls back to PN.
module tb_dvfs_regs;
  import dvfs_pkg::*;
  logic clk = 0, rst_n = 1, req = 0, we = 0;
  logic [REG_AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  dvfs_cfg_t cfg;
  op_t cur_op = 2'd2;
  dvfs_state_e state = S_VOLT;
  logic freeze = 1, off = 1;
  logic [7:0] vctrl = 8'd80;
  int checks = 0, failures = 0;

  dvfs_regs dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .cfg, .cur_op, .state,
                 .freeze, .off, .vctrl, .last_idle(32'd1234), .last_traffic(32'd567), .ntrans(32'd9));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge clk); req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); req = 0; we = 0;
  endtask
  task automatic rd_check(input logic [REG_AW-1:0] a, input logic [31:0] exp, input string what);
    @(negedge clk); req = 1; we = 0; addr = a; #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: read %h expected %h", what, rdata, exp); end
    req = 0;
  endtask
  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #3 rst_n = 1;
    rd_check(A_WINDOW, 32'd131072, "reset window");
    rd_check(A_THR_TRF, 32'd4096, "reset traffic threshold");
    rd_check(A_THR_BST, 32'd114688, "reset burst threshold");
    rd_check(A_POLICY, 32'd0, "reset policy");
    chk(cfg.policy == POL_PN && !cfg.pl_en && !cfg.ovr_en && cfg.budget == 0, "reset cfg");
    rd_check(A_STATUS, {15'd0, 1'b1, 8'd80, 4'(S_VOLT), 1'b1, 1'b1, 2'd2}, "status");
    rd_check(A_IDLE_CNT, 32'd1234, "idle count");
    rd_check(A_TRF_CNT, 32'd567, "traffic count");
    rd_check(A_NTRANS, 32'd9, "transitions");
    wr(A_POLICY, 32'h0000_0036);          // pn_op 3, PL, policy PB
    rd_check(A_POLICY, 32'h0000_0036, "policy");
    chk(cfg.policy == POL_PB && cfg.pl_en && cfg.pn_op == 2'd3, "policy fields");
    wr(A_POLICY, 32'h0000_0003);          // reserved encoding
    chk(cfg.policy == POL_PN && !cfg.pl_en, "reserved policy -> PN");
    wr(A_OVERRIDE, 32'h0000_0021);
    rd_check(A_OVERRIDE, 32'h0000_0021, "override");
    chk(cfg.ovr_en && cfg.ovr_op == 2'd2, "override fields");
    wr(A_THR_TRF, 32'd32);   rd_check(A_THR_TRF, 32'd32, "traffic thr");
    wr(A_THR_BST, 32'd56);   rd_check(A_THR_BST, 32'd56, "burst thr");
    wr(A_WINDOW, 32'd64);    rd_check(A_WINDOW, 32'd64, "window");
    chk(cfg.window == 64 && cfg.thr_traffic == 32 && cfg.thr_burst == 56, "cfg numbers");
    wr(A_BUDGET, 32'hffff_fff1);
    rd_check(A_BUDGET, 32'd1, "budget");
    chk(cfg.budget == 2'd1, "budget field");
    wr(A_IDLE_CNT, 32'd0);
    rd_check(A_IDLE_CNT, 32'd1234, "read-only idle count");
    state = S_IDLE; freeze = 0; off = 0;
    rd_check(A_STATUS, {15'd0, 1'b0, 8'd80, 4'(S_IDLE), 1'b0, 1'b0, 2'd2}, "status idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
