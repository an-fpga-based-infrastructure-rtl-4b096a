// tb_pll_ctrl_fsm: drives the request/acknowledge handshake of the PLL
// control FSM from a separate clock domain (through two-flop synchronizers,
// as in the controller) and models a clock source whose lock drops when
// fctrl changes and returns a random 5 to 40 refclk cycles later. Checks:
// fctrl takes the requested target, fchange pulses exactly once per request,
// ack never rises while the source is unlocked, and ack falls after req.
module tb_pll_ctrl_fsm;
  import dvfs_pkg::*;
  logic refclk = 0, clk = 0, rst_n = 1;
  logic req = 0, req_s, ack, ack_s, fchange;
  logic lock = 1;
  op_t  target = '0, fctrl;
  int checks = 0, failures = 0, nfchange = 0;

  pll_ctrl_fsm dut (.refclk, .rst_n, .req(req_s), .target, .lock, .fctrl, .fchange, .ack);
  sync_2ff s_req (.clk(refclk), .rst_n, .d(req), .q(req_s));
  sync_2ff s_ack (.clk(clk),    .rst_n, .d(ack), .q(ack_s));

  always #10 refclk = ~refclk;   // 50 MHz reference
  always #6  clk    = ~clk;

  // clock source model: lock drops on a change of fctrl, returns later
  op_t applied = '0;
  always @(posedge refclk) begin
    if (fchange) nfchange++;
    if (fctrl != applied) begin
      lock <= 1'b0;
      applied = fctrl;
      fork begin
        repeat ($urandom_range(5, 40)) @(posedge refclk);
        lock <= 1'b1;
      end join_none
    end
  end

  always @(posedge refclk) if (rst_n && ack && !lock && !$past(ack)) begin
    failures++; $display("ack raised while unlocked");
  end

  initial #1 rst_n = 0;   // reset pulse: high, low, then released below

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge refclk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      int n_before;
      n_before = nfchange;
      @(posedge clk);
      target <= op_t'($urandom);
      req    <= 1'b1;
      wait (ack_s);
      @(posedge clk);
      checks++;
      if (fctrl !== target || !lock) begin
        failures++; $display("fctrl %0d target %0d lock %b", fctrl, target, lock);
      end
      req <= 1'b0;
      wait (!ack_s);
      checks++;
      if (nfchange != n_before + 1) begin failures++; $display("fchange pulses %0d", nfchange - n_before); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
