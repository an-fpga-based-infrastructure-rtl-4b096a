// tb_acc_ctrl: writes and reads back the configuration registers, starts
// the accelerator (start must pulse for exactly one cycle and busy must
// hold), ignores a second start while busy, ends with done, and checks the
// interrupt against its enable and its clear.
module tb_acc_ctrl;
  logic clk = 0, rst_n = 1, req = 0, we = 0, done = 0;
  logic [3:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic start, busy, irq;
  logic [31:0] cfg [8];
  int checks = 0, failures = 0, nstart = 0;

  acc_ctrl #(.N_CFG(8)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .start, .done,
                             .busy, .irq, .cfg);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  always @(posedge clk) if (start) nstart++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); req = 0; we = 0;
  endtask
  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [31:0] rd(input logic [3:0] a);
    addr = a; req = 1; we = 0;
    return rdata;
  endfunction

  initial begin
    #3 rst_n = 1;
    for (int i = 0; i < 8; i++) wr(4'(4 + i), 32'hA500_0000 + 32'(i * 17));
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); addr = 4'(4 + i); #1;
      chk(rdata == 32'hA500_0000 + 32'(i * 17) && cfg[i] == rdata, "cfg read-back");
    end
    wr(4'd2, 32'd1);
    wr(4'd0, 32'd1);
    @(negedge clk);
    chk(busy && nstart == 1, "started");
    wr(4'd0, 32'd1);
    chk(nstart == 1, "no restart while busy");
    @(negedge clk); addr = 4'd1; #1; chk(rdata == 32'd1, "status busy");
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    addr = 4'd1; #1; chk(rdata == 32'd2 && !busy, "status done");
    chk(irq, "irq raised");
    wr(4'd1, 32'd2);
    chk(!irq, "irq cleared");
    wr(4'd2, 32'd0);
    wr(4'd0, 32'd1);
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    chk(!irq && nstart == 2, "irq masked, second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
