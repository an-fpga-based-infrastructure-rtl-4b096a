// tb_window_counter: drives random conditions, enable and clear into a
// three-input counter and compares every cycle with a reference count
// (OR of the conditions, clear first, saturation). A 4-bit instance checks
// that the count saturates instead of wrapping.
module tb_window_counter;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [2:0] cond = '0;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  int unsigned model = 0, model4 = 0;

  window_counter #(.N(3), .W(32)) dut  (.clk, .rst_n, .clear, .en, .cond, .count);
  window_counter #(.N(3), .W(4))  dut4 (.clk, .rst_n, .clear, .en, .cond, .count(count4));

  always #5 clk = ~clk;

  initial #1 rst_n = 0;   // reset pulse: high, low, then released below

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) < 3);
      en    = ($urandom_range(0, 99) < 80);
      cond  = 3'($urandom);
      @(posedge clk);
      if (clear) begin model = 0; model4 = 0; end
      else if (en && |cond) begin
        model++;
        if (model4 < 15) model4++;
      end
      #1;
      checks++;
      if (count !== model || count4 !== 4'(model4)) begin
        failures++;
        $display("cycle %0d: count=%0d/%0d expected %0d/%0d", i, count, count4, model, model4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
