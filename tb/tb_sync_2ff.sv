// tb_sync_2ff: checks the two-flop synchronizer: reset value, and that q
// equals d as it was two rising edges earlier for a random input sequence.
module tb_sync_2ff;
  logic clk = 0, rst_n = 1, d = 0, q, q1;
  int checks = 0, failures = 0;
  logic hist [0:2];

  sync_2ff #(.RESET_VAL(1'b1)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  sync_2ff #(.RESET_VAL(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));

  always #5 clk = ~clk;

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (q !== 1'b1 || q1 !== 1'b0) begin failures++; $display("reset value wrong"); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    hist[0] = 1; hist[1] = 1; hist[2] = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      @(posedge clk);
      #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("q=%b expected %b at %0d", q, hist[1], i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
