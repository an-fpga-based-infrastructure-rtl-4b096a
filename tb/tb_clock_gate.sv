// tb_clock_gate: toggles freeze synchronously to clk and checks that gclk
// shows exactly the rising edges of clk in whose preceding cycle freeze was
// low, and that every gclk high phase lasts a full half period (no glitch).
module tb_clock_gate;
  logic clk = 0, freeze = 0, gclk;
  int checks = 0, failures = 0;
  int expected_edges = 0, seen_edges = 0;
  realtime t_rise;
  bit started = 0;

  clock_gate dut (.clk, .freeze, .gclk);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) if (started) begin
    seen_edges++;
    t_rise = $realtime;
  end
  always @(negedge gclk) if (started) begin
    checks++;
    if ($realtime - t_rise < 4.99) begin
      failures++;
      $display("short gclk pulse at %0t", $realtime);
    end
  end

  initial begin
    logic f_prev;
    @(negedge clk);
    started = 1;
    f_prev = 0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      if (!f_prev) expected_edges++;
      #1 freeze = ($urandom_range(0, 99) < 40);   // updated just after the edge
      f_prev = freeze;
    end
    @(negedge clk);
    checks++;
    if (seen_edges != expected_edges) begin
      failures++;
      $display("gclk edges %0d expected %0d", seen_edges, expected_edges);
    end
    $display("gated edges %0d of 400", seen_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
