// tb_clk_mux4: four free-running clocks at the FPGA operating-point
// frequencies (100, 90, 80, 60 MHz). The select is changed through a random
// sequence; after each change the testbench waits for lock and checks that
// exactly the selected enable is on, that clk_out then has the selected
// period, and, over the whole run, that no high or low phase of clk_out is
// shorter than half the fastest period (no glitch while switching).
module tb_clk_mux4;
  logic rst_n = 1;
  logic [3:0] clk_in = '0;
  logic [1:0] sel = 2'd0;
  logic clk_out, lock;
  logic [3:0] en;
  int checks = 0, failures = 0, switches = 0;
  realtime last_edge = 0, t0, t1;
  realtime half [4] = '{5.0, 5.5555, 6.25, 8.3333};

  clk_mux4 dut (.rst_n, .clk_in, .sel, .clk_out, .lock, .en);

  always #(half[0]) clk_in[0] = ~clk_in[0];
  always #(half[1]) clk_in[1] = ~clk_in[1];
  always #(half[2]) clk_in[2] = ~clk_in[2];
  always #(half[3]) clk_in[3] = ~clk_in[3];

  initial #1 rst_n = 0;   // reset pulse: high, low, then released below

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(clk_out) if (rst_n && $realtime > 23) begin
    checks++;
    if ($realtime - last_edge < 4.99) begin
      failures++;
      $display("runt phase of %0.3f ns at %0t", $realtime - last_edge, $realtime);
    end
    last_edge = $realtime;
  end

  initial begin
    #23 rst_n = 1;
    last_edge = $realtime;
    for (int i = 0; i < 24; i++) begin
      logic [1:0] nsel;
      nsel = (i == 0) ? 2'd0 : 2'($urandom);
      if (i > 0 && nsel == sel) nsel = sel + 1'b1;
      #(3.7 + $urandom_range(0, 20)) sel = nsel;
      switches++;
      #1 wait (lock);
      checks++;
      if (en != (4'b1 << sel)) begin failures++; $display("enables %b for sel %0d", en, sel); end
      @(posedge clk_out); t0 = $realtime;
      @(posedge clk_out); t1 = $realtime;
      checks++;
      if (t1 - t0 < 2 * half[sel] - 0.01 || t1 - t0 > 2 * half[sel] + 0.01) begin
        failures++;
        $display("period %0.3f ns for sel %0d", t1 - t0, sel);
      end
    end
    $display("switches %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
