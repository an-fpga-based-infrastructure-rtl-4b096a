// tb_perf_counters: random probe events into a 5-counter bank; a reference
// model tracks every counter and the snapshot copies. All counters are read
// back through rd_idx/snap_data after every phase, including after clear.
module tb_perf_counters;
  localparam int N = 5;
  logic clk = 0, rst_n = 1, clear = 0, snapshot = 0;
  logic [N-1:0] ev = '0;
  logic [2:0] rd_idx = '0;
  logic [31:0] rd_data, snap_data;
  int checks = 0, failures = 0;
  int unsigned m [N], ms [N];

  perf_counters #(.N(N), .W(32)) dut (.clk, .rst_n, .clear, .snapshot, .ev, .rd_idx,
                                      .rd_data, .snap_data);
  always #5 clk = ~clk;

  initial #1 rst_n = 0;   // reset pulse: high, low, then released below

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_idx = 3'(i);
      #1;
      checks++;
      if (rd_data !== m[i] || snap_data !== ms[i]) begin
        failures++;
        $display("counter %0d: %0d/%0d expected %0d/%0d", i, rd_data, snap_data, m[i], ms[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m[i] = 0; ms[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int phase = 0; phase < 6; phase++) begin
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        ev       = N'($urandom);
        snapshot = ($urandom_range(0, 99) < 2);
        clear    = (phase == 3 && c == 150);
        @(posedge clk);
        for (int i = 0; i < N; i++) begin
          if (snapshot) ms[i] = m[i];
          if (clear) m[i] = 0;
          else if (ev[i]) m[i]++;
        end
      end
      @(negedge clk);
      ev = '0; snapshot = 0; clear = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
