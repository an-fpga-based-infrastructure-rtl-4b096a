// perf_counters: bank of free-running profiling counters fed by probe
// signals. Counter i increments in every cycle in which ev[i] is high, so
// after a run it holds the number of cycles a condition held (cycles spent
// computing, under back-pressure, at operating point i, ...). The counters
// wrap at 2**W. A synchronous clear zeroes all of them. rd_idx selects the
// counter shown combinationally on rd_data; snapshot copies all counters into
// a shadow set at once so that an external reader (such as a profiling
// interface) sees a consistent frame, read through snap_data.
module perf_counters #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 snapshot,
  input  logic [N-1:0]         ev,
  input  logic [$clog2(N)-1:0] rd_idx,
  output logic [W-1:0]         rd_data,
  output logic [W-1:0]         snap_data
);
  logic [W-1:0] cnt  [N];
  logic [W-1:0] snap [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        cnt[i]  <= '0;
        snap[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (snapshot) snap[i] <= cnt[i];
        if (clear)      cnt[i] <= '0;
        else if (ev[i]) cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  assign rd_data   = (32'(rd_idx) < N) ? cnt[rd_idx]  : '0;
  assign snap_data = (32'(rd_idx) < N) ? snap[rd_idx] : '0;
endmodule
