// window_counter: statistics counter of the DVFS controller. It counts the
// cycles in which any of its N condition inputs holds (for example "an
// accelerator of the domain is idle" or "back-pressure at a network interface
// of the domain") while en is high. clear restarts the count at zero;
// clear has priority over counting. The count saturates at all ones instead
// of wrapping. The value is available on count in the cycle after the
// increment.
module window_counter #(
  parameter int unsigned N = 1,   // condition inputs, OR-ed
  parameter int unsigned W = 32   // counter width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] cond,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (clear)                  count <= '0;
    else if (en && (|cond) && (count != '1)) count <= count + 1'b1;
  end
endmodule
