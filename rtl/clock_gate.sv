// clock_gate: latch-based clock gate that freezes the logic it clocks. The
// enable (the inverse of freeze) passes a latch that is transparent while
// clk is low, and the latch output is AND-ed with clk. A change of freeze in
// the clk domain therefore only takes effect from the next rising edge and
// can never shorten a high phase of gclk. The first rising edge of clk after
// freeze rises is suppressed; the first rising edge after freeze falls is
// passed. The latch is intentional: it is the clock-gating latch of the
// design, and tools that report it as a latch are reporting the intent.
// The AND gate is this design's choice of gating cell.
module clock_gate (
  input  logic clk,
  input  logic freeze,  // synchronous to clk
  output logic gclk
);
  logic en_lat;
  always_latch begin
    if (!clk) en_lat = !freeze;
  end
  assign gclk = clk & en_lat;
endmodule
