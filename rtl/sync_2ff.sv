// sync_2ff: two-flip-flop synchronizer for a single-bit level signal that
// crosses into the clock domain of clk (the "synchronization flip-flops" on
// the request and acknowledge paths between the DVFS FSM and the PLL control
// FSM). The output follows the input two rising edges of clk later.
// Asynchronous active-low reset clears both stages to RESET_VAL. Only
// slowly changing levels (handshake signals held until acknowledged) may be
// passed through it; multi-bit data must be bundled with such a handshake.
module sync_2ff #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,   // asynchronous to clk
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
