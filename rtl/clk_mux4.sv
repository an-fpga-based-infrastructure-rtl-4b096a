// clk_mux4: glitch-free 4:1 clock multiplexer with gating logic, used on the
// FPGA in place of run-time PLL reconfiguration: the four operating-point
// clocks are generated at fixed frequencies and the controller selects one.
//
// Each input clock has its own enable, produced by a two-stage chain in that
// clock's domain: the first stage (rising edge) samples "sel names me and no
// other enable is on", the second stage (falling edge) produces en[i]. The
// output is the OR of clk_in[i] & en[i]. Because an enable only changes while
// its own clock is low, and a new clock is enabled only after the old one has
// been switched off, the output never carries a runt pulse: every high and low
// phase is at least as long as that of the slower of the two clocks involved.
// A switch takes about two cycles of the old clock plus two cycles of the new
// one; during that time the output is held low.
//
// lock is high when exactly the selected input is enabled. It is a
// combination of signals from several clock domains and must be synchronized
// by its user (pll_ctrl_fsm does so). sel may change at any time; it is
// expected to stay stable until lock is seen. Asynchronous active-low reset
// turns all enables off; the selected clock is enabled shortly after reset is
// released.
module clk_mux4 (
  input  logic       rst_n,
  input  logic [3:0] clk_in,
  input  logic [1:0] sel,
  output logic       clk_out,
  output logic       lock,
  output logic [3:0] en      // per-input enable, for observation
);
  for (genvar i = 0; i < 4; i++) begin : g_ch
    logic others_off, s1, en_q;
    assign others_off = ((en & ~(4'b1 << i)) == 4'b0);

    always_ff @(posedge clk_in[i] or negedge rst_n) begin
      if (!rst_n) s1 <= 1'b0;
      else        s1 <= (sel == 2'(i)) && others_off;
    end

    always_ff @(negedge clk_in[i] or negedge rst_n) begin
      if (!rst_n) en_q <= 1'b0;
      else        en_q <= s1;
    end

    assign en[i] = en_q;
  end

  assign clk_out = |(clk_in & en);
  assign lock    = (en == (4'b1 << sel));
endmodule
