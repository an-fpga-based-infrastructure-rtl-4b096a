// acc_ctrl: the CTRL block of an accelerator tile. It exposes the
// accelerator's configuration parameters to software as memory-mapped
// registers written by the device driver, starts the accelerator and raises
// its interrupt when it finishes.
//
// Bus: one access per cycle with req; writes at the clock edge, reads
// combinational. Register map (word addresses, this design's choice):
//   0 CMD     write bit 0 = 1 starts the accelerator (ignored while busy)
//   1 STATUS  [0] busy, [1] done; writing 1 to bit 1 clears done
//   2 IRQ_EN  [0] interrupt enable
//   4..4+N_CFG-1  configuration parameters, driven on cfg[]
// start is a one-cycle pulse; busy (the "accelerator enabled" probe) holds
// from start until the accelerator pulses done. irq = done & irq_en.
module acc_ctrl #(
  parameter int unsigned N_CFG = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        start,
  input  logic        done,
  output logic        busy,
  output logic        irq,
  output logic [31:0] cfg [N_CFG]
);
  logic done_q, irq_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start  <= 1'b0;
      busy   <= 1'b0;
      done_q <= 1'b0;
      irq_en <= 1'b0;
      for (int i = 0; i < N_CFG; i++) cfg[i] <= '0;
    end else begin
      start <= 1'b0;
      if (done && busy) begin
        busy   <= 1'b0;
        done_q <= 1'b1;
      end
      if (req && we) begin
        if (addr == 4'd0 && wdata[0] && !busy) begin
          start  <= 1'b1;
          busy   <= 1'b1;
          done_q <= 1'b0;
        end
        if (addr == 4'd1 && wdata[1]) done_q <= 1'b0;
        if (addr == 4'd2) irq_en <= wdata[0];
        for (int i = 0; i < N_CFG; i++)
          if (32'(addr) == 32'(4 + i)) cfg[i] <= wdata;
      end
    end
  end

  always_comb begin
    rdata = '0;
    case (addr)
      4'd1:    rdata = {30'd0, done_q, busy};
      4'd2:    rdata = {31'd0, irq_en};
      default: for (int i = 0; i < N_CFG; i++)
                 if (32'(addr) == 32'(4 + i)) rdata = cfg[i];
    endcase
  end

  assign irq = done_q & irq_en;
endmodule
