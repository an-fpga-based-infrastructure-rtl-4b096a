// dc_fifo: dual-clock FIFO placed between a tile and its router's local
// port. It moves words from the write clock domain to the read clock domain
// without loss and applies back-pressure (wready low) when full, so that
// bursts keep their throughput across a frequency change of either side.
//
// Classic Gray-code design: binary read and write pointers with one extra
// wrap bit, their Gray codes passed through two flip-flops into the other
// domain, full and empty computed from the local pointer and the
// synchronized remote one. Depth is 2**AW words. Both ports use valid/ready:
// a word moves on a rising edge when valid and ready are both high. Read data
// is shown combinationally from the head entry. The flag updates that cross
// domains are seen two to three cycles late, which is safe (conservative).
// Reset is asynchronous, active low, shared by both domains. Depth and width
// are this design's choices.
module dc_fifo #(
  parameter int unsigned W  = 34,
  parameter int unsigned AW = 3
) (
  input  logic         rst_n,
  // write side
  input  logic         wclk,
  input  logic         wvalid,
  output logic         wready,
  input  logic [W-1:0] wdata,
  // read side
  input  logic         rclk,
  output logic         rvalid,
  input  logic         rready,
  output logic [W-1:0] rdata
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = bin2gray(wbin);
  assign rgray = bin2gray(rbin);

  // full: remote pointer equals local one with the two top bits inverted
  assign wready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rvalid = (rgray != wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wvalid && wready) wbin <= wbin + 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rvalid && rready) rbin <= rbin + 1'b1;
    end
  end
endmodule
