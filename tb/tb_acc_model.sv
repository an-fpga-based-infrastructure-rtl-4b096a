// tb_acc_model: behavioural model of an accelerator for testbenches. On
// start it reads len words from src by DMA, keeps its "computing" probe high
// from the middle of the input transfer until the end of the output transfer
// (computation overlapping communication), waits cpw cycles per word, writes
// word+1 for every input word to dst by DMA and pulses done. All handshakes
// are sampled on the falling edge of clk, when the design's outputs are
// stable; transfers happen on the following rising edge. The accelerator
// itself is not part of the design.
module tb_acc_model (
  input  logic        clk,
  input  logic        start,
  output logic        done,
  output logic        computing,
  input  logic [31:0] src,
  input  logic [31:0] dst,
  input  logic [31:0] len,
  input  logic [31:0] cpw,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [31:0] rd_addr,
  output logic [14:0] rd_len,
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [31:0] wr_addr,
  output logic [14:0] wr_len,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data
);
  logic [31:0] buf_q [$];
  int runs = 0;

  initial begin
    done = 0; computing = 0; rd_valid = 0; wr_valid = 0; out_valid = 0; in_ready = 0;
    rd_addr = 0; rd_len = 0; wr_addr = 0; wr_len = 0; out_data = 0;
    forever begin
      int n;
      @(negedge clk iff start);
      n = int'(len);
      rd_valid = 1; rd_addr = src; rd_len = 15'(n);
      #0.1 while (!rd_ready) begin @(negedge clk); #0.1; end
      @(negedge clk); rd_valid = 0; in_ready = 1;
      for (int i = 0; i < n; i++) begin
        #0.1 while (!in_valid) begin @(negedge clk); #0.1; end
        buf_q.push_back(in_data + 1);
        @(negedge clk);
        if (i == n / 2) computing = 1;
      end
      in_ready = 0;
      repeat (int'(cpw) * n) @(negedge clk);
      wr_valid = 1; wr_addr = dst; wr_len = 15'(n);
      #0.1 while (!wr_ready) begin @(negedge clk); #0.1; end
      @(negedge clk); wr_valid = 0;
      for (int i = 0; i < n; i++) begin
        out_valid = 1; out_data = buf_q[i];
        #0.1 while (!out_ready) begin @(negedge clk); #0.1; end
        @(negedge clk);
      end
      out_valid = 0; computing = 0;
      buf_q.delete();
      done = 1; @(negedge clk); done = 0;
      runs++;
    end
  end
endmodule
