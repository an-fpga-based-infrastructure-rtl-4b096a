// tb_dmac: the DMAC between an accelerator model and a memory-tile model
// (tb_noc_mem) on the same clock. The accelerator writes blocks of words and
// reads them back, also with read and write requests pending at once; the
// read data must match what was written (or the memory's initial contents).
// The memory accepts flits only part of the time, so the back-pressure
// probe must fire; a full-speed phase checks that a write moves one flit per
// cycle (len + 2 cycles for a write of len words).
module tb_dmac;
  import dvfs_pkg::*;
  logic clk = 0, rst_n = 1;
  logic rd_valid = 0, rd_ready, wr_valid = 0, wr_ready;
  logic [31:0] rd_addr = 0, wr_addr = 0;
  logic [14:0] rd_len = 0, wr_len = 0;
  logic out_valid = 0, out_ready, in_valid, in_ready = 0;
  logic [31:0] out_data = 0, in_data;
  logic tx_valid, tx_ready, rx_valid, rx_ready, xfer, bp;
  logic [FLIT_W-1:0] tx_flit, rx_flit;
  int checks = 0, failures = 0, n_bp = 0, n_xfer = 0;
  logic [31:0] ref_mem [logic [31:0]];

  dmac #(.SRC_ID(8'd7), .MEM_ID(8'd2)) dut (.clk, .rst_n, .rd_valid, .rd_ready, .rd_addr,
    .rd_len, .wr_valid, .wr_ready, .wr_addr, .wr_len, .out_valid, .out_ready, .out_data,
    .in_valid, .in_ready, .in_data, .tx_valid, .tx_ready, .tx_flit, .rx_valid, .rx_ready,
    .rx_flit, .xfer, .bp);
  tb_noc_mem #(.READY_PCT(60)) mem (.clk, .rst_n, .req_valid(tx_valid), .req_ready(tx_ready),
    .req_flit(tx_flit), .rsp_valid(rx_valid), .rsp_ready(rx_ready), .rsp_flit(rx_flit));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  always @(posedge clk) begin
    if (bp) n_bp++;
    if (xfer) n_xfer++;
    if (tx_valid && tx_ready && tx_flit[33:32] == FL_HEAD) begin
      checks++;
      if (tx_flit[31:16] != 16'h0207) begin failures++; $display("bad header %h", tx_flit); end
    end
  end

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : mem.init_word(a);
  endfunction

  task automatic dma_write(input logic [31:0] a, input int n);
    @(negedge clk); wr_valid = 1; wr_addr = a; wr_len = 15'(n);
    @(posedge clk iff wr_ready); @(negedge clk); wr_valid = 0;
    for (int i = 0; i < n; i++) begin
      logic [31:0] d;
      d = $urandom;
      out_valid = 1; out_data = d;
      @(posedge clk iff out_ready);
      ref_mem[a + 32'(i)] = d;
      @(negedge clk);
    end
    out_valid = 0;
  endtask

  task automatic dma_read(input logic [31:0] a, input int n);
    @(negedge clk); rd_valid = 1; rd_addr = a; rd_len = 15'(n);
    @(posedge clk iff rd_ready); @(negedge clk); rd_valid = 0;
    for (int i = 0; i < n; i++) begin
      in_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) begin
        checks++;
        if (in_data !== expected(a + 32'(i))) begin
          failures++; $display("read %h: %h expected %h", a + 32'(i), in_data, expected(a + 32'(i)));
        end
      end else i--;
      @(negedge clk);
    end
    in_ready = 0;
  endtask

  initial begin
    #3 rst_n = 1;
    repeat (3) @(posedge clk);
    dma_write(32'h100, 16);
    dma_read(32'h100, 16);
    dma_read(32'h800, 5);          // never written
    for (int k = 0; k < 6; k++) begin
      dma_write(32'h200 + 32'(k * 64), 1 + $urandom_range(0, 30));
      dma_read(32'h200 + 32'(k * 64), 8);
    end
    // read and write pending together: served alternately
    fork
      dma_write(32'h1000, 10);
      dma_read(32'h100, 10);
    join
    dma_read(32'h1000, 10);
    // full speed: a 20-word write takes 22 cycles on the network side
    mem.ready_pct = 100;
    repeat (4) @(posedge clk);
    begin
      int t0, t1;
      t0 = n_xfer;
      dma_write(32'h3000, 20);
      @(posedge clk iff !xfer);
      t1 = n_xfer;
      checks++;
      if (t1 - t0 != 22) begin failures++; $display("20-word write took %0d cycles", t1 - t0); end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (mem.errors != 0 || n_bp == 0) begin
      failures++; $display("memory protocol errors %0d, back-pressure cycles %0d", mem.errors, n_bp);
    end
    $display("back-pressure cycles %0d, transfer cycles %0d", n_bp, n_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
