// tb_acc_tile: an accelerator tile with a simple accelerator model and a
// memory-tile model behind the dual-clock FIFOs (tile at 100 MHz, NoC at
// 80 MHz). Software configures source, destination and length through
// CTRL, enables the interrupt and starts the accelerator. The model reads the
// input block by DMA, "computes" (adds 1 to each word, raising its computing
// probe for a few cycles per word) and writes the result block, then
// signals done. Checks: the irq rises, the memory holds the expected
// results, the idle probe is the inverse of computing, the enabled probe
// rises with the start and falls with done, and the ACC probe
// counted enabled, computing, transferring, overlapped and back-pressure
// cycles.
module tb_acc_tile;
  import dvfs_pkg::*;
  logic clk = 0, clk_noc = 0, rst_n = 1;
  logic ctl_req = 0, ctl_we = 0;
  logic [3:0] ctl_addr = '0;
  logic [31:0] ctl_wdata = '0, ctl_rdata;
  logic irq, acc_start, acc_done, acc_computing;
  logic [7:0][31:0] acc_cfg;
  logic rd_valid, rd_ready, wr_valid, wr_ready;
  logic [31:0] rd_addr, wr_addr;
  logic [14:0] rd_len, wr_len;
  logic out_valid, out_ready, in_valid, in_ready;
  logic [31:0] out_data, in_data;
  logic noc_tx_valid, noc_tx_ready, noc_rx_valid, noc_rx_ready;
  logic [FLIT_W-1:0] noc_tx_flit, noc_rx_flit;
  logic acc_idle, acc_enabled, noc_bp;
  logic prb_clear = 0, prb_snapshot = 0;
  logic [2:0] prb_idx = 0;
  logic [31:0] prb_data, prb_snap;
  int checks = 0, failures = 0;

  acc_tile #(.SRC_ID(8'd5), .MEM_ID(8'd1)) dut (.clk, .clk_noc, .rst_n, .ctl_req, .ctl_we,
    .ctl_addr, .ctl_wdata, .ctl_rdata, .irq, .acc_start, .acc_done, .acc_computing, .acc_cfg,
    .rd_valid, .rd_ready, .rd_addr, .rd_len, .wr_valid, .wr_ready, .wr_addr, .wr_len,
    .out_valid, .out_ready, .out_data, .in_valid, .in_ready, .in_data,
    .noc_tx_valid, .noc_tx_ready, .noc_tx_flit, .noc_rx_valid, .noc_rx_ready, .noc_rx_flit,
    .acc_idle, .acc_enabled, .noc_bp, .prb_clear, .prb_snapshot, .prb_idx, .prb_data, .prb_snap);
  tb_noc_mem #(.READY_PCT(50)) mem (.clk(clk_noc), .rst_n, .req_valid(noc_tx_valid),
    .req_ready(noc_tx_ready), .req_flit(noc_tx_flit), .rsp_valid(noc_rx_valid),
    .rsp_ready(noc_rx_ready), .rsp_flit(noc_rx_flit));

  always #5 clk = ~clk;
  always #6.25 clk_noc = ~clk_noc;
  initial #1 rst_n = 0;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); ctl_req = 1; ctl_we = 1; ctl_addr = a; ctl_wdata = d;
    @(negedge clk); ctl_req = 0; ctl_we = 0;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (acc_idle == acc_computing) begin failures++; $display("idle probe wrong"); end
  end

  // accelerator model: cfg[0] source, cfg[1] destination, cfg[2] length
  tb_acc_model acc (.clk, .start(acc_start), .done(acc_done), .computing(acc_computing),
    .src(acc_cfg[0]), .dst(acc_cfg[1]), .len(acc_cfg[2]), .cpw(32'd3),
    .rd_valid, .rd_ready, .rd_addr, .rd_len, .wr_valid, .wr_ready, .wr_addr, .wr_len,
    .out_valid, .out_ready, .out_data, .in_valid, .in_ready, .in_data);

  initial begin
    #30 rst_n = 1;
    repeat (3) @(posedge clk);
    wr(4'd4, 32'h400); wr(4'd5, 32'h900); wr(4'd6, 32'd24);
    wr(4'd2, 32'd1);
    chk(!acc_enabled, "not enabled before the start");
    wr(4'd0, 32'd1);
    chk(acc_enabled, "enabled after the start");
    @(posedge clk iff irq);
    chk(1'b1, "irq");
    #0.1 chk(!acc_enabled, "not enabled once done");
    repeat (40) @(posedge clk_noc);   // let the tx FIFO drain into the memory
    for (int i = 0; i < 24; i++) begin
      logic [31:0] a;
      a = 32'h900 + 32'(i);
      chk(mem.mem.exists(a) && mem.mem[a] == mem.init_word(32'h400 + 32'(i)) + 1, "result word");
    end
    chk(mem.errors == 0, "no protocol errors");
    @(negedge clk); prb_snapshot = 1; @(negedge clk); prb_snapshot = 0;
    for (int i = 0; i < 5; i++) begin
      prb_idx = 3'(i); #0.1;
      chk(prb_snap > 0 && prb_snap == prb_data, "ACC probe counter");
      $display("ACC probe %0d: %0d", i, prb_snap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
