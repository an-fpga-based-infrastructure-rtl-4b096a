// tb_dc_fifo: writer at 100 MHz, reader at a slower 37 MHz with random
// stalls, then the reverse. Every word is checked against a scoreboard in
// order; full (wready low) and empty must both be observed, and the FIFO
// must pass one word per write cycle when the reader keeps up.
module tb_dc_fifo;
  logic rst_n = 1, wclk = 0, rclk = 0;
  logic wvalid = 0, wready, rvalid, rready = 0;
  logic [33:0] wdata = '0, rdata;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [33:0] sb [$];
  realtime whalf = 5.0, rhalf = 13.5;

  dc_fifo #(.W(34), .AW(3)) dut (.rst_n, .wclk, .wvalid, .wready, .wdata, .rclk, .rvalid,
                                 .rready, .rdata);
  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;
  initial #1 rst_n = 0;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int to_send = 0;
  always @(posedge wclk) if (rst_n) begin
    if (wvalid && wready) sb.push_back(wdata);
    if (wvalid && !wready) nfull++;
    if (!(wvalid && !wready)) begin
      if (to_send > 0 && $urandom_range(0, 99) < 90) begin
        wvalid  <= 1'b1;
        wdata   <= {2'($urandom), 32'($urandom)};
        to_send <= to_send - 1;
      end else begin
        wvalid  <= 1'b0;
      end
    end
  end
  int received = 0;
  always @(posedge rclk) if (rst_n) begin
    if (rvalid && rready) begin
      logic [33:0] e;
      e = sb.pop_front();
      checks++; received++;
      if (rdata !== e) begin failures++; $display("got %h expected %h", rdata, e); end
    end
    if (!rvalid) nempty++;
    rready <= ($urandom_range(0, 99) < 70);
  end

  initial begin
    #5 rst_n = 1;
    to_send = 300;
    wait (received >= 290);
    #2000;
    whalf = 15.0; rhalf = 4.0;   // slow writer, fast reader
    @(posedge wclk);
    to_send = 300;
    #20000;
    wait (sb.size() == 0 && !wvalid);
    #500;
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("full %0d empty %0d", nfull, nempty); end
    checks++;
    if (received < 550) begin failures++; $display("received only %0d", received); end
    $display("received %0d, full cycles %0d, empty cycles %0d", received, nfull, nempty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
