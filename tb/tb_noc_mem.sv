// tb_noc_mem: behavioural model of a memory tile reached through the NoC,
// for testbenches only. It accepts request packets in the DMAC format
// (HEAD {dest, src, write, len}, address flit, write data), stores written
// words in a sparse memory and answers read requests with a HEAD flit and
// len data flits (last one TAIL). Words never written read as
// init_word(addr). READY_PCT sets how often it accepts a flit, which
// throttles the network side and creates back-pressure. Protocol errors are
// counted in errors.
module tb_noc_mem
  import dvfs_pkg::*;
#(
  parameter int READY_PCT = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [FLIT_W-1:0] req_flit,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [FLIT_W-1:0] rsp_flit
);
  int errors = 0, n_wr_words = 0, n_rd_words = 0, n_packets = 0;
  int ready_pct = READY_PCT;
  initial begin rsp_valid = 1'b0; req_ready = 1'b0; rsp_flit = '0; end
  logic [31:0] mem [logic [31:0]];

  function automatic logic [31:0] init_word(logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'h1234;
  endfunction

  typedef enum {M_HEAD, M_ADDR, M_WDATA} mstate_e;
  mstate_e st = M_HEAD;
  logic        wr;
  logic [14:0] len;
  logic [31:0] addr;
  int          cnt;
  // pending read responses: queue of flits
  logic [FLIT_W-1:0] rq [$];

  always @(posedge clk) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
    end else begin
      if (req_valid && req_ready) begin
        case (st)
          M_HEAD: begin
            if (req_flit[33:32] != FL_HEAD) errors++;
            wr  = req_flit[15];
            len = req_flit[14:0];
            n_packets++;
            st  = M_ADDR;
          end
          M_ADDR: begin
            addr = req_flit[31:0];
            cnt  = 0;
            if (wr) begin
              if (req_flit[33:32] != FL_BODY) errors++;
              st = M_WDATA;
            end else begin
              if (req_flit[33:32] != FL_TAIL) errors++;
              rq.push_back({FL_HEAD, 32'h0});
              for (int i = 0; i < int'(len); i++) begin
                logic [31:0] a;
                a = addr + 32'(i);
                rq.push_back({(i == int'(len) - 1) ? FL_TAIL : FL_BODY,
                              mem.exists(a) ? mem[a] : init_word(a)});
              end
              n_rd_words += int'(len);
              st = M_HEAD;
            end
          end
          M_WDATA: begin
            mem[addr + 32'(cnt)] = req_flit[31:0];
            n_wr_words++;
            if ((cnt == int'(len) - 1) != (req_flit[33:32] == FL_TAIL)) errors++;
            cnt++;
            if (cnt == int'(len)) st = M_HEAD;
          end
          default: st = M_HEAD;
        endcase
      end
      req_ready <= ($urandom_range(0, 99) < ready_pct);
    end
  end

  // response side: one flit per cycle when valid
  always @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_flit  <= '0;
    end else begin
      if (rsp_valid && rsp_ready) void'(rq.pop_front());
      if (rq.size() > 0 && !(rsp_valid && rsp_ready && rq.size() == 0)) begin
        rsp_valid <= 1'b1;
        rsp_flit  <= rq[0];
      end else begin
        rsp_valid <= 1'b0;
      end
    end
  end
endmodule
