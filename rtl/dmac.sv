// dmac: DMA controller of an accelerator tile. It turns the accelerator's
// read and write requests into NoC packets towards a memory (DDR) tile and
// delivers the data of read responses to the accelerator, so that the
// accelerator's Read and Write blocks can move data between DDR and its
// private local memory at up to one flit per cycle per direction.
//
// Packet format (this design's choice; 34-bit flits = 2-bit type + 32 bits):
//   request  : HEAD {dest[31:24], src[23:16], write[15], len[14:0]}
//              then the address flit (TAIL for a read, BODY for a write),
//              then for a write len data flits, the last one TAIL.
//   response : HEAD (any payload) then len data flits, the last one TAIL.
// len counts 32-bit words and must be at least 1.
//
// One transfer is in flight at a time; when both a read and a write request
// are pending they are served alternately. Read and write requests are
// accepted (rd_ready/wr_ready) when the transfer starts. All handshakes are
// valid/ready. The payload of a response data flit reaches in_data without a
// register (the FSM gates only in_valid/rx_ready), so in_data follows rx_flit
// combinationally. The probe outputs show whether a transfer is in progress and
// whether the tile is receiving back-pressure from the NoC (a flit is
// waiting to enter the network, or a read waits for its response).
module dmac
  import dvfs_pkg::*;
#(
  parameter logic [7:0] SRC_ID = 8'd0,
  parameter logic [7:0] MEM_ID = 8'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  // accelerator: requests
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [31:0]       rd_addr,
  input  logic [14:0]       rd_len,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [31:0]       wr_addr,
  input  logic [14:0]       wr_len,
  // accelerator: data to memory (dma_out) and from memory (dma_in)
  input  logic              out_valid,
  output logic              out_ready,
  input  logic [31:0]       out_data,
  output logic              in_valid,
  input  logic              in_ready,
  output logic [31:0]       in_data,
  // NoC side
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [FLIT_W-1:0] tx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  logic [FLIT_W-1:0] rx_flit,
  // probes
  output logic              xfer,
  output logic              bp
);
  typedef enum logic [2:0] {D_IDLE, D_HEAD, D_ADDR, D_WDATA, D_RHEAD, D_RDATA} dstate_e;
  dstate_e     st;
  logic        is_wr, last_wr;
  logic [31:0] addr_q;
  logic [14:0] len_q, cnt;

  logic pick_wr;
  assign pick_wr = wr_valid && (!rd_valid || !last_wr);

  assign rd_ready = (st == D_IDLE) && rd_valid && !pick_wr;
  assign wr_ready = (st == D_IDLE) && pick_wr;

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    case (st)
      D_HEAD:  begin
        tx_valid = 1'b1;
        tx_flit  = {FL_HEAD, MEM_ID, SRC_ID, is_wr, len_q};
      end
      D_ADDR:  begin
        tx_valid = 1'b1;
        tx_flit  = {is_wr ? FL_BODY : FL_TAIL, addr_q};
      end
      D_WDATA: begin
        tx_valid = out_valid;
        tx_flit  = {(cnt == len_q - 1'b1) ? FL_TAIL : FL_BODY, out_data};
      end
      default: ;
    endcase
  end

  assign out_ready = (st == D_WDATA) && tx_ready;
  assign in_valid  = (st == D_RDATA) && rx_valid;
  assign in_data   = rx_flit[31:0];
  assign rx_ready  = (st == D_RHEAD) || ((st == D_RDATA) && in_ready);

  assign xfer = (st != D_IDLE);
  assign bp   = (tx_valid && !tx_ready) ||
                (((st == D_RHEAD) || (st == D_RDATA)) && !rx_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= D_IDLE;
      is_wr   <= 1'b0;
      last_wr <= 1'b0;
      addr_q  <= '0;
      len_q   <= '0;
      cnt     <= '0;
    end else begin
      case (st)
        D_IDLE: begin
          cnt <= '0;
          if (wr_ready) begin
            is_wr   <= 1'b1;
            last_wr <= 1'b1;
            addr_q  <= wr_addr;
            len_q   <= wr_len;
            st      <= D_HEAD;
          end else if (rd_ready) begin
            is_wr   <= 1'b0;
            last_wr <= 1'b0;
            addr_q  <= rd_addr;
            len_q   <= rd_len;
            st      <= D_HEAD;
          end
        end
        D_HEAD:  if (tx_ready) st <= D_ADDR;
        D_ADDR:  if (tx_ready) st <= is_wr ? D_WDATA : D_RHEAD;
        D_WDATA: if (tx_valid && tx_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == len_q - 1'b1) st <= D_IDLE;
        end
        D_RHEAD: if (rx_valid) st <= D_RDATA;
        D_RDATA: if (rx_valid && in_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == len_q - 1'b1) st <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready && st != D_WDATA) |=> tx_valid && $stable(tx_flit));
endmodule
