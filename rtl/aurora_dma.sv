// aurora_dma: DMA unit between system memory and the data buffers.
//
// The host programs one transfer: direction (dir 0: memory -> buffer,
// dir 1: buffer -> memory), which of the four data buffers, a word address
// in memory and in the buffer, and a length in words; `start` launches it.
// The DMA moves one word at a time. Towards memory it uses a request/grant
// bus: mem_req is held until mem_gnt; a read's data comes back with
// mem_rvalid, any number of cycles later. On the buffer side it always
// addresses the half the array is not using, with one-cycle read latency.
// `done` pulses for one cycle after the last word; `busy` is high in
// between. A zero-length transfer finishes at once.
// The DMA holds no data word: mem_wdata is wired to the buffer read data
// and buf_wdata to the memory read data, and only the strobes decide when
// either is taken.
//
// Per word: read-in costs request + grant wait + data wait + 0 cycles;
// write-out costs one buffer read cycle + request until grant.
// The AURORA template names the DMA unit and its use with double buffering; the
// bus, the descriptor and the one-word-at-a-time engine are this design's.
module aurora_dma
  import aurora_pkg::*;
#(
  parameter int  BUF_AW = 8,
  parameter int  NBUF   = 4,
  localparam int BSW    = (NBUF > 1) ? $clog2(NBUF) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // descriptor from the host
  input  logic              start,
  input  logic              dir,
  input  logic [BSW-1:0]    buf_sel,
  input  logic [31:0]       mem_addr_start,
  input  logic [BUF_AW-1:0] buf_addr_start,
  input  logic [BUF_AW:0]   len,
  output logic              busy,
  output logic              done,
  // system memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata,
  // data buffer port
  output logic [BSW-1:0]    buf_id,
  output logic              buf_req,
  output logic              buf_we,
  output logic [BUF_AW-1:0] buf_addr,
  output logic [DATA_W-1:0] buf_wdata,
  input  logic [DATA_W-1:0] buf_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD_REQ, S_RD_WAIT, S_BUF_RD, S_WR_REQ, S_DONE} state_e;

  state_e            state;
  logic [31:0]       maddr;
  logic [BUF_AW-1:0] baddr;
  logic [BUF_AW:0]   remain;
  logic [BSW-1:0]    sel_q;

  assign busy     = (state != S_IDLE);
  assign done     = (state == S_DONE);
  assign mem_req  = (state == S_RD_REQ) || (state == S_WR_REQ);
  assign mem_we   = (state == S_WR_REQ);
  assign mem_addr = maddr;
  assign mem_wdata = buf_rdata;
  assign buf_id   = sel_q;
  assign buf_addr = baddr;
  assign buf_req  = (state == S_BUF_RD) || ((state == S_RD_WAIT) && mem_rvalid);
  assign buf_we   = (state == S_RD_WAIT);
  assign buf_wdata = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      maddr  <= '0;
      baddr  <= '0;
      remain <= '0;
      sel_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          maddr  <= mem_addr_start;
          baddr  <= buf_addr_start;
          remain <= len;
          sel_q  <= buf_sel;
          if (len == '0) state <= S_DONE;
          else           state <= dir ? S_BUF_RD : S_RD_REQ;
        end
        S_RD_REQ:  if (mem_gnt) state <= S_RD_WAIT;
        S_RD_WAIT: if (mem_rvalid) begin
          maddr  <= maddr + 1;
          baddr  <= baddr + 1'b1;
          remain <= remain - 1'b1;
          state  <= (remain == 1) ? S_DONE : S_RD_REQ;
        end
        S_BUF_RD:  state <= S_WR_REQ;
        S_WR_REQ:  if (mem_gnt) begin
          maddr  <= maddr + 1;
          baddr  <= baddr + 1'b1;
          remain <= remain - 1'b1;
          state  <= (remain == 1) ? S_DONE : S_BUF_RD;
        end
        default:   state <= S_IDLE;   // S_DONE
      endcase
    end
  end

endmodule
