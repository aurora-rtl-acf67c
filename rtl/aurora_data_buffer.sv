// aurora_data_buffer: banked, double-buffered scratchpad data buffer.
//
// The buffer holds two halves ("ping" and "pong"), each split into NBANKS
// scratchpad banks of BANK_DEPTH words, word-interleaved: bank = address
// modulo NBANKS, row = address / NBANKS. The tiles along one edge of the
// array use the half selected by `array_half` through NPORTS request ports;
// the DMA unit uses the other half through its own port, so the next data
// tile can be brought in while the array computes on the current one.
// Swapping halves is the controller's job.
//
// Each bank serves one tile request per cycle. When several ports address
// the same bank in one cycle the lowest-numbered port wins; the others are
// dropped and flagged on `conflict` (a load that loses returns 0). Reads
// are synchronous: rdata is valid the cycle after the request and held
// until the port's next granted load. Addresses wrap at the buffer size.
//
// Banking and double buffering follow the template (SPM data banks, double
// data buffer); the sizes, the interleaving, the fixed-priority arbitration
// and the DMA port are this design's choices.
module aurora_data_buffer
  import aurora_pkg::*;
#(
  parameter int NPORTS     = 4,
  parameter int NBANKS     = 2,
  parameter int BANK_DEPTH = 128,
  localparam int BKW       = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int RW        = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1,
  localparam int AW        = $clog2(NBANKS * BANK_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              array_half,
  // tile side
  input  mem_req_t          tile_req   [NPORTS],
  output logic [DATA_W-1:0] tile_rdata [NPORTS],
  output logic [NPORTS-1:0] conflict,
  // DMA side (the other half)
  input  logic              dma_req,
  input  logic              dma_we,
  input  logic [AW-1:0]     dma_addr,
  input  logic [DATA_W-1:0] dma_wdata,
  output logic [DATA_W-1:0] dma_rdata
);

  logic [DATA_W-1:0] mem [2][NBANKS][BANK_DEPTH];

  logic [BKW-1:0]    p_bank  [NPORTS];
  logic [RW-1:0]     p_row   [NPORTS];
  logic [NPORTS-1:0] grant;
  logic              b_busy  [NBANKS];
  logic              b_wr    [NBANKS];
  logic [RW-1:0]     b_row   [NBANKS];
  logic [DATA_W-1:0] b_wdata [NBANKS];
  logic [BKW-1:0]    d_bank;
  logic [RW-1:0]     d_row;

  function automatic logic [BKW-1:0] bank_of(logic [AW-1:0] a);
    return (NBANKS > 1) ? BKW'(a % NBANKS) : '0;
  endfunction
  function automatic logic [RW-1:0] row_of(logic [AW-1:0] a);
    return RW'(a / NBANKS);
  endfunction

  // Fixed-priority arbitration per bank
  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      b_busy[b]  = 1'b0;
      b_wr[b]    = 1'b0;
      b_row[b]   = '0;
      b_wdata[b] = '0;
    end
    grant    = '0;
    conflict = '0;
    for (int p = 0; p < NPORTS; p++) begin
      p_bank[p] = bank_of(tile_req[p].addr[AW-1:0]);
      p_row[p]  = row_of(tile_req[p].addr[AW-1:0]);
      if (tile_req[p].req) begin
        if (!b_busy[p_bank[p]]) begin
          grant[p]                = 1'b1;
          b_busy[p_bank[p]]       = 1'b1;
          b_wr[p_bank[p]]         = tile_req[p].we;
          b_row[p_bank[p]]        = p_row[p];
          b_wdata[p_bank[p]]      = tile_req[p].wdata;
        end else begin
          conflict[p] = 1'b1;
        end
      end
    end
    d_bank = bank_of(dma_addr);
    d_row  = row_of(dma_addr);
  end

  // Storage: tile half and DMA half
  always_ff @(posedge clk) begin
    for (int b = 0; b < NBANKS; b++)
      if (b_busy[b] && b_wr[b]) mem[array_half][b][b_row[b]] <= b_wdata[b];
    if (dma_req && dma_we) mem[!array_half][d_bank][d_row] <= dma_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) tile_rdata[p] <= '0;
      dma_rdata <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (grant[p] && !tile_req[p].we) tile_rdata[p] <= mem[array_half][p_bank[p]][p_row[p]];
        else if (conflict[p] && !tile_req[p].we) tile_rdata[p] <= '0;
      end
      if (dma_req && !dma_we) dma_rdata <= mem[!array_half][d_bank][d_row];
    end
  end

endmodule
