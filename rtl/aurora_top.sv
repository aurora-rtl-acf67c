// aurora_top: CGRA accelerator built from the generic template.
//
// A ROWS x COLS king-mesh tile array (aurora_array) sits between four
// double-buffered scratchpad data buffers: buffer 0 on the west edge,
// 1 east, 2 north, 3 south. The edge tiles reach them through their FU
// load/store port: column 0 uses the west buffer (port = row), column
// COLS-1 the east buffer (port = row), the remaining tiles of row 0 the
// north buffer and of row ROWS-1 the south buffer (port = column; ports 0
// and COLS-1 of those two stay idle). Interior tiles have no memory port.
// A DMA unit fills and drains the buffer halves the array is not using,
// and a controller runs the array for II x #iter cycles per invocation and
// swaps buffer halves on request.
//
// The host core and the system memory are outside: the core's control
// signals (configuration writes, kernel start, swap, DMA descriptor) and
// the accelerator's responses (done, busy) are ports, as is the DMA's
// request/grant memory bus. Status: `illegal` (a tile ran an operation its
// FU lacks) and `conflict` (a tile access lost bank arbitration).
//
// Defaults: 4x4 tiles (the example starting design point of the AURORA
// exploration), 8 configuration words per tile, 2 banks of 128 words per
// buffer half, every tile a complex FU with all eight links. OP_MASK,
// LINK_MASK and HAS_FU specialise single tiles (see aurora_array). Only
// the 4x4 size comes from the AURORA paper; the rest are this design's.
module aurora_top
  import aurora_pkg::*;
#(
  parameter int  ROWS       = 4,
  parameter int  COLS       = 4,
  parameter int  CFG_DEPTH  = 8,
  parameter int  NBANKS     = 2,
  parameter int  BANK_DEPTH = 128,
  parameter logic [ROWS*COLS*32-1:0]   OP_MASK   = {(ROWS*COLS){OPS_ALL}},
  parameter logic [ROWS*COLS*NDIR-1:0] LINK_MASK = '1,
  parameter logic [ROWS*COLS-1:0]      HAS_FU    = '1,
  localparam int CAW        = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1,
  localparam int TW         = (ROWS*COLS > 1) ? $clog2(ROWS*COLS) : 1,
  localparam int BUF_AW     = $clog2(NBANKS * BANK_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration load
  input  logic              cfg_we,
  input  logic [TW-1:0]     cfg_tile,
  input  logic [CAW-1:0]    cfg_waddr,
  input  cfg_word_t         cfg_wdata,
  // kernel invocation
  input  logic              start,
  input  logic [CAW:0]      ii,
  input  logic [31:0]       iter,
  input  logic              swap,
  output logic              busy,
  output logic              done,
  output logic              array_half,
  // DMA descriptor
  input  logic              dma_start,
  input  logic              dma_dir,
  input  logic [1:0]        dma_buf,
  input  logic [31:0]       dma_mem_addr,
  input  logic [BUF_AW-1:0] dma_buf_addr,
  input  logic [BUF_AW:0]   dma_len,
  output logic              dma_busy,
  output logic              dma_done,
  // system memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata,
  // status
  output logic              illegal,
  output logic              conflict
);

  localparam int NBUF = 4;

  logic              run_en, run_clr;
  logic [CAW-1:0]    cfg_idx;
  mem_req_t          tile_mem   [ROWS][COLS];
  logic [DATA_W-1:0] tile_rdata [ROWS][COLS];

  // West/east buffers: one port per row; north/south: one per column.
  mem_req_t          w_req [ROWS], e_req [ROWS], n_req [COLS], s_req [COLS];
  logic [DATA_W-1:0] w_rd  [ROWS], e_rd  [ROWS], n_rd  [COLS], s_rd  [COLS];
  logic [ROWS-1:0]   w_cf, e_cf;
  logic [COLS-1:0]   n_cf, s_cf;

  logic [1:0]        d_id;
  logic              d_req, d_we;
  logic [BUF_AW-1:0] d_addr;
  logic [DATA_W-1:0] d_wdata;
  logic [DATA_W-1:0] d_rdata [NBUF];

  aurora_ctrl #(.CFG_DEPTH(CFG_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .ii, .iter, .swap,
    .en(run_en), .clr(run_clr), .cfg_idx, .busy, .done, .array_half
  );

  aurora_array #(
    .ROWS(ROWS), .COLS(COLS), .CFG_DEPTH(CFG_DEPTH),
    .OP_MASK(OP_MASK), .LINK_MASK(LINK_MASK), .HAS_FU(HAS_FU)
  ) u_array (
    .clk, .rst_n, .en(run_en), .clr(run_clr), .cfg_idx,
    .cfg_we, .cfg_tile, .cfg_waddr, .cfg_wdata,
    .tile_mem, .tile_rdata, .illegal
  );

  // Edge tiles to buffer ports
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      w_req[r] = '0;
      e_req[r] = '0;
    end
    for (int c = 0; c < COLS; c++) begin
      n_req[c] = '0;
      s_req[c] = '0;
    end
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        tile_rdata[r][c] = '0;
        if (c == 0) begin
          w_req[r] = tile_mem[r][c];  tile_rdata[r][c] = w_rd[r];
        end else if (c == COLS-1) begin
          e_req[r] = tile_mem[r][c];  tile_rdata[r][c] = e_rd[r];
        end else if (r == 0) begin
          n_req[c] = tile_mem[r][c];  tile_rdata[r][c] = n_rd[c];
        end else if (r == ROWS-1) begin
          s_req[c] = tile_mem[r][c];  tile_rdata[r][c] = s_rd[c];
        end
      end
    end
  end

  aurora_data_buffer #(.NPORTS(ROWS), .NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_buf_w (
    .clk, .rst_n, .array_half, .tile_req(w_req), .tile_rdata(w_rd), .conflict(w_cf),
    .dma_req(d_req && d_id == 2'd0), .dma_we(d_we), .dma_addr(d_addr),
    .dma_wdata(d_wdata), .dma_rdata(d_rdata[0])
  );
  aurora_data_buffer #(.NPORTS(ROWS), .NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_buf_e (
    .clk, .rst_n, .array_half, .tile_req(e_req), .tile_rdata(e_rd), .conflict(e_cf),
    .dma_req(d_req && d_id == 2'd1), .dma_we(d_we), .dma_addr(d_addr),
    .dma_wdata(d_wdata), .dma_rdata(d_rdata[1])
  );
  aurora_data_buffer #(.NPORTS(COLS), .NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_buf_n (
    .clk, .rst_n, .array_half, .tile_req(n_req), .tile_rdata(n_rd), .conflict(n_cf),
    .dma_req(d_req && d_id == 2'd2), .dma_we(d_we), .dma_addr(d_addr),
    .dma_wdata(d_wdata), .dma_rdata(d_rdata[2])
  );
  aurora_data_buffer #(.NPORTS(COLS), .NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_buf_s (
    .clk, .rst_n, .array_half, .tile_req(s_req), .tile_rdata(s_rd), .conflict(s_cf),
    .dma_req(d_req && d_id == 2'd3), .dma_we(d_we), .dma_addr(d_addr),
    .dma_wdata(d_wdata), .dma_rdata(d_rdata[3])
  );

  assign conflict = |{w_cf, e_cf, n_cf, s_cf};

  aurora_dma #(.BUF_AW(BUF_AW), .NBUF(NBUF)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .buf_sel(dma_buf),
    .mem_addr_start(dma_mem_addr), .buf_addr_start(dma_buf_addr), .len(dma_len),
    .busy(dma_busy), .done(dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .buf_id(d_id), .buf_req(d_req), .buf_we(d_we), .buf_addr(d_addr),
    .buf_wdata(d_wdata), .buf_rdata(d_rdata[d_id])
  );

endmodule
