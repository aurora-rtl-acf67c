// aurora_array: ROWS x COLS tiles on a king mesh.
//
// Every tile links to its eight neighbours (N, NE, E, SE, S, SW, W, NW).
// Outport d of a tile feeds inport opposite(d) of the neighbour in
// direction d, so a word moves one tile per cycle. Three per-tile
// parameters specialise the array; tile t = row*COLS+col owns bits
// [8t+7:8t] of LINK_MASK, bit t of HAS_FU and bits [32t+31:32t] of
// OP_MASK. A link between two tiles exists only if both tiles keep its
// direction in LINK_MASK (8'h55 in every tile keeps N, E, S, W: a plain
// mesh). HAS_FU = 0 turns a tile into a pure switch; OP_MASK picks the
// operations of its FU (OPS_BASIC: a basic FU). Inports at the array edge
// and of removed links read 0.
//
// Configuration words are written to the tile numbered cfg_tile
// (row*COLS+col). All tiles step through their configuration memories in
// lock step with cfg_idx while `en` is high; `clr` zeroes their
// registers. Each tile's memory request is
// brought out; the top level connects the edge tiles to the data buffers.
//
// The king mesh and the removable tiles/links follow the template; the
// numbering and masks are this design's choices.
module aurora_array
  import aurora_pkg::*;
#(
  parameter int                       ROWS      = 4,
  parameter int                       COLS      = 4,
  parameter int                       CFG_DEPTH = 8,
  parameter logic [ROWS*COLS*32-1:0]  OP_MASK   = {(ROWS*COLS){OPS_ALL}},
  parameter logic [ROWS*COLS*NDIR-1:0] LINK_MASK = '1,
  parameter logic [ROWS*COLS-1:0]     HAS_FU    = '1,
  localparam int                      CAW       = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1,
  localparam int                      TW        = (ROWS*COLS > 1) ? $clog2(ROWS*COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  logic [CAW-1:0]    cfg_idx,
  input  logic              cfg_we,
  input  logic [TW-1:0]     cfg_tile,
  input  logic [CAW-1:0]    cfg_waddr,
  input  cfg_word_t         cfg_wdata,
  output mem_req_t          tile_mem   [ROWS][COLS],
  input  logic [DATA_W-1:0] tile_rdata [ROWS][COLS],
  output logic              illegal
);

  // Row/column step of each direction
  localparam int DR [NDIR] = '{-1, -1, 0, 1, 1,  1,  0, -1};
  localparam int DC [NDIR] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  logic [DATA_W-1:0]    tout [ROWS][COLS][NDIR];
  logic [DATA_W-1:0]    tin  [ROWS][COLS][NDIR];
  logic [ROWS*COLS-1:0] ill;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      for (genvar d = 0; d < NDIR; d++) begin : g_link
        localparam int NR = r + DR[d];
        localparam int NC = c + DC[d];
        localparam int OD = (d + 4) % NDIR;
        if (NR >= 0 && NR < ROWS && NC >= 0 && NC < COLS &&
            LINK_MASK[(r*COLS+c)*NDIR + d] && LINK_MASK[(NR*COLS+NC)*NDIR + OD]) begin : g_on
          assign tin[r][c][d] = tout[NR][NC][OD];
        end else begin : g_off
          assign tin[r][c][d] = '0;
        end
      end

      aurora_tile #(
        .CFG_DEPTH(CFG_DEPTH),
        .HAS_FU   (HAS_FU[r*COLS+c]),
        .OP_MASK  (OP_MASK[(r*COLS+c)*32 +: 32])
      ) u_tile (
        .clk, .rst_n, .en, .clr, .cfg_idx,
        .cfg_we   (cfg_we && (int'(cfg_tile) == r*COLS + c)),
        .cfg_waddr(cfg_waddr),
        .cfg_wdata(cfg_wdata),
        .in_port  (tin[r][c]),
        .out_port (tout[r][c]),
        .mem      (tile_mem[r][c]),
        .mem_rdata(tile_rdata[r][c]),
        .illegal  (ill[r*COLS+c])
      );
    end
  end

  assign illegal = |ill;

endmodule
