// tb_aurora_array: king-mesh wiring of a 4x4 array. For each of the eight
// directions every tile makes its own id (ADD imm), sends it out in that
// direction, latches what arrives from the opposite side and shows it as
// store data on its memory port. The word must be the id of the right
// neighbour, or 0 at the array edge. A second array built as a plain
// N/E/S/W mesh (LINK_MASK) must deliver 0 on the diagonals. A third,
// heterogeneous array has tile 5 without FU (a switch: it sends 0 and
// never stores) and tile 6 with a basic FU (a fused MAC there must raise
// illegal). Configuration writes must reach only the addressed tile.
module tb_aurora_array;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;
  localparam int R = 4, C = 4;
  localparam int DR [NDIR] = '{-1, -1, 0, 1, 1,  1,  0, -1};
  localparam int DC [NDIR] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              en, cfg_we, illegal, illegal_m, illegal_h;
  logic              clr = 1'b0;
  logic [2:0]        cfg_idx, cfg_waddr;
  logic [3:0]        cfg_tile;
  cfg_word_t         cfg_wdata;
  mem_req_t          tile_mem   [R][C];
  mem_req_t          tile_mem_m [R][C];
  mem_req_t          tile_mem_h [R][C];
  logic [DATA_W-1:0] tile_rdata [R][C];

  aurora_array #(.ROWS(R), .COLS(C), .CFG_DEPTH(8)) dut (.*);
  aurora_array #(.ROWS(R), .COLS(C), .CFG_DEPTH(8), .LINK_MASK({(R*C){8'h55}})) dut_mesh (
    .clk, .rst_n, .en, .clr, .cfg_idx, .cfg_we, .cfg_tile, .cfg_waddr, .cfg_wdata,
    .tile_mem(tile_mem_m), .tile_rdata, .illegal(illegal_m));
  localparam logic [R*C*32-1:0] HET_OPS = {{(R*C-7){OPS_ALL}}, OPS_BASIC, {6{OPS_ALL}}};
  aurora_array #(.ROWS(R), .COLS(C), .CFG_DEPTH(8), .HAS_FU(16'hFFDF), .OP_MASK(HET_OPS)) dut_het (
    .clk, .rst_n, .en, .clr, .cfg_idx, .cfg_we, .cfg_tile, .cfg_waddr, .cfg_wdata,
    .tile_mem(tile_mem_h), .tile_rdata, .illegal(illegal_h));

  task automatic write_cfg(int tile, int addr, cfg_word_t w);
    @(negedge clk);
    cfg_we = 1; cfg_tile = 4'(tile); cfg_waddr = 3'(addr); cfg_wdata = w;
    @(negedge clk) cfg_we = 0;
  endtask

  initial begin
    en = 0; cfg_we = 0; cfg_idx = 0; cfg_waddr = 0; cfg_tile = 0; cfg_wdata = '0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) tile_rdata[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < NDIR; d++) begin
      for (int t = 0; t < R*C; t++) begin
        cfg_word_t w;
        w = cfg_op(OP_ADD, 1'b1, 32'(100 + t));
        write_cfg(t, 0, w);
        w = route(cfg_op(OP_NOP), d, SRC_FU);
        write_cfg(t, 1, w);
        w = route(cfg_op(OP_NOP), DST_REG, (d + 4) % NDIR);
        write_cfg(t, 2, w);
        w = route(cfg_op(OP_STORE), DST_OPB, SRC_REG);
        write_cfg(t, 3, w);
      end
      for (int s = 0; s < 4; s++) begin
        @(negedge clk); en = 1; cfg_idx = 3'(s);
      end
      #1;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        int sr, sc;
        logic [31:0] ev, evm;
        sr = r - DR[d]; sc = c - DC[d];
        ev = (sr >= 0 && sr < R && sc >= 0 && sc < C) ? 32'(100 + sr*C + sc) : 0;
        evm = (d % 2 == 0) ? ev : 0;
        checks++;
        if (!tile_mem[r][c].req || !tile_mem[r][c].we || tile_mem[r][c].wdata !== ev) begin
          failures++;
          $display("FAIL dir %0d tile (%0d,%0d) got %0d exp %0d", d, r, c, tile_mem[r][c].wdata, ev);
        end
        checks++;
        if ((r*C + c == 5) ? tile_mem_h[r][c].req !== 1'b0
                           : tile_mem_h[r][c].wdata !== ((sr*C + sc == 5) ? 32'd0 : ev)) begin
          failures++;
          $display("FAIL hetero dir %0d tile (%0d,%0d)", d, r, c);
        end
        checks++;
        if (tile_mem_m[r][c].wdata !== evm) begin
          failures++;
          $display("FAIL mesh dir %0d tile (%0d,%0d) got %0d exp %0d", d, r, c, tile_mem_m[r][c].wdata, evm);
        end
      end
      @(negedge clk) en = 0;
    end
    checks++;
    if (illegal || illegal_m || illegal_h) failures++;
    // fused MAC on every tile: only the basic FU of tile 6 objects
    for (int t = 0; t < R*C; t++) write_cfg(t, 0, cfg_op(OP_MAC));
    @(negedge clk); en = 1; cfg_idx = 0;
    #1 checks++;
    if (illegal || illegal_m || !illegal_h) begin failures++; $display("FAIL illegal flags"); end
    @(negedge clk) en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
