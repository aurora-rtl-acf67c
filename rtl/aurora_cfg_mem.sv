// aurora_cfg_mem: configuration (control) memory of one tile.
//
// DEPTH configuration words; the tile reads the word at `raddr` every cycle
// (combinational read, a small register file), so a modulo schedule with
// initiation interval II uses entries 0..II-1 in turn. The host writes the
// words through the write port before invoking the accelerator. Each entry
// has a valid bit cleared by reset; an entry never written reads as a NOP
// with every route disabled, so unused tiles stay idle.
//
// The per-cycle read and the parametric depth follow the template; the
// depth default (8), the write port and the valid bits are this design's
// choices.
module aurora_cfg_mem
  import aurora_pkg::*;
#(
  parameter int DEPTH = 8,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,
  input  logic [AW-1:0] waddr,
  input  cfg_word_t wdata,
  input  logic [AW-1:0] raddr,
  output cfg_word_t rdata
);

  cfg_word_t        mem   [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             valid        <= '0;
    else if (we && (int'(waddr) < DEPTH))   valid[waddr] <= 1'b1;
  end

  always_comb begin
    rdata = '0;                      // OP_NOP, routes off
    if ((int'(raddr) < DEPTH) && valid[raddr]) rdata = mem[raddr];
  end

endmodule
