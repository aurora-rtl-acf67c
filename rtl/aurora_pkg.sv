// aurora_pkg: types and constants shared by the CGRA tiles, crossbar, data
// buffers and the top level.
//
// A tile sees its eight king-mesh neighbours (N, NE, E, SE, S, SW, W, NW).
// Its crossbar has XB_IN sources: the eight inports, the FU result and the
// NREG tile registers, and XB_OUT sinks: the eight outports, the four FU
// operands and the NREG registers. One configuration word (cfg_word_t)
// holds the FU opcode, an immediate and one route (enable + source select)
// per crossbar sink; the tile's configuration memory supplies one such word
// per cycle. The king mesh, the tile parts and the use of a configuration
// word per cycle follow the architecture template; the word width (32 bit),
// the register count (two, as drawn in the tile diagram), the operand count
// and the opcode set are this design's choices.
package aurora_pkg;

  parameter int DATA_W = 32;
  parameter int NDIR   = 8;   // king mesh: eight neighbours
  parameter int NREG   = 2;   // general registers per tile
  parameter int NOPND  = 4;   // FU operands a, b, c, d

  parameter int XB_IN  = NDIR + 1 + NREG;      // inports, FU result, registers
  parameter int XB_OUT = NDIR + NOPND + NREG;  // outports, operands, registers
  parameter int SEL_W  = $clog2(XB_IN);

  // Crossbar source indices
  parameter int SRC_FU  = NDIR;        // FU result (or load data)
  parameter int SRC_REG = NDIR + 1;    // first register
  // Crossbar sink indices
  parameter int DST_OPA = NDIR;
  parameter int DST_OPB = NDIR + 1;
  parameter int DST_OPC = NDIR + 2;
  parameter int DST_OPD = NDIR + 3;
  parameter int DST_REG = NDIR + 4;

  typedef enum logic [2:0] {
    DIR_N, DIR_NE, DIR_E, DIR_SE, DIR_S, DIR_SW, DIR_W, DIR_NW
  } dir_e;

  // Direction a word arrives from, seen by the receiving tile.
  function automatic int opposite(int d);
    return (d + 4) % NDIR;
  endfunction

  // FU operations. Basic operations cover the integer LLVM IR subset used
  // by the kernels; MAC, MACLT and MSALT are fused chains for complex FUs.
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_MOV   = 5'd1,   // a
    OP_ADD   = 5'd2,   // a + b
    OP_SUB   = 5'd3,   // a - b
    OP_MUL   = 5'd4,   // a * b (low word)
    OP_AND   = 5'd5,
    OP_OR    = 5'd6,
    OP_XOR   = 5'd7,
    OP_SHL   = 5'd8,   // a << b[4:0]
    OP_LSHR  = 5'd9,   // a >> b[4:0], logical
    OP_ASHR  = 5'd10,  // a >>> b[4:0], arithmetic
    OP_LT    = 5'd11,  // signed a < b  -> 1/0
    OP_LTU   = 5'd12,  // unsigned a < b
    OP_EQ    = 5'd13,
    OP_NE    = 5'd14,
    OP_SEL   = 5'd15,  // c != 0 ? a : b  (predication by select)
    OP_LOAD  = 5'd16,  // result <= buffer[a + imm], one cycle later
    OP_STORE = 5'd17,  // buffer[a + imm] <= b
    OP_MAC   = 5'd18,  // a * b + c              (fused x, +)
    OP_MACLT = 5'd19,  // (a * b + c) < imm      (fused x, +, <)
    OP_MSALT = 5'd20   // (a * b + (c - d)) < imm  (fused x, -, +, <)
  } op_e;

  parameter logic [31:0] OPS_ALL   = 32'h001F_FFFF;
  parameter logic [31:0] OPS_BASIC = 32'h0003_FFFF;  // no fused chains

  typedef struct packed {
    logic             en;
    logic [SEL_W-1:0] sel;
  } route_t;

  typedef struct packed {
    op_e                      op;
    logic                     use_imm;  // operand b := imm
    logic [DATA_W-1:0]        imm;
    route_t [XB_OUT-1:0]      route;
  } cfg_word_t;


  // Tile-to-data-buffer request
  typedef struct packed {
    logic              req;
    logic              we;
    logic [DATA_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

endpackage
