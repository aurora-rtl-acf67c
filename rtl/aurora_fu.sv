// aurora_fu: functional unit of a CGRA tile.
//
// Purely combinational. It evaluates one operation per cycle on operands
// a, b, c, d and the configuration immediate. A basic FU offers single
// operations of the integer LLVM IR subset; a complex FU also offers fused
// chains that finish in the same cycle: OP_MAC (multiply then add),
// OP_MACLT (multiply, add, then signed compare against the immediate), the
// chain drawn in the walk-through example, and OP_MSALT, the four-node
// pattern drawn next to the tile: a product and a difference are added and
// the sum is compared, ((a * b) + (c - d)) < imm, signed. Which operand
// feeds which node of that drawing is this design's choice. OP_MASK, one bit per op_e value,
// says which operations this FU instance is built with; an operation
// outside the mask does nothing and raises `illegal`.
//
// Memory operations are issued here too: OP_LOAD and OP_STORE drive a
// request towards the data buffer at address a + imm (store data b). The
// load value returns one cycle later and is merged by the tile.
//
// Interface: op/a/b/c/d/imm in; result + result_we (the op produced a value),
// mem (request) and illegal out. Follows the template's basic/complex FU;
// the opcode list, operand count and address form are this design's own.
module aurora_fu
  import aurora_pkg::*;
#(
  parameter logic [31:0] OP_MASK = OPS_ALL
) (
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  input  logic [DATA_W-1:0] d,
  input  logic [DATA_W-1:0] imm,
  output logic [DATA_W-1:0] result,
  output logic              result_we,
  output mem_req_t          mem,
  output logic              illegal
);

  logic              supported;
  logic [DATA_W-1:0] prod, mac, msa;

  assign supported = OP_MASK[op];
  assign prod      = a * b;
  assign mac       = prod + c;
  assign msa       = prod + (c - d);

  always_comb begin
    result    = '0;
    result_we = 1'b0;
    mem       = '0;
    illegal   = 1'b0;
    if (!supported) begin
      illegal = (op != OP_NOP);
    end else begin
      result_we = 1'b1;
      unique case (op)
        OP_MOV:   result = a;
        OP_ADD:   result = a + b;
        OP_SUB:   result = a - b;
        OP_MUL:   result = prod;
        OP_AND:   result = a & b;
        OP_OR:    result = a | b;
        OP_XOR:   result = a ^ b;
        OP_SHL:   result = a << b[4:0];
        OP_LSHR:  result = a >> b[4:0];
        OP_ASHR:  result = $unsigned($signed(a) >>> b[4:0]);
        OP_LT:    result = DATA_W'($signed(a) < $signed(b));
        OP_LTU:   result = DATA_W'(a < b);
        OP_EQ:    result = DATA_W'(a == b);
        OP_NE:    result = DATA_W'(a != b);
        OP_SEL:   result = (c != '0) ? a : b;
        OP_MAC:   result = mac;
        OP_MACLT: result = DATA_W'($signed(mac) < $signed(imm));
        OP_MSALT: result = DATA_W'($signed(msa) < $signed(imm));
        OP_LOAD: begin
          result_we = 1'b0;
          mem.req   = 1'b1;
          mem.addr  = a + imm;
        end
        OP_STORE: begin
          result_we = 1'b0;
          mem.req   = 1'b1;
          mem.we    = 1'b1;
          mem.addr  = a + imm;
          mem.wdata = b;
        end
        default:  result_we = 1'b0;   // OP_NOP
      endcase
    end
  end

endmodule
