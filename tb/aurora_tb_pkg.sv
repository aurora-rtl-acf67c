// aurora_tb_pkg: reference functions shared by the testbenches.
//
// fu_ref is an independent model of one functional-unit operation; the
// route/cfg helpers build configuration words field by field.
package aurora_tb_pkg;
  import aurora_pkg::*;

  typedef struct {
    logic [DATA_W-1:0] result;
    logic              result_we;
    logic              req;
    logic              we;
    logic [DATA_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              illegal;
  } fu_exp_t;

  function automatic fu_exp_t fu_ref(logic [31:0] mask, int op,
                                     logic [DATA_W-1:0] a, logic [DATA_W-1:0] b,
                                     logic [DATA_W-1:0] c, logic [DATA_W-1:0] imm,
                                     logic [DATA_W-1:0] d = '0);
    fu_exp_t e;
    longint sa, sb, sm;
    e = '{default: '0};
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    if (!mask[op]) begin
      e.illegal = (op != 0);
      return e;
    end
    e.result_we = 1'b1;
    case (op)
      1:  e.result = a;
      2:  e.result = DATA_W'(longint'(a) + longint'(b));
      3:  e.result = DATA_W'(longint'(a) - longint'(b));
      4:  e.result = DATA_W'(longint'(a) * longint'(b));
      5:  e.result = a & b;
      6:  e.result = a | b;
      7:  e.result = a ^ b;
      8:  e.result = DATA_W'(longint'(a) * (longint'(1) << b[4:0]));
      9:  e.result = DATA_W'(longint'(a) / (longint'(1) << b[4:0]));
      10: begin  // arithmetic shift: floor division by a power of two
        sm = sa / (longint'(1) << b[4:0]);
        if (sa < 0 && (sa % (longint'(1) << b[4:0])) != 0) sm = sm - 1;
        e.result = DATA_W'(sm);
      end
      11: e.result = (sa < sb) ? 1 : 0;
      12: e.result = (longint'(a) < longint'(b)) ? 1 : 0;
      13: e.result = (a == b) ? 1 : 0;
      14: e.result = (a != b) ? 1 : 0;
      15: e.result = (c != 0) ? a : b;
      16: begin e.result_we = 0; e.req = 1; e.addr = DATA_W'(longint'(a) + longint'(imm)); end
      17: begin e.result_we = 0; e.req = 1; e.we = 1; e.addr = DATA_W'(longint'(a) + longint'(imm)); e.wdata = b; end
      18: e.result = DATA_W'(longint'(a) * longint'(b) + longint'(c));
      19: begin
        sm = longint'($signed(DATA_W'(longint'(a) * longint'(b) + longint'(c))));
        e.result = (sm < longint'($signed(imm))) ? 1 : 0;
      end
      20: begin
        sm = longint'($signed(DATA_W'(longint'(a) * longint'(b) + longint'(c) - longint'(d))));
        e.result = (sm < longint'($signed(imm))) ? 1 : 0;
      end
      default: e.result_we = 0;
    endcase
    return e;
  endfunction

  function automatic cfg_word_t cfg_op(op_e op, logic use_imm = 1'b0, logic [DATA_W-1:0] imm = '0);
    cfg_word_t w;
    w = '0;
    w.op = op;
    w.use_imm = use_imm;
    w.imm = imm;
    return w;
  endfunction

  function automatic cfg_word_t route(cfg_word_t w, int dst, int src);
    w.route[dst].en  = 1'b1;
    w.route[dst].sel = SEL_W'(src);
    return w;
  endfunction
endpackage
