// aurora_tile: one modular tile of the CGRA template.
//
// A tile holds a functional unit, a configuration memory, NREG registers
// and an XB_IN x XB_OUT crossbar. Every enabled cycle the configuration
// word at cfg_idx selects the FU operation and, per crossbar sink, which
// source drives it. Sources are the eight king-mesh inports, the FU result
// and the registers; sinks are the eight outports, the FU operands a/b/c/d
// and the registers.
//
// Timing: every source is a register, so one cycle is
// register -> crossbar -> FU -> register. Outports are registered: a value
// routed out in cycle t is seen by the neighbour in cycle t+1 and held
// until overwritten. The FU result register updates at the end of the
// cycle; an OP_LOAD result arrives from the buffer one cycle later and is
// presented on the FU-result source in that cycle, then kept. Nothing
// changes while `en` is low. Reset, and `clr` (pulsed before each kernel
// invocation), clear all registers, so every run starts from zeros.
//
// HAS_FU = 0 builds a tile without FU (a pure switch); OP_MASK selects the
// FU's operations. Both are the template's specialisation knobs; their
// encoding, the reset and the load timing are this design's choices.
module aurora_tile
  import aurora_pkg::*;
#(
  parameter int          CFG_DEPTH = 8,
  parameter bit          HAS_FU    = 1'b1,
  parameter logic [31:0] OP_MASK   = OPS_ALL,
  localparam int         CAW       = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  logic [CAW-1:0]    cfg_idx,
  input  logic              cfg_we,
  input  logic [CAW-1:0]    cfg_waddr,
  input  cfg_word_t         cfg_wdata,
  input  logic [DATA_W-1:0] in_port  [NDIR],
  output logic [DATA_W-1:0] out_port [NDIR],
  output mem_req_t          mem,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              illegal
);

  cfg_word_t         cfg;
  logic [DATA_W-1:0] xin   [XB_IN];
  logic [SEL_W-1:0]  xsel  [XB_OUT];
  logic              xen   [XB_OUT];
  logic [DATA_W-1:0] xout  [XB_OUT];
  logic              xoen  [XB_OUT];

  logic [DATA_W-1:0] out_q [NDIR];
  logic [DATA_W-1:0] reg_q [NREG];
  logic [DATA_W-1:0] alu_q;
  logic              ld_q;
  logic [DATA_W-1:0] fu_src;   // FU-result source seen by the crossbar

  aurora_cfg_mem #(.DEPTH(CFG_DEPTH)) u_cfg (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(cfg_idx), .rdata(cfg)
  );

  assign fu_src = ld_q ? mem_rdata : alu_q;

  always_comb begin
    for (int d = 0; d < NDIR; d++) xin[d] = in_port[d];
    xin[SRC_FU] = fu_src;
    for (int r = 0; r < NREG; r++) xin[SRC_REG+r] = reg_q[r];
    for (int o = 0; o < XB_OUT; o++) begin
      xsel[o] = cfg.route[o].sel;
      xen[o]  = cfg.route[o].en;
    end
  end

  aurora_xbar #(.N_IN(XB_IN), .N_OUT(XB_OUT), .W(DATA_W)) u_xbar (
    .in(xin), .sel(xsel), .en(xen), .out(xout), .out_en(xoen)
  );

  // Outports and registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIR; d++) out_q[d] <= '0;
      for (int r = 0; r < NREG; r++) reg_q[r] <= '0;
    end else if (clr) begin
      for (int d = 0; d < NDIR; d++) out_q[d] <= '0;
      for (int r = 0; r < NREG; r++) reg_q[r] <= '0;
    end else if (en) begin
      for (int d = 0; d < NDIR; d++) if (xoen[d]) out_q[d] <= xout[d];
      for (int r = 0; r < NREG; r++) if (xoen[DST_REG+r]) reg_q[r] <= xout[DST_REG+r];
    end
  end

  assign out_port = out_q;

  if (HAS_FU) begin : g_fu
    logic [DATA_W-1:0] opb, fu_res;
    logic              fu_we, fu_ill;
    mem_req_t          fu_mem;

    assign opb = cfg.use_imm ? cfg.imm : xout[DST_OPB];

    aurora_fu #(.OP_MASK(OP_MASK)) u_fu (
      .op(cfg.op), .a(xout[DST_OPA]), .b(opb), .c(xout[DST_OPC]), .d(xout[DST_OPD]),
      .imm(cfg.imm),
      .result(fu_res), .result_we(fu_we), .mem(fu_mem), .illegal(fu_ill)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        alu_q <= '0;
        ld_q  <= 1'b0;
      end else if (clr) begin
        alu_q <= '0;
        ld_q  <= 1'b0;
      end else if (en) begin
        if (fu_we)     alu_q <= fu_res;
        else if (ld_q) alu_q <= mem_rdata;   // keep the loaded word
        ld_q <= fu_mem.req && !fu_mem.we;
      end
    end

    always_comb begin
      mem     = fu_mem;
      mem.req = fu_mem.req && en;
    end
    assign illegal = fu_ill && en;
  end else begin : g_switch
    // Switch-only tile: no FU, no memory access.
    assign alu_q   = '0;
    assign ld_q    = 1'b0;
    assign mem     = '0;
    assign illegal = 1'b0;
  end

endmodule
