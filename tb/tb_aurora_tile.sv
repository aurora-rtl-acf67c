// tb_aurora_tile: runs a tile with random configuration words (random
// operations, routes and immediates; entries 6 and 7 left unwritten, so
// they must behave as NOPs) and random inports, against a cycle model of
// the tile written here: registered outports and registers, FU result
// register, one-cycle load data from a memory that answers addr*7+1.
// Checks every cycle: memory request, illegal flag, all outports. Then a
// directed program checks a two-slot counter with a fused MAC (II = 2).
module tb_aurora_tile;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              en;
  logic              clr = 1'b0;
  logic [2:0]        cfg_idx, cfg_waddr;
  logic              cfg_we;
  cfg_word_t         cfg_wdata;
  logic [DATA_W-1:0] in_port [NDIR];
  logic [DATA_W-1:0] out_port[NDIR];
  mem_req_t          mem;
  logic [DATA_W-1:0] mem_rdata;
  logic              illegal;

  aurora_tile #(.CFG_DEPTH(DEPTH)) dut (.*);

  // memory: registered read data
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mem_rdata <= '0;
    else if (mem.req && !mem.we) mem_rdata <= mem.addr * 7 + 1;

  // model state
  cfg_word_t         prog [DEPTH];
  logic              pv   [DEPTH];
  logic [DATA_W-1:0] m_out[NDIR], m_reg[NREG], m_alu;
  logic              m_ld;

  // next-state of the model
  logic [DATA_W-1:0] n_out[NDIR], n_reg[NREG], n_alu;
  logic              n_ld;
  fu_exp_t           e;

  task automatic model_step();
    cfg_word_t         w;
    logic [DATA_W-1:0] src [XB_IN];
    logic [DATA_W-1:0] snk [XB_OUT];
    logic              sen [XB_OUT];
    logic [DATA_W-1:0] ob;
    w = pv[cfg_idx] ? prog[cfg_idx] : cfg_word_t'('0);
    for (int d = 0; d < NDIR; d++) src[d] = in_port[d];
    src[NDIR] = m_ld ? mem_rdata : m_alu;
    for (int r = 0; r < NREG; r++) src[NDIR+1+r] = m_reg[r];
    for (int o = 0; o < XB_OUT; o++) begin
      sen[o] = w.route[o].en && (int'(w.route[o].sel) < XB_IN);
      snk[o] = sen[o] ? src[w.route[o].sel] : '0;
    end
    ob = w.use_imm ? w.imm : snk[NDIR+1];
    e = fu_ref(OPS_ALL, int'(w.op), snk[NDIR], ob, snk[NDIR+2], w.imm, snk[NDIR+3]);
    n_out = m_out; n_reg = m_reg; n_alu = m_alu; n_ld = m_ld;
    if (en) begin
      for (int d = 0; d < NDIR; d++) if (sen[d]) n_out[d] = snk[d];
      for (int r = 0; r < NREG; r++) if (sen[NDIR+4+r]) n_reg[r] = snk[NDIR+4+r];
      if (e.result_we) n_alu = e.result;
      else if (m_ld)   n_alu = mem_rdata;
      n_ld = e.req && !e.we;
    end
  endtask

  task automatic compare_comb();
    checks++;
    if (mem.req !== (e.req && en) || illegal !== (e.illegal && en) ||
        (mem.req && (mem.we !== e.we || mem.addr !== e.addr || (e.we && mem.wdata !== e.wdata)))) begin
      failures++;
      if (failures < 10) $display("FAIL comb t=%0t req=%b/%b il=%b/%b", $time, mem.req, e.req, illegal, e.illegal);
    end
  endtask

  task automatic compare_regs();
    for (int d = 0; d < NDIR; d++) begin
      checks++;
      if (out_port[d] !== m_out[d]) begin
        failures++;
        if (failures < 10) $display("FAIL out%0d t=%0t got %h exp %h", d, $time, out_port[d], m_out[d]);
      end
    end
  endtask

  cfg_word_t w;
  int ii;

  initial begin
    en = 0; cfg_idx = 0; cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0;
    for (int d = 0; d < NDIR; d++) in_port[d] = '0;
    for (int i = 0; i < DEPTH; i++) pv[i] = 0;
    for (int d = 0; d < NDIR; d++) m_out[d] = '0;
    for (int r = 0; r < NREG; r++) m_reg[r] = '0;
    m_alu = '0; m_ld = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- random phase ----
    for (int i = 0; i < 6; i++) begin
      w = '0;
      w.op      = op_e'($urandom_range(0, 20));
      w.use_imm = $urandom_range(0, 1);
      w.imm     = $urandom_range(0, 50);
      for (int o = 0; o < XB_OUT; o++) begin
        w.route[o].en  = $urandom_range(0, 1);
        w.route[o].sel = SEL_W'($urandom_range(0, 15));
      end
      // make sure loads happen and their data is routed out
      if (i == 0) w.op = OP_LOAD;
      if (i == 1) w = route(w, DIR_N, SRC_FU);
      @(negedge clk);
      cfg_we = 1; cfg_waddr = 3'(i); cfg_wdata = w;
      prog[i] = w; pv[i] = 1;
    end
    @(negedge clk) cfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      cfg_idx = 3'($urandom_range(0, DEPTH-1));
      for (int d = 0; d < NDIR; d++) in_port[d] = $urandom_range(0, 1000);
      #1;
      model_step();
      compare_comb();
      @(posedge clk);
      m_out = n_out; m_reg = n_reg; m_alu = n_alu; m_ld = n_ld;
      #1 compare_regs();
    end
    // ---- directed: counter + fused MAC, II = 2 ----
    // slot0: ADD fu + 1 -> counter in FU result; reg0 <- in W
    // slot1: MAC reg0 * 3 + fu; route fu -> out E
    rst_n = 0; @(negedge clk); rst_n = 1;
    w = cfg_op(OP_ADD, 1'b1, 32'd1);
    w = route(w, DST_OPA, SRC_FU);
    w = route(w, DST_REG, DIR_W);
    @(negedge clk); cfg_we = 1; cfg_waddr = 0; cfg_wdata = w;
    w = cfg_op(OP_MAC, 1'b1, 32'd3);
    w = route(w, DST_OPA, SRC_REG);
    w = route(w, DST_OPC, SRC_FU);
    w = route(w, DIR_E, SRC_FU);
    @(negedge clk); cfg_waddr = 1; cfg_wdata = w;
    @(negedge clk); cfg_we = 0;
    ii = 2;
    begin
      int cnt, expv;
      cnt = 0;
      for (int k = 0; k < 10; k++) begin
        // slot 0
        @(negedge clk); en = 1; cfg_idx = 0; in_port[DIR_W] = 32'(k * 10);
        @(negedge clk); cfg_idx = 1;        // FU result = cnt+1
        @(negedge clk); en = 0;             // slot1 result visible now
        // slot0 added 1 to the MAC result of the previous iteration,
        // slot1 computed reg0*3 + that; outport E shows the previous slot1
        // value (routed before the MAC result register updated).
        expv = cnt + 1;                     // value routed to E in slot1
        checks++;
        if (out_port[DIR_E] !== 32'(expv)) begin
          failures++;
          $display("FAIL directed k=%0d outE=%0d exp %0d", k, out_port[DIR_E], expv);
        end
        cnt = (k * 10) * 3 + cnt + 1;       // new FU result after the MAC
      end
    end
    // clr zeroes the outports
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int d = 0; d < NDIR; d++) begin
      checks++;
      if (out_port[d] !== '0) begin failures++; $display("FAIL clr out%0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
