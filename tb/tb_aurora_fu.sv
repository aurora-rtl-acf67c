// tb_aurora_fu: checks every FU operation on random and corner operands
// against fu_ref, for a complex FU (all operations) and a basic FU (no
// fused chains, which must raise `illegal`). Directed cases check the two
// drawn fused patterns: multiply-add-compare and the four-node chain.
module tb_aurora_fu;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  op_e               op;
  logic [DATA_W-1:0] a, b, c, d, imm;
  logic [DATA_W-1:0] r_full, r_basic;
  logic              we_full, we_basic, il_full, il_basic;
  mem_req_t          m_full, m_basic;

  aurora_fu #(.OP_MASK(OPS_ALL)) dut_full (
    .op, .a, .b, .c, .d, .imm, .result(r_full), .result_we(we_full), .mem(m_full), .illegal(il_full));
  aurora_fu #(.OP_MASK(OPS_BASIC)) dut_basic (
    .op, .a, .b, .c, .d, .imm, .result(r_basic), .result_we(we_basic), .mem(m_basic), .illegal(il_basic));

  function automatic logic [DATA_W-1:0] pick();
    case ($urandom_range(0, 5))
      0: return 0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return $urandom_range(0, 40);
      default: return $urandom();
    endcase
  endfunction

  task automatic check_one(logic [31:0] mask, logic [DATA_W-1:0] r, logic w, mem_req_t m, logic il);
    fu_exp_t e;
    e = fu_ref(mask, int'(op), a, b, c, imm, d);
    checks++;
    if (il !== e.illegal || w !== e.result_we || (e.result_we && r !== e.result) ||
        m.req !== e.req || (e.req && (m.we !== e.we || m.addr !== e.addr)) ||
        (e.req && e.we && m.wdata !== e.wdata)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h c=%h d=%h imm=%h: r=%h/%h we=%b/%b req=%b/%b il=%b/%b",
                 op, a, b, c, d, imm, r, e.result, w, e.result_we, m.req, e.req, il, e.illegal);
    end
  endtask

  initial begin
    for (int i = 0; i < 4200; i++) begin
      op  = op_e'(i % 21);
      a   = pick();
      b   = pick();
      c   = pick();
      d   = pick();
      imm = pick();
      #1;
      check_one(OPS_ALL, r_full, we_full, m_full, il_full);
      check_one(OPS_BASIC, r_basic, we_basic, m_basic, il_basic);
    end
    // directed: the fused chain of the walk-through example, 3*4+5 < 18
    op = OP_MACLT; a = 3; b = 4; c = 5; imm = 18; #1;
    checks++; if (r_full !== 1) failures++;
    imm = 17; #1;
    checks++; if (r_full !== 0) failures++;
    checks++; if (!il_basic) failures++;
    // directed: the four-node pattern, 3*4 + (9-2) = 19 < 20, but not < 19
    op = OP_MSALT; a = 3; b = 4; c = 9; d = 2; imm = 20; #1;
    checks++; if (r_full !== 1) failures++;
    imm = 19; #1;
    checks++; if (r_full !== 0) failures++;
    checks++; if (!il_basic) failures++;
    // a negative sum: 2*3 + (1-10) = -3 < 0
    a = 2; b = 3; c = 1; d = 10; imm = 0; #1;
    checks++; if (r_full !== 1) failures++;
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
