// tb_aurora_cfg_mem: after reset every entry reads as a NOP word; written
// entries read back what was written; rewrites take effect the next cycle.
module tb_aurora_cfg_mem;
  import aurora_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      we;
  logic [2:0] waddr, raddr;
  cfg_word_t wdata, rdata;
  cfg_word_t model [DEPTH];
  logic      written [DEPTH];

  aurora_cfg_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic cfg_word_t rand_word();
    cfg_word_t w;
    for (int i = 0; i < $bits(cfg_word_t); i += 32) w = {w, $urandom()};
    w.op = op_e'($urandom_range(0, 20));
    return w;
  endfunction

  task automatic check_all();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 3'(i);
      #1;
      checks++;
      if (rdata !== (written[i] ? model[i] : cfg_word_t'('0))) begin
        failures++;
        $display("FAIL entry %0d", i);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = '0; raddr = 0;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = 3'($urandom_range(0, DEPTH-1));
      wdata = rand_word();
      @(posedge clk);
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
      #1 we = 0;
      check_all();
    end
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
