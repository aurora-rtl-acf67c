// tb_aurora_ctrl: random (ii, iter) invocations. The array enable must be
// high for exactly ii*iter cycles, cfg_idx must step 0..ii-1 cyclically,
// done must pulse once right after, and swap must toggle the buffer half
// only while idle. Degenerate starts (ii = 0, iter = 0, ii > depth) must
// finish at once without enabling the array.
module tb_aurora_ctrl;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, swap, en, clr, busy, done, array_half;
  logic [3:0]  ii;
  logic [31:0] iter;
  logic [2:0]  cfg_idx;

  aurora_ctrl #(.CFG_DEPTH(DEPTH)) dut (.*);

  initial begin
    start = 0; swap = 0; ii = 0; iter = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int i2, it, en_cyc, dones, cyc;
      logic bad_idx;
      logic h0;
      i2 = (t % 10 == 9) ? $urandom_range(0, 1) * 9 : $urandom_range(1, DEPTH);
      it = (t % 10 == 8) ? 0 : $urandom_range(1, 12);
      @(negedge clk);
      start = 1; ii = 4'(i2); iter = it;
      #1 checks++;
      if (!clr) begin failures++; $display("FAIL no clr at start"); end
      @(negedge clk); start = 0;
      en_cyc = 0; dones = 0; cyc = 0; bad_idx = 0;
      h0 = array_half;
      swap = 1;                 // must be ignored while busy
      while (!done && cyc < 500) begin
        if (en) begin
          if (int'(cfg_idx) != en_cyc % i2) bad_idx = 1;
          en_cyc++;
        end
        @(negedge clk); cyc++;
      end
      swap = 0;
      if (done) dones++;
      @(negedge clk);
      if (done) dones++;
      checks++;
      if ((i2 >= 1 && i2 <= DEPTH && it > 0) ? (en_cyc != i2 * it) : (en_cyc != 0)) begin
        failures++; $display("FAIL ii=%0d iter=%0d enabled %0d cycles", i2, it, en_cyc);
      end
      checks++;
      if (bad_idx) begin failures++; $display("FAIL cfg_idx sequence ii=%0d", i2); end
      checks++;
      if (dones != 1 || busy) begin failures++; $display("FAIL done pulses %0d", dones); end
      checks++;
      if (array_half != h0) begin failures++; $display("FAIL swap while busy"); end
      // swap while idle
      @(negedge clk) swap = 1;
      @(negedge clk) swap = 0;
      checks++;
      if (array_half == h0) begin failures++; $display("FAIL swap ignored"); end
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
