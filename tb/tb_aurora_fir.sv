// tb_aurora_fir: the fir workload (64 samples) on the default 4x4 array,
// mapped as a systolic pipeline with II = 1 (one output per cycle):
//
//   (1,0) counter, sends addresses N      (0,0) LOAD x from the west buffer,
//                                                sends x E
//   (0,1) (0,2) (0,3)  x delay line: reg0 <- inW, reg1 <- reg0,
//                      reg1 -> E and S (three cycles per hop)
//   (1,1) (1,2) (1,3)  taps: MAC inN * h_k + inW, result E (last tap: S)
//   (2,2) counter, sends addresses E      (2,3) STORE y to the east buffer
//
// A partial sum needs two cycles per hop and x three, so each tap adds the
// next older sample: y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2]. The input is
// loaded with two leading zeros so the filter starts from rest; y[n] is
// stored in cycle n+14, so the run takes N+14 cycles. Results are read
// back by the DMA and compared with a software filter.
module tb_aurora_fir;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;

  localparam int N = 64, OUT = 32;
  localparam int MX = 0, MY = 1024;
  localparam int H [3] = '{3, -2, 5};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              cfg_we;
  logic [3:0]        cfg_tile;
  logic [2:0]        cfg_waddr;
  cfg_word_t         cfg_wdata;
  logic              start, swap, busy, done, array_half;
  logic [3:0]        ii;
  logic [31:0]       iter;
  logic              dma_start, dma_dir, dma_busy, dma_done;
  logic [1:0]        dma_buf;
  logic [31:0]       dma_mem_addr;
  logic [7:0]        dma_buf_addr;
  logic [8:0]        dma_len;
  logic              mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0]       mem_addr, mem_wdata, mem_rdata;
  logic              illegal, conflict;

  aurora_top dut (.*);

  aurora_mem_model #(.WORDS(2048)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int n_conflict = 0, n_illegal = 0;
  always @(posedge clk) if (rst_n) begin
    if (conflict) n_conflict++;
    if (illegal) n_illegal++;
  end

  task automatic write_cfg(int tile, int addr, cfg_word_t w);
    @(negedge clk);
    cfg_we = 1; cfg_tile = 4'(tile); cfg_waddr = 3'(addr); cfg_wdata = w;
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic dma(logic d, int b, int maddr, int baddr, int len);
    @(negedge clk);
    dma_start = 1; dma_dir = d; dma_buf = 2'(b);
    dma_mem_addr = maddr; dma_buf_addr = 8'(baddr); dma_len = 9'(len);
    @(negedge clk) dma_start = 0;
    while (!dma_done) @(negedge clk);
  endtask

  task automatic do_swap();
    @(negedge clk) swap = 1;
    @(negedge clk) swap = 0;
  endtask

  cfg_word_t w;
  int cyc;

  initial begin
    cfg_we = 0; cfg_tile = 0; cfg_waddr = 0; cfg_wdata = '0;
    start = 0; swap = 0; ii = 0; iter = 0;
    dma_start = 0; dma_dir = 0; dma_buf = 0; dma_mem_addr = 0; dma_buf_addr = 0; dma_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    u_mem.mem[MX] = 0;
    u_mem.mem[MX + 1] = 0;
    for (int i = 0; i < N; i++) u_mem.mem[MX + 2 + i] = $urandom_range(0, 2000) - 1000;

    // address counter for the loader
    w = route(cfg_op(OP_ADD, 1'b1, 32'd1), DST_OPA, SRC_FU);
    write_cfg(4, 0, route(w, DIR_N, SRC_FU));
    // loader
    w = route(cfg_op(OP_LOAD), DST_OPA, DIR_S);
    write_cfg(0, 0, route(w, DIR_E, SRC_FU));
    // x delay line
    for (int c = 1; c < 4; c++) begin
      w = route(cfg_op(OP_NOP), DST_REG, DIR_W);
      w = route(w, DST_REG + 1, SRC_REG);
      w = route(w, DIR_E, SRC_REG + 1);
      write_cfg(c, 0, route(w, DIR_S, SRC_REG + 1));
    end
    // taps
    for (int k = 0; k < 3; k++) begin
      w = route(cfg_op(OP_MAC, 1'b1, 32'(H[k])), DST_OPA, DIR_N);
      w = route(w, DST_OPC, DIR_W);
      write_cfg(5 + k, 0, route(w, (k == 2) ? DIR_S : DIR_E, SRC_FU));
    end
    // store address counter and storer
    w = route(cfg_op(OP_ADD, 1'b1, 32'd1), DST_OPA, SRC_FU);
    write_cfg(10, 0, route(w, DIR_E, SRC_FU));
    w = route(cfg_op(OP_STORE, 1'b0, 32'(OUT - 13)), DST_OPA, DIR_W);
    write_cfg(11, 0, route(w, DST_OPB, DIR_N));

    dma(1'b0, 0, MX, 0, N + 2);
    do_swap();
    @(negedge clk);
    start = 1; ii = 1; iter = N + 14;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N + 14 + 1) begin failures++; $display("FAIL run took %0d cycles", cyc - 1); end
    do_swap();
    dma(1'b1, 1, MY, OUT, N);

    for (int n = 0; n < N; n++) begin
      logic [31:0] y;
      y = 0;
      for (int k = 0; k < 3; k++)
        if (n - k >= 0) y = y + 32'(H[k]) * u_mem.mem[MX + 2 + n - k];
      checks++;
      if (u_mem.mem[MY + n] !== y) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] = %0d expected %0d", n, $signed(u_mem.mem[MY + n]), $signed(y));
      end
    end
    checks++;
    if (n_conflict != 0 || n_illegal != 0) begin failures++; $display("FAIL conflict/illegal"); end
    $display("fir: %0d outputs in %0d cycles (II = 1)", N, cyc - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
