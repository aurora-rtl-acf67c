// tb_aurora_top: end-to-end run of the accelerator at its default size
// (4x4 tiles, 8 configuration words, 2 x 128-word banks per buffer half).
//
// Kernel: s[i] = s[i-1] + 3*a[i] (a multiply-accumulate recurrence), mapped
// by hand with II = 2 onto three tiles:
//   tile (0,0)  west buffer: slot0 LOAD a[i] (address = FU result, also
//               kept in reg0); slot1 ADD reg0+1, send the loaded word E.
//   tile (0,1)  slot0 fused MAC inW*3 + reg0; slot1 reg0 <- result and
//               send it SW (a diagonal king-mesh link).
//   tile (1,0)  west buffer: slot0 ADD counter+1; slot1 STORE the word
//               arriving from NE at OUT_BASE-3+counter.
// The first two iterations only fill the pipeline, so iter = N + 2.
//
// Sequence (double buffering): DMA batch A in; swap; run A while the DMA
// brings batch B into the other half; swap; run B while the DMA drains the
// results of A; swap; drain the results of B. Both result vectors are
// compared with a software prefix sum. Each run must take exactly
// II * iter cycles. A last short run makes two west-edge tiles load from
// the same bank in one cycle to provoke a bank conflict.
// Counted mechanisms: DMA in/out, swaps, DMA/compute overlap, fused-MAC
// issues, diagonal-link stores, bank conflicts; each must occur.
module tb_aurora_top;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;

  localparam int N        = 100;
  localparam int OUT_BASE = 128;
  localparam int MA = 0, MB = 512, MRA = 2048, MRB = 3072;

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

  aurora_mem_model #(.WORDS(4096)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  // mechanism counters
  int n_dma_in = 0, n_dma_out = 0, n_swap = 0, n_overlap = 0;
  int n_fused = 0, n_diag = 0, n_conflict = 0, n_illegal = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma_busy && busy) n_overlap++;
    if (conflict) n_conflict++;
    if (illegal) n_illegal++;
    if (dut.run_en && dut.u_array.g_row[0].g_col[1].u_tile.cfg.op == OP_MAC) n_fused++;
    if (dut.run_en && dut.u_array.g_row[1].g_col[0].u_tile.mem.we) n_diag++;
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
    if (d) n_dma_out++; else n_dma_in++;
  endtask

  task automatic run(int ii_v, int iter_v);
    int cyc;
    @(negedge clk);
    start = 1; ii = 4'(ii_v); iter = iter_v;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ii_v * iter_v + 1) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cyc - 1, ii_v * iter_v);
    end
  endtask

  task automatic do_swap();
    @(negedge clk) swap = 1;
    @(negedge clk) swap = 0;
    n_swap++;
  endtask

  task automatic check_results(int base, int src);
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < N; i++) begin
      s = s + 3 * u_mem.mem[src + i];
      checks++;
      if (u_mem.mem[base + i] !== s) begin
        failures++;
        if (failures < 10) $display("FAIL s[%0d] = %0d expected %0d", i, u_mem.mem[base + i], s);
      end
    end
  endtask

  cfg_word_t w;

  initial begin
    cfg_we = 0; cfg_tile = 0; cfg_waddr = 0; cfg_wdata = '0;
    start = 0; swap = 0; ii = 0; iter = 0;
    dma_start = 0; dma_dir = 0; dma_buf = 0; dma_mem_addr = 0; dma_buf_addr = 0; dma_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      u_mem.mem[MA + i] = $urandom_range(0, 100000);
      u_mem.mem[MB + i] = $urandom();
    end

    // tile 0 = (0,0)
    w = route(cfg_op(OP_LOAD), DST_OPA, SRC_FU);
    w = route(w, DST_REG, SRC_FU);
    write_cfg(0, 0, w);
    w = route(cfg_op(OP_ADD, 1'b1, 32'd1), DST_OPA, SRC_REG);
    w = route(w, DIR_E, SRC_FU);
    write_cfg(0, 1, w);
    // tile 1 = (0,1)
    w = route(cfg_op(OP_MAC, 1'b1, 32'd3), DST_OPA, DIR_W);
    w = route(w, DST_OPC, SRC_REG);
    write_cfg(1, 0, w);
    w = route(cfg_op(OP_NOP), DST_REG, SRC_FU);
    w = route(w, DIR_SW, SRC_FU);
    write_cfg(1, 1, w);
    // tile 4 = (1,0)
    w = route(cfg_op(OP_ADD, 1'b1, 32'd1), DST_OPA, SRC_FU);
    write_cfg(4, 0, w);
    w = route(cfg_op(OP_STORE, 1'b0, 32'(OUT_BASE - 3)), DST_OPA, SRC_FU);
    w = route(w, DST_OPB, DIR_NE);
    write_cfg(4, 1, w);

    dma(1'b0, 0, MA, 0, N);                 // batch A -> shadow half
    do_swap();
    fork
      run(2, N + 2);                        // compute A
      dma(1'b0, 0, MB, 0, N);               // meanwhile batch B in
    join
    do_swap();
    fork
      run(2, N + 2);                        // compute B
      dma(1'b1, 0, MRA, OUT_BASE, N);       // meanwhile results of A out
    join
    do_swap();
    dma(1'b1, 0, MRB, OUT_BASE, N);         // results of B out
    check_results(MRA, MA);
    check_results(MRB, MB);

    // bank conflict: tile (1,0) loads from the same bank as tile (0,0)
    w = route(cfg_op(OP_LOAD), DST_OPA, SRC_REG);
    write_cfg(4, 0, w);
    run(2, 2);

    $display("dma_in=%0d dma_out=%0d swaps=%0d overlap_cycles=%0d fused_mac=%0d diag_stores=%0d conflicts=%0d",
             n_dma_in, n_dma_out, n_swap, n_overlap, n_fused, n_diag, n_conflict);
    checks++; if (n_dma_in < 2)   begin failures++; $display("FAIL no DMA in"); end
    checks++; if (n_dma_out < 2)  begin failures++; $display("FAIL no DMA out"); end
    checks++; if (n_swap < 3)     begin failures++; $display("FAIL no swap"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlap"); end
    checks++; if (n_fused == 0)   begin failures++; $display("FAIL no fused op"); end
    checks++; if (n_diag == 0)    begin failures++; $display("FAIL no diagonal store"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no bank conflict"); end
    checks++; if (n_illegal != 0) begin failures++; $display("FAIL illegal op"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
