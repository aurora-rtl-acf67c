// tb_aurora_mvt: the mvt workload, x1 = x1 + A*y1 with a 32x32 matrix, on
// the default 4x4 array. The loop is blocked one matrix row per invocation
// (33 words: the row and x1[r], which meets a constant 1 appended to y1),
// and the blocks stream through the double-buffered west buffer: while row
// r is computed, the DMA brings row r+1 into the other half and drains
// the result of row r-1.
//
// Mapping, II = 1:
//   (1,0) address counter k, sent N and NE
//   (0,0) LOAD A-row[k-1] from the west buffer, result SE
//   (0,1) LOAD y[k-1] from the north buffer (y held at 128..), result S
//   (1,1) MAC  acc += inNW * inN (fused), result S
//   (2,1) passes the sum on, N to S
//   (3,1) STORE acc to the south buffer at 200 every cycle; the last store
//         holds the dot product (the north buffer is busy with y loads, so
//         the store goes to another buffer and no bank conflict occurs)
// Addresses start at -1, which reads a zero pad word (west 255, north
// 127), so the tile registers cleared at each start keep the sum exact.
// The final sum is stored in cycle 39, so each invocation runs 40 cycles.
module tb_aurora_mvt;
  import aurora_pkg::*;
  import aurora_tb_pkg::*;

  localparam int NM = 32;
  localparam int MA = 0, MY = 1100, MX1 = 1200, MOUT = 1300, MZ = 1400;
  localparam int ROW_CYC = 40, OUTADDR = 200;

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

  int n_conflict = 0, n_illegal = 0, n_overlap = 0, n_runs = 0;
  always @(posedge clk) if (rst_n) begin
    if (conflict) n_conflict++;
    if (illegal) n_illegal++;
    if (busy && dma_busy) n_overlap++;
    if (done) n_runs++;
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

  task automatic run_row();
    int cyc;
    @(negedge clk);
    start = 1; ii = 1; iter = ROW_CYC;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ROW_CYC + 1) begin failures++; $display("FAIL row run took %0d cycles", cyc - 1); end
  endtask

  task automatic load_row(int r);
    dma(1'b0, 0, MA + r * NM, 0, NM);      // A[r][*] -> west 0..31
    dma(1'b0, 0, MX1 + r, NM, 1);          // x1[r]   -> west 32
  endtask

  cfg_word_t w;
  int t0, t1;

  initial begin
    cfg_we = 0; cfg_tile = 0; cfg_waddr = 0; cfg_wdata = '0;
    start = 0; swap = 0; ii = 0; iter = 0;
    dma_start = 0; dma_dir = 0; dma_buf = 0; dma_mem_addr = 0; dma_buf_addr = 0; dma_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NM * NM; i++) u_mem.mem[MA + i] = $urandom_range(0, 200) - 100;
    for (int j = 0; j < NM; j++) u_mem.mem[MY + j] = $urandom_range(0, 200) - 100;
    u_mem.mem[MY + NM] = 1;                // meets x1[r]
    u_mem.mem[MY + NM + 1] = 0;
    u_mem.mem[MY + NM + 2] = 0;
    for (int r = 0; r < NM; r++) u_mem.mem[MX1 + r] = $urandom_range(0, 2000) - 1000;
    u_mem.mem[MZ] = 0;

    w = route(cfg_op(OP_ADD, 1'b1, 32'd1), DST_OPA, SRC_FU);
    w = route(w, DIR_N, SRC_FU);
    write_cfg(4, 0, route(w, DIR_NE, SRC_FU));                       // (1,0)
    w = route(cfg_op(OP_LOAD, 1'b0, 32'hFFFF_FFFF), DST_OPA, DIR_S);
    write_cfg(0, 0, route(w, DIR_SE, SRC_FU));                       // (0,0)
    w = route(cfg_op(OP_LOAD, 1'b0, 32'd127), DST_OPA, DIR_SW);
    write_cfg(1, 0, route(w, DIR_S, SRC_FU));                        // (0,1)
    w = route(cfg_op(OP_MAC), DST_OPA, DIR_NW);
    w = route(w, DST_OPB, DIR_N);
    w = route(w, DST_OPC, SRC_FU);
    write_cfg(5, 0, route(w, DIR_S, SRC_FU));                        // (1,1)
    write_cfg(9, 0, route(cfg_op(OP_NOP), DIR_S, DIR_N));            // (2,1)
    w = route(cfg_op(OP_STORE, 1'b0, 32'(OUTADDR)), DST_OPB, DIR_N);
    write_cfg(13, 0, w);                                             // (3,1)

    // y1 (with the appended 1 and zero pads) and the zero pad words, in both halves
    for (int h = 0; h < 2; h++) begin
      dma(1'b0, 2, MY, 128, NM + 3);
      dma(1'b0, 2, MZ, 127, 1);
      dma(1'b0, 0, MZ, 255, 1);
      do_swap();
    end

    t0 = $time;
    load_row(0);
    do_swap();
    for (int r = 0; r < NM; r++) begin
      fork
        run_row();
        begin
          if (r + 1 < NM) load_row(r + 1);
          if (r > 0) dma(1'b1, 3, MOUT + r - 1, OUTADDR, 1);
        end
      join
      do_swap();
    end
    dma(1'b1, 3, MOUT + NM - 1, OUTADDR, 1);
    t1 = $time;

    for (int r = 0; r < NM; r++) begin
      logic [31:0] s;
      s = u_mem.mem[MX1 + r];
      for (int j = 0; j < NM; j++) s = s + u_mem.mem[MA + r * NM + j] * u_mem.mem[MY + j];
      checks++;
      if (u_mem.mem[MOUT + r] !== s) begin
        failures++;
        if (failures < 10) $display("FAIL x1[%0d] = %0d expected %0d", r, $signed(u_mem.mem[MOUT + r]), $signed(s));
      end
    end
    checks++;
    if (n_conflict != 0 || n_illegal != 0) begin failures++; $display("FAIL conflict/illegal"); end
    checks++;
    if (n_runs != NM || n_overlap == 0) begin failures++; $display("FAIL runs %0d overlap %0d", n_runs, n_overlap); end
    $display("mvt 32x32: %0d row invocations, %0d cycles of DMA/compute overlap, %0d cycles in all",
             n_runs, n_overlap, (t1 - t0) / 10);
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
