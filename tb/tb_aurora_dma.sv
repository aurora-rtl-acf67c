// tb_aurora_dma: the DMA against the behavioural memory and a two-half
// buffer model. Random transfers in both directions, to random buffers,
// addresses and lengths; after each, the destination must hold the source
// words, nothing outside the range may change, and done must pulse once.
// The DMA's buffer side must stay inside the addressed range.
module tb_aurora_dma;
  import aurora_pkg::*;
  localparam int BUF_AW = 6, BUFW = 1 << BUF_AW, MEMW = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              start, dir;
  logic [1:0]        buf_sel;
  logic [31:0]       mem_addr_start;
  logic [BUF_AW-1:0] buf_addr_start;
  logic [BUF_AW:0]   len;
  logic              busy, done;
  logic              mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0]       mem_addr, mem_wdata, mem_rdata;
  logic [1:0]        buf_id;
  logic              buf_req, buf_we;
  logic [BUF_AW-1:0] buf_addr;
  logic [DATA_W-1:0] buf_wdata, buf_rdata;

  aurora_dma #(.BUF_AW(BUF_AW), .NBUF(4)) dut (.*);
  aurora_mem_model #(.WORDS(MEMW)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  // four buffers (the DMA's half only)
  logic [DATA_W-1:0] bufs [4][BUFW];
  always_ff @(posedge clk) begin
    if (buf_req && buf_we) bufs[buf_id][buf_addr] <= buf_wdata;
    if (buf_req && !buf_we) buf_rdata <= bufs[buf_id][buf_addr];
  end

  logic [DATA_W-1:0] snap_b [4][BUFW];
  logic [31:0]       snap_m [MEMW];
  int n_done;
  always @(posedge clk) if (done) n_done++;

  initial begin
    start = 0; dir = 0; buf_sel = 0; mem_addr_start = 0; buf_addr_start = 0; len = 0;
    for (int b = 0; b < 4; b++) for (int i = 0; i < BUFW; i++) bufs[b][i] = $urandom();
    for (int i = 0; i < MEMW; i++) u_mem.mem[i] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int l, ba, ma, b, cyc;
      l  = $urandom_range(1, 20);
      ba = $urandom_range(0, BUFW - l);
      ma = $urandom_range(0, MEMW - l);
      b  = $urandom_range(0, 3);
      snap_b = bufs;
      for (int i = 0; i < MEMW; i++) snap_m[i] = u_mem.mem[i];
      n_done = 0;
      @(negedge clk);
      start = 1; dir = t[0]; buf_sel = 2'(b); mem_addr_start = ma;
      buf_addr_start = BUF_AW'(ba); len = (BUF_AW+1)'(l);
      @(negedge clk) start = 0;
      cyc = 0;
      while (!done && cyc < 2000) begin
        @(negedge clk); cyc++;
        if (buf_req && (int'(buf_addr) < ba || int'(buf_addr) >= ba + l || buf_id != 2'(b))) begin
          failures++; $display("FAIL buffer access outside range");
        end
      end
      @(negedge clk);
      checks++;
      if (n_done != 1 || busy) begin failures++; $display("FAIL done count %0d", n_done); end
      for (int i = 0; i < BUFW; i++) begin
        logic [31:0] ev;
        ev = snap_b[b][i];
        if (!t[0] && i >= ba && i < ba + l) ev = snap_m[ma + i - ba];
        checks++;
        if (bufs[b][i] !== ev) begin failures++; if (failures < 10) $display("FAIL buf %0d[%0d]", b, i); end
      end
      for (int i = 0; i < MEMW; i++) begin
        logic [31:0] ev;
        ev = snap_m[i];
        if (t[0] && i >= ma && i < ma + l) ev = snap_b[b][ba + i - ma];
        if (u_mem.mem[i] !== ev) begin
          checks++; failures++;
          if (failures < 10) $display("FAIL mem[%0d] %h exp %h", i, u_mem.mem[i], ev);
        end
      end
      checks++;
    end
    // zero-length transfer finishes at once
    n_done = 0;
    @(negedge clk); start = 1; len = 0;
    @(negedge clk); start = 0;
    @(negedge clk);
    checks++;
    if (n_done != 1) failures++;
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
