// tb_aurora_data_buffer: random tile loads/stores on four ports, random
// DMA accesses and random half swaps, against a model of both halves.
// Checks grant/conflict per port (lowest port wins a bank), tile read
// data one cycle later, DMA read data one cycle later, and that DMA and
// tiles never see each other's half.
module tb_aurora_data_buffer;
  import aurora_pkg::*;
  localparam int NP = 4, NB = 2, BD = 16, AW = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_conflicts = 0, n_swaps = 0;

  logic              array_half;
  mem_req_t          tile_req   [NP];
  logic [DATA_W-1:0] tile_rdata [NP];
  logic [NP-1:0]     conflict;
  logic              dma_req, dma_we;
  logic [AW-1:0]     dma_addr;
  logic [DATA_W-1:0] dma_wdata, dma_rdata;

  aurora_data_buffer #(.NPORTS(NP), .NBANKS(NB), .BANK_DEPTH(BD)) dut (.*);

  logic [DATA_W-1:0] model [2][NB*BD];
  logic [DATA_W-1:0] exp_rd [NP];
  logic              exp_rv [NP];
  logic [DATA_W-1:0] exp_drd;
  logic              exp_drv;

  initial begin
    array_half = 0; dma_req = 0; dma_we = 0; dma_addr = 0; dma_wdata = 0;
    for (int p = 0; p < NP; p++) tile_req[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill both halves through the DMA port so every read is defined
    for (int h = 0; h < 2; h++) begin
      @(negedge clk) array_half = (h == 0);
      for (int a = 0; a < NB*BD; a++) begin
        @(negedge clk);
        dma_req = 1; dma_we = 1; dma_addr = AW'(a); dma_wdata = $urandom();
        model[!array_half][a] = dma_wdata;
      end
      @(negedge clk) dma_req = 0;
    end
    for (int t = 0; t < 5000; t++) begin
      logic busy [NB];
      logic [NP-1:0] exp_cf;
      @(negedge clk);
      if ($urandom_range(0, 30) == 0) begin array_half = !array_half; n_swaps++; end
      for (int p = 0; p < NP; p++) begin
        tile_req[p].req   = ($urandom_range(0, 2) != 0);
        tile_req[p].we    = ($urandom_range(0, 3) == 0);
        tile_req[p].addr  = $urandom();        // upper bits must be ignored
        tile_req[p].wdata = $urandom();
      end
      dma_req = $urandom_range(0, 1); dma_we = $urandom_range(0, 1);
      dma_addr = AW'($urandom()); dma_wdata = $urandom();
      #1;
      for (int b = 0; b < NB; b++) busy[b] = 0;
      exp_cf = '0;
      for (int p = 0; p < NP; p++) begin
        int a, b;
        a = int'(tile_req[p].addr[AW-1:0]);
        b = a % NB;
        exp_rv[p] = 0;
        if (tile_req[p].req) begin
          if (busy[b]) begin
            exp_cf[p] = 1;
            if (!tile_req[p].we) begin exp_rv[p] = 1; exp_rd[p] = '0; end
          end else begin
            busy[b] = 1;
            if (!tile_req[p].we) begin exp_rv[p] = 1; exp_rd[p] = model[array_half][a]; end
          end
        end
      end
      exp_drv = dma_req && !dma_we;
      exp_drd = model[!array_half][dma_addr];
      checks++;
      if (conflict !== exp_cf) begin
        failures++;
        if (failures < 10) $display("FAIL conflict %b exp %b", conflict, exp_cf);
      end
      n_conflicts += $countones(exp_cf);
      @(posedge clk);
      // model writes (same priority rule)
      for (int b = 0; b < NB; b++) busy[b] = 0;
      for (int p = 0; p < NP; p++) begin
        int a, b;
        a = int'(tile_req[p].addr[AW-1:0]);
        b = a % NB;
        if (tile_req[p].req && !busy[b]) begin
          busy[b] = 1;
          if (tile_req[p].we) model[array_half][a] = tile_req[p].wdata;
        end
      end
      if (dma_req && dma_we) model[!array_half][dma_addr] = dma_wdata;
      #1;
      for (int p = 0; p < NP; p++) if (exp_rv[p]) begin
        checks++;
        if (tile_rdata[p] !== exp_rd[p]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d rdata %h exp %h", p, tile_rdata[p], exp_rd[p]);
        end
      end
      if (exp_drv) begin
        checks++;
        if (dma_rdata !== exp_drd) begin
          failures++;
          if (failures < 10) $display("FAIL dma rdata %h exp %h", dma_rdata, exp_drd);
        end
      end
    end
    checks++;
    if (n_conflicts == 0 || n_swaps == 0) failures++;
    $display("conflicts=%0d swaps=%0d", n_conflicts, n_swaps);
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
