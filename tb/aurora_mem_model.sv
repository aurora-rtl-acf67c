// aurora_mem_model: behavioural system memory for the testbenches.
//
// Request/grant bus with one outstanding access: a request is granted
// after 0..MAX_WAIT random cycles (mem_gnt high for one cycle); a read's
// data comes back with rvalid 1..MAX_WAIT cycles after the grant. Writes
// complete at the grant. Not synthesizable logic of the design; the words
// are reachable as `mem` for the testbench.
module aurora_mem_model #(
  parameter int WORDS    = 4096,
  parameter int MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  int          wait_cnt, rd_cnt;
  logic        rd_pend;
  logic [31:0] rd_addr;
  int          n_grants = 0;

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt <= 0; rvalid <= 0; rdata <= 0; rd_pend <= 0;
      wait_cnt <= 0; rd_cnt <= 0; rd_addr <= 0;
    end else begin
      gnt    <= 0;
      rvalid <= 0;
      if (rd_pend) begin
        if (rd_cnt == 0) begin
          rvalid  <= 1;
          rdata   <= mem[rd_addr % WORDS];
          rd_pend <= 0;
        end else rd_cnt <= rd_cnt - 1;
      end else if (req && !gnt) begin
        if (wait_cnt == 0) begin
          gnt <= 1;
          n_grants <= n_grants + 1;
          wait_cnt <= $urandom_range(0, MAX_WAIT);
          if (we) mem[addr % WORDS] <= wdata;
          else begin
            rd_pend <= 1;
            rd_addr <= addr;
            rd_cnt  <= $urandom_range(0, MAX_WAIT - 1);
          end
        end else wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
