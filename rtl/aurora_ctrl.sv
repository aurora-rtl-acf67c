// aurora_ctrl: invocation controller of the accelerator.
//
// The host starts a kernel with its initiation interval `ii` (number of
// configuration words each tile cycles through, 1..CFG_DEPTH) and `iter`,
// the number of loop iterations of this invocation, prologue and epilogue
// included. The controller then enables the array for exactly ii * iter
// cycles, stepping cfg_idx 0, 1, .., ii-1, 0, .. in every cycle, and
// raises `done` (the accelerator's response) for one cycle at the end;
// this is the II x #iter compute time of the performance model.
// `swap` exchanges the two halves of every data buffer (double buffering);
// it is ignored while a kernel runs. A start with ii or iter of zero, or
// ii above CFG_DEPTH, finishes at once.
//
// The cycle a start is accepted, `clr` clears the tile registers so that
// every invocation starts from zeros.
//
// Timing: start sampled in cycle t; en is high from t+1 to t+ii*iter; done
// is high in cycle t+ii*iter+1. The interface and the encoding are this
// design's own.
module aurora_ctrl #(
  parameter int  CFG_DEPTH = 8,
  localparam int CAW       = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [CAW:0]   ii,
  input  logic [31:0]    iter,
  input  logic           swap,
  output logic           en,
  output logic           clr,
  output logic [CAW-1:0] cfg_idx,
  output logic           busy,
  output logic           done,
  output logic           array_half
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e      state;
  logic [31:0] it_cnt;
  logic [CAW:0] ii_q;
  logic [31:0] iter_q;

  assign en   = (state == S_RUN);
  assign clr  = (state == S_IDLE) && start;
  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cfg_idx    <= '0;
      it_cnt     <= '0;
      ii_q       <= '0;
      iter_q     <= '0;
      array_half <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cfg_idx <= '0;
          it_cnt  <= '0;
          if (swap) array_half <= !array_half;
          if (start) begin
            ii_q   <= ii;
            iter_q <= iter;
            if (ii == '0 || iter == '0 || int'(ii) > CFG_DEPTH) state <= S_DONE;
            else                                                state <= S_RUN;
          end
        end
        S_RUN: begin
          if ({1'b0, cfg_idx} == ii_q - 1'b1) begin
            cfg_idx <= '0;
            it_cnt  <= it_cnt + 1;
            if (it_cnt == iter_q - 1) state <= S_DONE;
          end else begin
            cfg_idx <= cfg_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

endmodule
