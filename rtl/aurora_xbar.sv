// aurora_xbar: M x N crossbar switch of a tile.
//
// Each of the N_OUT outputs picks any one of the N_IN inputs, chosen by its
// own select field, or is disabled (output 0, out_en low). Combinational;
// the registers at the outputs live in the tile. The number of inputs and
// outputs is a parameter, as in the template; the per-output enable is this
// design's choice.
module aurora_xbar #(
  parameter int N_IN  = 11,
  parameter int N_OUT = 14,
  parameter int W     = 32,
  localparam int SW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [W-1:0]  in     [N_IN],
  input  logic [SW-1:0] sel    [N_OUT],
  input  logic          en     [N_OUT],
  output logic [W-1:0]  out    [N_OUT],
  output logic          out_en [N_OUT]
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out[o]    = '0;
      out_en[o] = 1'b0;
      if (en[o] && (int'(sel[o]) < N_IN)) begin
        out[o]    = in[sel[o]];
        out_en[o] = 1'b1;
      end
    end
  end

endmodule
