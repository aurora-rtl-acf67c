// tb_aurora_xbar: random selects and enables on an 11 x 14 crossbar;
// every output must equal the selected input, or 0 when disabled or when
// the select is out of range.
module tb_aurora_xbar;
  localparam int NI = 11, NO = 14, W = 32, SW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0]  in  [NI];
  logic [SW-1:0] sel [NO];
  logic          en  [NO];
  logic [W-1:0]  out [NO];
  logic          oen [NO];

  aurora_xbar #(.N_IN(NI), .N_OUT(NO), .W(W)) dut (.in, .sel, .en, .out, .out_en(oen));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NI; i++) in[i] = $urandom();
      for (int o = 0; o < NO; o++) begin
        sel[o] = SW'($urandom_range(0, 15));
        en[o]  = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        logic [W-1:0] exp_v;
        logic         exp_e;
        exp_e = en[o] && (sel[o] < NI);
        exp_v = exp_e ? in[sel[o]] : '0;
        checks++;
        if (out[o] !== exp_v || oen[o] !== exp_e) begin
          failures++;
          if (failures < 10) $display("FAIL out%0d sel=%0d en=%b got %h exp %h", o, sel[o], en[o], out[o], exp_v);
        end
      end
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
