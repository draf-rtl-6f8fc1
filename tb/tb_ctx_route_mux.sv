// tb_ctx_route_mux: writes a different select for each of the 8 contexts of
// a 12-source multi-context routing mux and checks, for random sources and
// every context, that the output follows that context's select; selects
// beyond the source count give 0.
module tb_ctx_route_mux;
  logic clk = 0, rst_n = 0;
  logic [11:0] src;
  logic [2:0] ctx, cfg_ctx;
  logic cfg_we, dout;
  logic [3:0] cfg_sel;
  logic [3:0] sel_m [8];
  int checks = 0, failures = 0;

  ctx_route_mux #(.N_SRC(12), .N_CTX(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    src = 0; ctx = 0; cfg_ctx = 0; cfg_we = 0; cfg_sel = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      sel_m[c] = (c == 5) ? 4'd14 : 4'($urandom_range(11));
      cfg_we = 1; cfg_ctx = 3'(c); cfg_sel = sel_m[c];
      @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int i = 0; i < 200; i++) begin
      src = 12'($urandom); ctx = 3'($urandom);
      #1;
      checks++;
      if (dout !== ((sel_m[ctx] < 12) ? src[sel_m[ctx]] : 1'b0)) begin
        failures++; $display("FAIL ctx %0d sel %0d", ctx, sel_m[ctx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
