// tb_context_counter: a switch request must change the context only at the
// end of the current user cycle, with one-hot context enables; during
// refresh the enables must equal the configured used-context mask.
module tb_context_counter;
  import draf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sw_valid, ucyc_end, ref_mode;
  logic [2:0] sw_ctx, ctx;
  cfg_wr_t cfg;
  logic [7:0] ctx_en, used_mask;
  int checks = 0, failures = 0;

  context_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sw_valid = 0; sw_ctx = 0; ucyc_end = 0; ref_mode = 0; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(ctx == 0 && ctx_en == 8'b1 && used_mask == 8'hFF, "reset state");
    for (int i = 0; i < 30; i++) begin
      logic [2:0] old, nw;
      old = ctx; nw = 3'($urandom);
      sw_valid = 1; sw_ctx = nw; @(posedge clk); #1; sw_valid = 0;
      repeat ($urandom_range(5)) begin
        check(ctx == old, "context holds until user-cycle end");
        @(posedge clk); #1;
      end
      ucyc_end = 1; @(posedge clk); #1; ucyc_end = 0;
      check(ctx == nw, $sformatf("switched to %0d", nw));
      check(ctx_en == (8'b1 << nw), "one-hot enable");
    end
    // switch requested in the last cycle itself
    sw_valid = 1; sw_ctx = 3'd6; ucyc_end = 1; @(posedge clk); #1; sw_valid = 0; ucyc_end = 0;
    check(ctx == 6, "switch on the boundary cycle");
    cfg.we = 1; cfg.kind = CFG_GLOBAL; cfg.idx = 1; cfg.data = 32'h0000_0025; @(posedge clk); #1; cfg.we = 0;
    ref_mode = 1; #1;
    check(ctx_en == 8'h25, "refresh enables used contexts");
    ref_mode = 0; #1;
    check(ctx_en == 8'h40, "back to one-hot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
