// tb_dsp_block: random signed 25 x 18 products. The operands are changed
// after the evaluation instant of the configured phase; the product must be
// the one of the operands present at that instant and must appear in the
// cycle after it. Two contexts with different phases are used.
module tb_dsp_block;
  import draf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [24:0] a;
  logic signed [17:0] b;
  logic [2:0] ctx;
  logic run;
  logic [3:0] cur_phase;
  logic [2:0] cip;
  cfg_wr_t cfg;
  logic signed [42:0] p;
  int checks = 0, failures = 0;

  dsp_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0; ctx = 0; run = 1; cur_phase = 0; cip = 0; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cfg.we = 1; cfg.kind = CFG_DSP; cfg.unit = 0; cfg.ctx = 0; cfg.data = 2; @(posedge clk); #1;
    cfg.ctx = 1; cfg.data = 0; @(posedge clk); #1; cfg.we = 0;
    for (int i = 0; i < 200; i++) begin
      logic signed [24:0] ea; logic signed [17:0] eb; logic signed [42:0] exp;
      int ph;
      ctx = 3'(i % 2);
      ph = (i % 2) ? 0 : 2;
      if (i == 0) begin ea = 25'h1000000; eb = 18'h20000; end   // most negative operands
      else begin ea = 25'($urandom); eb = 18'($urandom); end
      a = ea; b = eb; cur_phase = 4'(ph); cip = 3;              // evaluation instant
      @(posedge clk); #1;
      a = ~ea; b = ~eb; cip = 4;                                 // later change ignored
      exp = 43'(ea) * 43'(eb);
      checks++;
      if (p !== exp) begin failures++; $display("FAIL %0d*%0d=%0d got %0d", ea, eb, exp, p); end
      cur_phase = 4'(ph + 1); cip = 3;                          // other phase: hold
      @(posedge clk); #1;
      checks++;
      if (p !== exp) begin failures++; $display("FAIL hold"); end
    end
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
