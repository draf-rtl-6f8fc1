// tb_bram_block: random reads and writes through all six width modes, each
// set up in its own context, plus two partitioned contexts. A bit-level
// reference model maps each access to word bits independently of the RTL:
// for 9/18/36-bit widths access k of a word covers bits k*W..k*W+W-1, for
// 1/2/4-bit widths it covers data bits k*W.. of the word, data bit d being
// word bit 9*(d/8) + d%8. The port is read-first.
module tb_bram_block;
  import draf_pkg::*;
  localparam int D = 1024;
  logic clk = 0, rst_n = 0;
  logic [14:0] addr;
  logic [35:0] din, dout;
  logic we, run;
  logic [2:0] ctx;
  logic [3:0] cur_phase;
  logic [2:0] cip;
  cfg_wr_t cfg;
  logic [35:0] model [D];
  int widths [6] = '{1, 2, 4, 9, 18, 36};
  int checks = 0, failures = 0;
  int n_part = 0;

  bram_block dut (.*);
  always #5 clk = ~clk;

  function automatic int bitpos(int w, int k, int j);
    int d;
    if (w >= 9) return k*w + j;
    d = k*w + j;
    return 9*(d/8) + d%8;
  endfunction

  initial begin
    addr = 0; din = 0; we = 0; run = 1; ctx = 0; cur_phase = 0; cip = 0; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // Zero the memory through the 36-bit context (ctx 5, phase 1).
    for (int c = 0; c < 8; c++) begin
      // {part, width, phase}
      int wm;
      wm = (c < 6) ? c : ((c == 6) ? 5 : 3);
      cfg.we = 1; cfg.kind = CFG_BRAM; cfg.unit = 0; cfg.ctx = 4'(c);
      cfg.data = {24'd0, (c >= 6) ? 1'b1 : 1'b0, 3'(wm), 4'd1};
      @(posedge clk); #1;
    end
    cfg.we = 0;
    ctx = 5; cur_phase = 1;
    for (int i = 0; i < D; i++) begin
      addr = 15'(i); din = '0; we = 1; cip = 3; @(posedge clk); #1; cip = 0;
      model[i] = '0;
    end
    for (int i = 0; i < 3000; i++) begin
      int c, w, nper, word, k, wbits;
      logic [35:0] exp;
      c = $urandom_range(7);
      w = (c < 6) ? widths[c] : ((c == 6) ? 36 : 9);
      nper = (w >= 9) ? 36 / w : 32 / w;
      wbits = $clog2(nper);
      addr = 15'($urandom);
      if (w == 36) addr[14:10] = 0;
      if (w == 18) addr[14:11] = 0;
      if (w == 9)  addr[14:12] = 0;
      if (w == 4)  addr[14:13] = 0;
      if (w == 2)  addr[14] = 0;
      word = int'(addr) >> wbits;
      k = int'(addr) & (nper - 1);
      if (c >= 6) begin word = (word & 127) | (c << 7); n_part++; end
      ctx = 3'(c);
      din = {$urandom, $urandom} & 36'hF_FFFF_FFFF;
      we = 1'($urandom);
      exp = '0;
      for (int j = 0; j < w; j++) exp[j] = model[word][bitpos(w, k, j)];
      cip = 3;                // evaluation instant of phase 1
      @(posedge clk); #1;
      cip = 0;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL ctx %0d width %0d addr %0d got %h exp %h", c, w, addr, dout, exp);
      end
      if (we) for (int j = 0; j < w; j++) model[word][bitpos(w, k, j)] = din[j];
      // away from the evaluation instant nothing may change
      addr = ~addr; we = 1; @(posedge clk); #1;
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL hold"); end
    end
    // the partitioned contexts must have been exercised
    checks++;
    if (n_part == 0) begin failures++; $display("FAIL no partitioned access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
