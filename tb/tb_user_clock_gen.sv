// tb_user_clock_gen: checks the user-cycle length (nph phases of
// DELTA+T_ACT cycles plus a T_RST tail) for two contexts with different
// phase counts, the phase/cycle counting against a reference counter, and
// that a pause request stops the timing exactly at a user-cycle boundary.
module tb_user_clock_gen;
  import draf_pkg::*;
  localparam int TA = 2, TR = 2, D = 3, PL = D + TA;
  logic clk = 0, rst_n = 0;
  logic [2:0] ctx;
  logic pause_req, ucyc_end, run, paused;
  cfg_wr_t cfg;
  logic [3:0] cur_phase;
  logic [2:0] cip;
  int checks = 0, failures = 0;

  user_clock_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int nph);
    int n, ph, c;
    // align to a boundary
    while (!ucyc_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    n = 1; ph = 0; c = 0;
    while (!ucyc_end) begin
      check(cur_phase == 4'(ph) && cip == 3'(c), $sformatf("phase %0d/%0d cip %0d/%0d", cur_phase, ph, cip, c));
      c++;
      if (ph < nph && c == PL) begin ph++; c = 0; end
      @(posedge clk); #1; n++;
    end
    check(n == nph*PL + TR, $sformatf("user cycle %0d cycles, expected %0d", n, nph*PL + TR));
  endtask

  initial begin
    ctx = 0; pause_req = 0; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cfg.we = 1; cfg.kind = CFG_GLOBAL; cfg.idx = 0; cfg.ctx = 0; cfg.data = 3; @(posedge clk); #1;
    cfg.ctx = 1; cfg.data = 1; @(posedge clk); #1;
    cfg.ctx = 2; cfg.data = 7; @(posedge clk); #1;
    cfg.we = 0;
    measure(3); measure(3);
    while (!ucyc_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    ctx = 1;
    measure(1);
    @(posedge clk); #1;
    ctx = 2;
    measure(7);
    // pause at boundary
    @(posedge clk); #1;
    ctx = 0;
    @(posedge clk); #1;
    pause_req = 1;
    while (!ucyc_end) begin check(!paused && run, "running until boundary"); @(posedge clk); #1; end
    @(posedge clk); #1;
    check(paused && !run && cur_phase == 0 && cip == 0, "paused at boundary");
    repeat (20) begin check(!ucyc_end && !run, "no user cycle while paused"); @(posedge clk); #1; end
    pause_req = 0;
    @(posedge clk); #1;
    check(run, "resumed");
    measure(3);
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
