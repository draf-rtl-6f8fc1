// tb_lut_subarray: checks the multi-context LUT subarray.
// Every context gets its own random truth table. Reads with one-hot context
// enables must return that context's row and leave the other MATs alone;
// address changes after the first ACT cycle must not matter (row and column
// latches); refresh mode must activate every enabled MAT on ref_row without
// touching the column latch.
module tb_lut_subarray;
  import draf_pkg::*;
  localparam int NC = 8, RB = 6, W = 4, NR = 64;
  logic clk = 0, rst_n = 0;
  logic [7:0] lut_in;
  logic [NC-1:0] ctx_en;
  dram_cmd_e cmd;
  logic ref_mode, cfg_we, restore_err;
  logic [RB-1:0] ref_row, cfg_row;
  logic [2:0] cfg_ctx;
  logic [W-1:0] cfg_data;
  logic [W-1:0] sa [NC];
  logic [1:0] col_q;
  logic [W-1:0] model [NC][NR];
  int checks = 0, failures = 0;

  lut_subarray dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_cmd(input dram_cmd_e c, input int n);
    repeat (n) begin cmd = c; @(posedge clk); #1; end
    cmd = CMD_NOP;
  endtask

  initial begin
    lut_in = 0; ctx_en = 0; cmd = CMD_NOP; ref_mode = 0; ref_row = 0;
    cfg_we = 0; cfg_row = 0; cfg_ctx = 0; cfg_data = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++) begin
        model[c][r] = W'($urandom);
        cfg_we = 1; cfg_ctx = 3'(c); cfg_row = RB'(r); cfg_data = model[c][r];
        @(posedge clk); #1;
      end
    cfg_we = 0;
    for (int i = 0; i < 60; i++) begin
      int c;
      logic [W-1:0] sa_prev [NC];
      logic [7:0] in;
      c = $urandom_range(NC-1);
      in = 8'($urandom);
      sa_prev = sa;
      ctx_en = '0; ctx_en[c] = 1'b1;
      lut_in = in;
      do_cmd(CMD_PRE, 2);
      cmd = CMD_ACT; @(posedge clk); #1;
      lut_in = ~in;                       // must be ignored: address latched
      cmd = CMD_ACT; @(posedge clk); #1;
      do_cmd(CMD_RST, 2);
      check(sa[c] == model[c][in[5:0]], $sformatf("ctx %0d row %0d", c, in[5:0]));
      check(col_q == in[7:6], "column address latched");
      for (int o = 0; o < NC; o++)
        if (o != c) check(sa[o] == sa_prev[o], "other contexts untouched");
    end
    // Refresh of contexts 1, 3 and 6 on row 9.
    begin
      logic [1:0] colh;
      colh = col_q;
      ref_mode = 1; ref_row = 9; ctx_en = 8'b0100_1010;
      do_cmd(CMD_PRE, 2); do_cmd(CMD_ACT, 2); do_cmd(CMD_RST, 2);
      ref_mode = 0;
      check(sa[1] == model[1][9] && sa[3] == model[3][9] && sa[6] == model[6][9], "refresh activates all enabled MATs");
      check(col_q == colh, "refresh leaves column latch");
    end
    check(!restore_err, "no restore error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
