// tb_dram_mat: self-checking test of one DRAF MAT.
// Loads random rows, reads them back with the PRE-ACT-RST sequence, checks
// that a MAT whose context enable is low ignores commands, that a read
// restores the row (a second read returns the same data), and that a
// precharge before restore loses the row and sets restore_err.
module tb_dram_mat;
  import draf_pkg::*;
  localparam int RB = 6, W = 4, NR = 2**RB;
  logic clk = 0, rst_n = 0;
  logic [RB-1:0] row;
  logic ctx_en, cfg_we, sa_valid, restore_err;
  logic [RB-1:0] cfg_row;
  logic [W-1:0] cfg_data, sa;
  dram_cmd_e cmd;
  logic [W-1:0] model [NR];
  int checks = 0, failures = 0;

  dram_mat #(.ROW_BITS(RB), .SA_W(W), .T_RST(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_cmd(input dram_cmd_e c, input int n);
    repeat (n) begin cmd = c; @(posedge clk); #1; end
    cmd = CMD_NOP;
  endtask

  task automatic read_row(input int r, input bit restore);
    row = RB'(r);
    do_cmd(CMD_PRE, 2);
    do_cmd(CMD_ACT, 2);
    if (restore) do_cmd(CMD_RST, 2);
  endtask

  initial begin
    row = '0; ctx_en = 1; cfg_we = 0; cfg_row = '0; cfg_data = '0; cmd = CMD_NOP;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < NR; r++) begin
      model[r] = W'($urandom);
      cfg_we = 1; cfg_row = RB'(r); cfg_data = model[r];
      @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int i = 0; i < 40; i++) begin
      int r;
      r = $urandom_range(NR-1);
      read_row(r, 1);
      check(sa == model[r] && sa_valid, $sformatf("read row %0d got %h exp %h", r, sa, model[r]));
      read_row(r, 1);
      check(sa == model[r], $sformatf("re-read row %0d after restore", r));
    end
    // Disabled context: commands ignored.
    begin
      logic [W-1:0] held;
      held = sa;
      ctx_en = 0;
      read_row(5, 1);
      check(sa == held && sa_valid, "disabled MAT must ignore commands");
      ctx_en = 1;
    end
    check(!restore_err, "no restore error in legal sequences");
    // Precharge before restore destroys the row.
    model[7] = 4'hA;
    cfg_we = 1; cfg_row = 7; cfg_data = 4'hA; @(posedge clk); #1; cfg_we = 0;
    read_row(7, 0);
    check(sa == 4'hA, "sensed before loss");
    read_row(7, 1);
    check(restore_err, "early precharge sets restore_err");
    check(sa == 4'h0, "row lost after early precharge");
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
