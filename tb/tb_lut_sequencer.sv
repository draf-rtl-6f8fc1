// tb_lut_sequencer: sweeps every phase position of a 4-phase user cycle for
// LUTs of phase 0..3 and compares the command with a reference schedule:
// PRE in the T_PRE cycles ending at DELTA, ACT from DELTA to the phase end,
// RST in the first T_RST cycles of the next phase; nothing when not running.
module tb_lut_sequencer;
  import draf_pkg::*;
  localparam int TP = 2, TA = 2, TR = 2, D = 3, PL = D + TA;
  logic run;
  logic [3:0] cur_phase, my_phase;
  logic [2:0] cip;
  dram_cmd_e cmd;
  logic eval;
  int checks = 0, failures = 0;
  int n_pre, n_act, n_rst;

  lut_sequencer dut (.*);

  initial begin
    for (int r = 0; r < 2; r++)
      for (int mp = 0; mp < 4; mp++) begin
        n_pre = 0; n_act = 0; n_rst = 0;
        for (int ph = 0; ph <= 4; ph++)
          for (int c = 0; c < PL; c++) begin
            dram_cmd_e exp; bit exp_eval;
            run = r[0]; my_phase = 4'(mp); cur_phase = 4'(ph); cip = 3'(c);
            #1;
            exp = CMD_NOP;
            if (r && ph == mp && c >= D - TP && c < D) exp = CMD_PRE;
            else if (r && ph == mp && c >= D)          exp = CMD_ACT;
            else if (r && ph == mp + 1 && c < TR)      exp = CMD_RST;
            exp_eval = r && ph == mp && c == D;
            checks++;
            if (cmd != exp || eval != exp_eval) begin
              failures++;
              $display("FAIL run=%0d my=%0d ph=%0d cip=%0d cmd=%0d exp=%0d", r, mp, ph, c, cmd, exp);
            end
            n_pre += (cmd == CMD_PRE); n_act += (cmd == CMD_ACT); n_rst += (cmd == CMD_RST);
          end
        if (r) begin
          checks++;
          if (n_pre != TP || n_act != TA || n_rst != TR) begin
            failures++; $display("FAIL cycle counts %0d %0d %0d", n_pre, n_act, n_rst);
          end
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
