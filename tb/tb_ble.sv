// tb_ble: end-to-end test of one basic logic element over real user cycles.
// The testbench generates the phase timing itself (2 phases of DELTA+T_ACT
// cycles plus a T_RST tail). Three contexts hold different random truth
// tables and modes:
//   ctx 0  phase 0, outputs registered       -> f(in) appears after the cycle
//   ctx 1  phase 1, outputs bypassed         -> f(in) valid by cycle end
//   ctx 2  phase 0, fractured, bypassed      -> the 4 cells of the row
// Expected outputs come from the truth tables: output o of a normal LUT is
// cell [o*2 + in[6+o]] of row in[5:0]. Also checked: inputs changed after
// the activation are ignored, a context's FFs hold while another context
// runs, refresh of all contexts keeps the data, no restore error occurs.
module tb_ble;
  import draf_pkg::*;
  localparam int TP = 2, TA = 2, TR = 2, D = 3, PL = D + TA, NPH = 2;
  logic clk = 0, rst_n = 0;
  logic [7:0] lut_in;
  logic [2:0] ctx;
  logic [7:0] ctx_en;
  logic run, ucyc_end, ref_mode, restore_err;
  logic [3:0] cur_phase;
  logic [2:0] cip;
  dram_cmd_e ref_cmd;
  logic [5:0] ref_row;
  cfg_wr_t cfg;
  logic [3:0] dout;
  logic [3:0] tt [3][64];
  int checks = 0, failures = 0;

  ble #(.UNIT(5)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [3:0] f(int c, logic [7:0] in);
    if (c == 2) return tt[c][in[5:0]];
    return {2'b00, tt[c][in[5:0]][2 + in[7]], tt[c][in[5:0]][in[6]]};
  endfunction

  task automatic wcfg(cfg_kind_e k, int unit, int idx, int c, int data);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.unit = 8'(unit); cfg.idx = 12'(idx); cfg.ctx = 4'(c); cfg.data = 32'(data);
    @(posedge clk); #1; cfg = '0;
  endtask

  // One user cycle; returns at #1 after its last edge. 'late' is applied to
  // the inputs after the phase-1 activation started.
  task automatic user_cycle(input logic [7:0] in, input logic [7:0] late, output logic [3:0] at_end);
    lut_in = in; run = 1;
    for (int ph = 0; ph <= NPH; ph++)
      for (int c = 0; c < ((ph == NPH) ? TR : PL); c++) begin
        cur_phase = 4'(ph); cip = 3'(c);
        ucyc_end = (ph == NPH) && (c == TR - 1);
        if (ph == 1 && c == D + 1) lut_in = late;
        #1;
        if (ucyc_end) at_end = dout;
        @(posedge clk); #1;
      end
    ucyc_end = 0;
  endtask

  task automatic set_ctx(int c);
    ctx = 3'(c); ctx_en = 8'b1 << c;
  endtask

  initial begin
    logic [3:0] e, got;
    logic [7:0] in, prev;
    lut_in = 0; run = 0; ucyc_end = 0; ref_mode = 0; ref_cmd = CMD_NOP; ref_row = 0;
    cur_phase = 0; cip = 0; cfg = '0; set_ctx(0);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 3; c++)
      for (int r = 0; r < 64; r++) begin
        tt[c][r] = 4'($urandom);
        wcfg(CFG_LUT_ROW, 5, r, c, tt[c][r]);
      end
    wcfg(CFG_LUT_ROW, 4, 0, 0, 0);               // other unit: ignored
    // {frac, bypass[3:0], phase[3:0]}
    wcfg(CFG_BLE, 5, 0, 0, {1'b0, 4'b0000, 4'd0});
    wcfg(CFG_BLE, 5, 0, 1, {1'b0, 4'b1111, 4'd1});
    wcfg(CFG_BLE, 5, 0, 2, {1'b1, 4'b1111, 4'd0});
    // ctx 0: registered outputs, one cycle later
    set_ctx(0);
    prev = 8'($urandom);
    user_cycle(prev, prev, got);
    for (int i = 0; i < 30; i++) begin
      in = 8'($urandom);
      #1 check(dout == f(0, prev), $sformatf("ctx0 registered output for %h", prev));
      user_cycle(in, in, got);
      prev = in;
    end
    e = f(0, prev);
    // ctx 1: bypassed, phase 1, inputs changed after activation
    set_ctx(1);
    for (int i = 0; i < 30; i++) begin
      in = 8'($urandom);
      user_cycle(in, ~in, got);
      check(got == f(1, in), $sformatf("ctx1 bypass output for %h", in));
    end
    // ctx 2: fractured LUT
    set_ctx(2);
    for (int i = 0; i < 30; i++) begin
      in = 8'($urandom);
      user_cycle(in, in, got);
      check(got == f(2, in), "ctx2 fractured output");
    end
    // back to ctx 0: its FFs held
    set_ctx(0);
    #1 check(dout == e, "ctx0 FFs held across other contexts");
    // refresh all three contexts, all rows
    ref_mode = 1; ctx_en = 8'b0000_0111; run = 0;
    for (int r = 0; r < 64; r++) begin
      ref_row = 6'(r);
      repeat (TP) begin ref_cmd = CMD_PRE; @(posedge clk); #1; end
      repeat (TA) begin ref_cmd = CMD_ACT; @(posedge clk); #1; end
      repeat (TR) begin ref_cmd = CMD_RST; @(posedge clk); #1; end
    end
    ref_cmd = CMD_NOP; ref_mode = 0; set_ctx(0);
    #1 check(dout == e, "ctx0 FFs held across refresh");
    for (int c = 0; c < 3; c++) begin
      set_ctx(c);
      for (int i = 0; i < 10; i++) begin
        in = 8'($urandom);
        user_cycle(in, in, got);
        if (c == 0) begin #1 check(dout == f(0, in), "ctx0 after refresh"); end
        else check(got == f(c, in), "after refresh");
      end
    end
    check(!restore_err, "no restore error");
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
