// tb_clb: a CLB running a small mapped design over real user cycles.
// Context 0:
//   BLE0  phase 0, bypassed: random function of clb_in[7:0]
//   BLE1  phase 1, registered: random function of BLE0's two outputs and
//         clb_in[13:8] (LUT chaining through the local interconnect)
//   BLE2  phase 0, registered: 2-bit counter fed back through the local
//         interconnect, counting when clb_in[14] is 1
// Context 1: BLE0 reads clb_in[15:8] through different local selects.
// A reference model computes every output from the truth tables. Also
// checks that ref_step advances the shared refresh row counter.
module tb_clb;
  import draf_pkg::*;
  localparam int TP = 2, TA = 2, TR = 2, D = 3, PL = D + TA, NPH = 2;
  logic clk = 0, rst_n = 0;
  logic [15:0] clb_in;
  logic [2:0] ctx;
  logic [7:0] ctx_en;
  logic run, ucyc_end, ref_mode, ref_step, restore_err;
  logic [3:0] cur_phase;
  logic [2:0] cip;
  dram_cmd_e ref_cmd;
  cfg_wr_t cfg;
  logic [15:0] clb_out;
  logic [3:0] t0 [64], t1 [64], t2 [64], t3 [64];
  int checks = 0, failures = 0;

  clb #(.CLB_UNIT(2), .UNIT0(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wcfg(cfg_kind_e k, int unit, int idx, int c, int data);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.unit = 8'(unit); cfg.idx = 12'(idx); cfg.ctx = 4'(c); cfg.data = 32'(data);
    @(posedge clk); #1; cfg = '0;
  endtask

  task automatic local_sel(int k, int pin, int c, int sel);
    wcfg(CFG_LOCAL, 2, k*8 + pin, c, sel);
  endtask

  function automatic logic [1:0] lut2(logic [3:0] row, logic [7:0] in);
    return {row[2 + in[7]], row[in[6]]};
  endfunction

  task automatic user_cycle(input logic [15:0] in);
    clb_in = in; run = 1;
    for (int ph = 0; ph <= NPH; ph++)
      for (int c = 0; c < ((ph == NPH) ? TR : PL); c++) begin
        cur_phase = 4'(ph); cip = 3'(c);
        ucyc_end = (ph == NPH) && (c == TR - 1);
        @(posedge clk); #1;
      end
    ucyc_end = 0;
  endtask

  initial begin
    logic [1:0] b0, q1, cnt;
    logic [7:0] a1;
    logic [15:0] in;
    clb_in = 0; run = 0; ucyc_end = 0; ref_mode = 0; ref_step = 0; ref_cmd = CMD_NOP;
    cur_phase = 0; cip = 0; cfg = '0; ctx = 0; ctx_en = 8'b1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      t0[r] = 4'($urandom); t1[r] = 4'($urandom); t3[r] = 4'($urandom);
      // counter: row = {.., en(bit2), q1, q0}; both column cells equal
      begin
        logic [1:0] q, n;
        q = 2'(r); n = r[2] ? q + 2'd1 : q;
        t2[r] = {n[1], n[1], n[0], n[0]};
      end
      wcfg(CFG_LUT_ROW, 8, r, 0, t0[r]);
      wcfg(CFG_LUT_ROW, 9, r, 0, t1[r]);
      wcfg(CFG_LUT_ROW, 10, r, 0, t2[r]);
      wcfg(CFG_LUT_ROW, 8, r, 1, t3[r]);
    end
    wcfg(CFG_BLE, 8, 0, 0, {1'b0, 4'b1111, 4'd0});
    wcfg(CFG_BLE, 9, 0, 0, {1'b0, 4'b0000, 4'd1});
    wcfg(CFG_BLE, 10, 0, 0, {1'b0, 4'b0000, 4'd0});
    wcfg(CFG_BLE, 8, 0, 1, {1'b0, 4'b1111, 4'd0});
    for (int p = 0; p < 8; p++) local_sel(0, p, 0, p);                  // BLE0 <- in[7:0]
    local_sel(1, 0, 0, 16 + 0); local_sel(1, 1, 0, 16 + 1);             // BLE1 <- BLE0
    for (int p = 2; p < 8; p++) local_sel(1, p, 0, 8 + p - 2);          // BLE1 <- in[13:8]
    local_sel(2, 0, 0, 16 + 8); local_sel(2, 1, 0, 16 + 9);             // BLE2 <- own outputs
    local_sel(2, 2, 0, 14);                                             // enable
    for (int p = 3; p < 8; p++) local_sel(2, p, 0, 15);
    for (int p = 0; p < 8; p++) local_sel(0, p, 1, 15 - p);             // ctx 1
    cnt = 0; q1 = 0;
    for (int i = 0; i < 60; i++) begin
      logic [1:0] exp_q1, exp_cnt;
      logic [7:0] i1;
      in = 16'($urandom);
      b0 = lut2(t0[in[5:0]], in[7:0]);
      i1 = {in[13:8], b0};
      exp_q1 = lut2(t1[i1[5:0]], i1);
      exp_cnt = in[14] ? cnt + 2'd1 : cnt;
      user_cycle(in);
      check(clb_out[1:0] == b0, "BLE0 bypass output");
      check(clb_out[5:4] == exp_q1, "BLE1 chained registered output");
      check(clb_out[9:8] == exp_cnt, $sformatf("counter %0d exp %0d", clb_out[9:8], exp_cnt));
      cnt = exp_cnt;
    end
    ctx = 1; ctx_en = 8'b10;
    for (int i = 0; i < 20; i++) begin
      logic [7:0] r;
      in = 16'($urandom);
      for (int p = 0; p < 8; p++) r[p] = in[15 - p];
      user_cycle(in);
      check(clb_out[1:0] == lut2(t3[r[5:0]], r), "ctx1 local routing");
    end
    ctx = 0; ctx_en = 8'b1;
    #1 check(clb_out[9:8] == cnt, "counter held while ctx1 ran");
    begin
      logic [5:0] r0;
      r0 = dut.ref_row;
      repeat (70) begin ref_step = 1; @(posedge clk); #1; end
      ref_step = 0;
      check(dut.ref_row == r0 + 6'd70, "refresh row counter");
    end
    check(!restore_err, "no restore error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
