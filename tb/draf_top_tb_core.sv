// draf_top_tb_core: end-to-end test of a DRAF array running two
// accelerators in two contexts, used by tb_draf_top (short refresh interval)
// and tb_draf_top_full (all parameters at their defaults).
//
// Context 0, a two-level logic design (2 phases per user cycle):
//   CLB0.BLE0  phase 0, bypassed:   a = A(dev_in[7:0])         -> dev_out[7:6]
//   CLB1.BLE0  phase 1, registered: B({dev_in[5:0], a})        -> dev_out[1:0]
//   CLB0.BLE1  phase 0, fractured:  C(dev_in[5:0]) (4 bits)    -> dev_out[5:2]
// Context 1, multiply and store (2 phases):
//   DSP        phase 0: p = dev_in[2:0] * dev_in[5:3]          -> dev_out[7:6] = p[1:0]
//   BRAM       phase 1, 9-bit width, partitioned by context:
//              read-first at addr dev_in[2:0], write p[5:0] if dev_in[6]
//                                                              -> dev_out[5:0]
// The host side alternates the contexts with switch requests and samples
// dev_out in the last internal cycle of every user cycle. A reference model
// predicts every sampled bit. Counted mechanisms: context switches, refresh
// pauses, phase-1 chained evaluations, registered and bypassed outputs,
// fractured LUT outputs, DSP products, BRAM writes and partitioned accesses.
module draf_top_tb_core #(
  parameter bit          FULL         = 1'b0,
  parameter int unsigned REF_INTERVAL = 3000,
  parameter int unsigned N_UCYC       = 400
);
  import draf_pkg::*;
  localparam int N_SRC_BASE_CLB = 8, N_SRC_DSP = 8 + 64, N_SRC_BRAM = 8 + 64 + 43;
  localparam int S_CLB = 8, S_DSPA = 8 + 64, S_DSPB = S_DSPA + 25, S_BA = S_DSPB + 18,
                 S_BD = S_BA + 15, S_BWE = S_BD + 36;
  localparam int N_TRACK = 32;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic sw_valid;
  logic [2:0] sw_ctx, ctx;
  logic [7:0] dev_in, dev_out;
  logic ucyc_end, busy, restore_err;
  int checks = 0, failures = 0;

  if (FULL) begin : g_full
    draf_top dut (.*);
  end else begin : g_short
    draf_top #(.REF_INTERVAL(REF_INTERVAL)) dut (.*);
  end

  always #5 clk = ~clk;

  logic [3:0] ta [64], tb_ [64], tc [64];
  logic [5:0] mem1 [8];
  bit         mem1_ok [8];
  int n_switch = 0, n_refresh = 0, n_chain = 0, n_reg = 0, n_bypass = 0, n_frac = 0,
      n_dsp = 0, n_bram_wr = 0, n_part = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wcfg(cfg_kind_e k, int unit, int idx, int c, int data);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.unit = 8'(unit); cfg.idx = 12'(idx); cfg.ctx = 4'(c); cfg.data = 32'(data);
    @(posedge clk); #1; cfg = '0;
  endtask
  task automatic track(int c, int t, int src);  wcfg(CFG_ROUTE, 0, t, c, src); endtask
  task automatic sink(int c, int s, int t);     wcfg(CFG_ROUTE, 0, N_TRACK + s, c, t); endtask
  task automatic lsel(int c, int clb, int k, int pin, int sel); wcfg(CFG_LOCAL, clb, k*8 + pin, c, sel); endtask

  function automatic logic [1:0] lut2(logic [3:0] row, logic [7:0] in);
    return {row[2 + in[7]], row[in[6]]};
  endfunction

  initial begin
    logic [1:0] a, held_b;
    logic [7:0] x, exp;
    logic [2:0] cur;
    bit have_held;
    int refresh_seen, ucyc;
    cfg = '0; sw_valid = 0; sw_ctx = 0; dev_in = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // Park the device in an unused context while contexts 0 and 1 are loaded.
    sw_valid = 1; sw_ctx = 3'd7; @(posedge clk); #1; sw_valid = 0;
    while (ctx != 3'd7) begin @(posedge clk); #1; end

    // ---------------- context 0 ----------------
    for (int r = 0; r < 64; r++) begin
      ta[r] = 4'($urandom); tb_[r] = 4'($urandom); tc[r] = 4'($urandom);
      wcfg(CFG_LUT_ROW, 0, r, 0, ta[r]);     // CLB0.BLE0 = unit 0
      wcfg(CFG_LUT_ROW, 4, r, 0, tb_[r]);    // CLB1.BLE0 = unit 4
      wcfg(CFG_LUT_ROW, 1, r, 0, tc[r]);     // CLB0.BLE1 = unit 1
    end
    wcfg(CFG_BLE, 0, 0, 0, {1'b0, 4'b1111, 4'd0});
    wcfg(CFG_BLE, 4, 0, 0, {1'b0, 4'b0000, 4'd1});
    wcfg(CFG_BLE, 1, 0, 0, {1'b1, 4'b1111, 4'd0});
    wcfg(CFG_GLOBAL, 0, 0, 0, 2);
    for (int i = 0; i < 8; i++) track(0, i, i);                       // dev_in
    track(0, 8, 8 + 0);  track(0, 9, 8 + 1);                           // CLB0.BLE0
    track(0, 10, 8 + 16); track(0, 11, 8 + 17);                        // CLB1.BLE0
    for (int b = 0; b < 4; b++) track(0, 12 + b, 8 + 4 + b);           // CLB0.BLE1
    for (int i = 0; i < 8; i++) sink(0, S_CLB + i, i);                 // CLB0 in[7:0]
    sink(0, S_CLB + 16 + 0, 8); sink(0, S_CLB + 16 + 1, 9);
    for (int i = 0; i < 6; i++) sink(0, S_CLB + 16 + 2 + i, i);        // CLB1 in[7:2]
    sink(0, 0, 10); sink(0, 1, 11);
    for (int b = 0; b < 4; b++) sink(0, 2 + b, 12 + b);
    sink(0, 6, 8); sink(0, 7, 9);
    for (int p = 0; p < 8; p++) lsel(0, 0, 0, p, p);                   // CLB0.BLE0 <- in[7:0]
    for (int p = 0; p < 8; p++) lsel(0, 0, 1, p, (p < 6) ? p : 0);     // CLB0.BLE1 <- in[5:0]
    // CLB1.BLE0 row = {dev_in[3:0], a1, a0}, cols = dev_in[5:4]
    for (int p = 0; p < 8; p++) lsel(0, 1, 0, p, p);

    // ---------------- context 1 ----------------
    wcfg(CFG_DSP, 0, 0, 1, 0);
    wcfg(CFG_BRAM, 0, 0, 1, {1'b1, 3'(BW_9), 4'd1});
    wcfg(CFG_GLOBAL, 0, 0, 1, 2);
    wcfg(CFG_GLOBAL, 0, 1, 0, 8'b0000_0011);                          // used contexts
    for (int i = 0; i < 7; i++) track(1, i, i);
    track(1, 7, 255);                                                  // constant 0
    for (int j = 0; j < 6; j++) track(1, 8 + j, N_SRC_DSP + j);
    for (int j = 0; j < 6; j++) track(1, 14 + j, N_SRC_BRAM + j);
    for (int j = 0; j < 25; j++) sink(1, S_DSPA + j, (j < 3) ? j : 7);
    for (int j = 0; j < 18; j++) sink(1, S_DSPB + j, (j < 3) ? 3 + j : 7);
    for (int j = 0; j < 15; j++) sink(1, S_BA + j, (j < 3) ? j : 7);
    for (int j = 0; j < 36; j++) sink(1, S_BD + j, (j < 6) ? 8 + j : 7);
    sink(1, S_BWE, 6);
    for (int j = 0; j < 6; j++) sink(1, j, 14 + j);
    sink(1, 6, 8); sink(1, 7, 9);

    // ---------------- run ----------------
    sw_valid = 1; sw_ctx = 3'd0; @(posedge clk); #1; sw_valid = 0;
    while (ctx != 3'd0) begin @(posedge clk); #1; end
    have_held = 0; held_b = 0; refresh_seen = 0;
    for (int i = 0; i < 8; i++) mem1_ok[i] = 0;
    ucyc = 0;
    // align to a user-cycle boundary
    while (!ucyc_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    while (ucyc < N_UCYC) begin
      cur = ctx;
      x = 8'($urandom);
      dev_in = x;
      if (ucyc % 25 == 24) begin sw_valid = 1; sw_ctx = ~ctx & 3'b001; end
      // wait for the end of this user cycle, watching for refresh
      while (!ucyc_end) begin
        @(posedge clk); #1;
        sw_valid = 0;
        if (busy && !refresh_seen) begin refresh_seen = 1; n_refresh++; end
        if (!busy) refresh_seen = 0;
      end
      check(ctx == cur, "context stable within a user cycle");
      if (cur == 0) begin
        a = lut2(ta[x[5:0]], x);
        exp[7:6] = a;
        exp[5:2] = tc[x[5:0]];
        exp[1:0] = held_b;
        if (have_held) begin
          check(dev_out[1:0] == exp[1:0], $sformatf("ctx0 registered output %b exp %b ucyc %0d sw %0d ref %0d", dev_out[1:0], exp[1:0], ucyc, n_switch, n_refresh));
          n_reg++;
        end
        check(dev_out[7:6] == exp[7:6], "ctx0 phase-0 bypassed output");
        check(dev_out[5:2] == exp[5:2], "ctx0 fractured LUT output");
        n_bypass++; n_frac++;
        begin
          logic [7:0] i1;
          i1 = {x[5:0], a};
          held_b = lut2(tb_[i1[5:0]], i1);
          n_chain++;
        end
        have_held = 1;
      end else begin
        logic [5:0] p;
        p = 6'(x[2:0]) * 6'(x[5:3]);
        check(dev_out[7:6] == p[1:0], "ctx1 DSP product");
        n_dsp++;
        if (mem1_ok[x[2:0]]) begin
          check(dev_out[5:0] == mem1[x[2:0]], $sformatf("ctx1 BRAM read %h exp %h", dev_out[5:0], mem1[x[2:0]]));
          n_part++;
        end
        if (x[6]) begin mem1[x[2:0]] = p; mem1_ok[x[2:0]] = 1; n_bram_wr++; end
      end
      @(posedge clk); #1;
      if (ctx != cur) n_switch++;
      ucyc++;
    end
    check(!restore_err, "no LUT row destroyed");
    check(n_switch >= 2, $sformatf("context switches: %0d", n_switch));
    if (!FULL) check(n_refresh >= 1, $sformatf("refresh pauses: %0d", n_refresh));
    check(n_chain > 0 && n_reg > 0 && n_bypass > 0 && n_frac > 0, "logic mechanisms exercised");
    check(n_dsp > 0 && n_bram_wr > 0 && n_part > 0, "DSP and BRAM exercised");
    $display("mechanisms: switches=%0d refreshes=%0d chained=%0d registered=%0d bypassed=%0d fractured=%0d dsp=%0d bram_writes=%0d bram_part_reads=%0d",
             n_switch, n_refresh, n_chain, n_reg, n_bypass, n_frac, n_dsp, n_bram_wr, n_part);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
