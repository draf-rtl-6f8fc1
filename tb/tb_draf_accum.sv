// tb_draf_accum: a running-sum kernel mapped onto the DRAF array.
//
// Streaming reductions (sum of products in matrix multiply, stencils,
// histogram-style counters) come down to an accumulator: acc <= acc + x.
// This test maps an 8-bit accumulator onto one CLB of the array as a
// four-LUT ripple-carry chain and streams random 8-bit values through
// dev_in. It checks the mapped logic against a plain integer model.
//
// Mapping (context 0, 4 phases per user cycle):
//   CLB0.BLE k, k = 0..3, fractured LUT, phase k. Its 6 row inputs are
//   {0, cin, x[2k+1], x[2k], acc[2k+1], acc[2k]}, and its outputs are
//   bit 0, 1 = sum bits 2k, 2k+1, registered in the BLE flip-flops, which
//   hold acc; and bit 2 = carry out, bypassed (read straight from the
//   sense-amps) and fed to BLE k+1 in the next phase.
//   acc[7:0] is routed to dev_out. clb_in[7:0] = dev_in, clb_in[8] = 0,
//   which is a track with no source.
// Phases: the carry of BLE k is sensed in phase k and consumed by the
// activation of BLE k+1 in phase k+1. This is the chained-LUT rule of the
// phase timing. The user cycle is 4 phases x (DELTA + T_ACT) + T_RST =
// 22 internal cycles at the default timing, which is checked. The refresh
// interval is shortened so that refreshes interrupt the accumulation; the
// running sum must survive them. Context 0 runs from reset before it is
// configured, so the accumulator's start value is read back in the first
// user cycle and tracked from there.
module tb_draf_accum;
  import draf_pkg::*;
  localparam int S_CLB = 8, N_TRACK = 32, N_UCYC = 300;
  localparam int UCYC_LEN = 4 * (3 + 2) + 2;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg;
  logic sw_valid;
  logic [2:0] sw_ctx, ctx;
  logic [7:0] dev_in, dev_out;
  logic ucyc_end, busy, restore_err;
  int checks = 0, failures = 0;

  draf_top #(.REF_INTERVAL(2500)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wcfg(cfg_kind_e k, int unit, int idx, int c, int data);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.unit = 8'(unit); cfg.idx = 12'(idx); cfg.ctx = 4'(c); cfg.data = 32'(data);
    @(posedge clk); #1; cfg = '0;
  endtask

  // cycle length of every user cycle that is not stretched by a refresh
  int cyc = 0, n_len = 0, n_refresh = 0;
  bit ref_in_cycle = 0, have_prev = 0;
  always @(posedge clk) begin
    if (rst_n && ctx == 3'd0) begin
      cyc <= cyc + 1;
      if (busy) ref_in_cycle <= 1;
      if (ucyc_end) begin
        if (!ref_in_cycle && !busy && have_prev) begin
          checks++;
          if (cyc + 1 != UCYC_LEN) begin failures++; $display("FAIL user cycle length %0d", cyc + 1); end
          n_len++;
        end
        cyc <= 0;
        ref_in_cycle <= 0;
        have_prev <= 1;
      end
    end else begin
      cyc <= 0;
      have_prev <= 0;
    end
  end

  initial begin
    logic [7:0] x, acc;
    logic [5:0] r;
    logic [2:0] s;
    bit seen;
    int ucyc;
    cfg = '0; sw_valid = 0; sw_ctx = 0; dev_in = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    sw_valid = 1; sw_ctx = 3'd7; @(posedge clk); #1; sw_valid = 0;
    while (ctx != 3'd7) begin @(posedge clk); #1; end

    // 2-bit adder slice: row {0, cin, x1, x0, a1, a0} -> {0, cout, s1, s0}
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 64; i++) begin
        r = 6'(i);
        s = 3'(r[1:0]) + 3'(r[3:2]) + 3'(r[4]);
        wcfg(CFG_LUT_ROW, k, i, 0, r[5] ? 0 : {1'b0, s});
      end
      wcfg(CFG_BLE, k, 0, 0, {1'b1, 4'b0100, 4'(k)});
      // local pins: 0,1 = own FF bits; 2,3 = x bits; 4 = carry; 5..7 = zero
      wcfg(CFG_LOCAL, 0, k*8 + 0, 0, 16 + k*4 + 0);
      wcfg(CFG_LOCAL, 0, k*8 + 1, 0, 16 + k*4 + 1);
      wcfg(CFG_LOCAL, 0, k*8 + 2, 0, 2*k);
      wcfg(CFG_LOCAL, 0, k*8 + 3, 0, 2*k + 1);
      wcfg(CFG_LOCAL, 0, k*8 + 4, 0, (k == 0) ? 8 : 16 + (k-1)*4 + 2);
      for (int p = 5; p < 8; p++) wcfg(CFG_LOCAL, 0, k*8 + p, 0, 8);
    end
    wcfg(CFG_GLOBAL, 0, 0, 0, 4);                                    // 4 phases
    wcfg(CFG_GLOBAL, 0, 1, 0, 8'b0000_0001);                         // only ctx 0 used
    for (int i = 0; i < 8; i++) begin
      wcfg(CFG_ROUTE, 0, i, 0, i);                                   // track i = dev_in[i]
      wcfg(CFG_ROUTE, 0, N_TRACK + S_CLB + i, 0, i);                 // clb_in[i]
      wcfg(CFG_ROUTE, 0, 8 + i, 0, 8 + (i/2)*4 + (i%2));             // track 8+i = acc[i]
      wcfg(CFG_ROUTE, 0, N_TRACK + i, 0, 8 + i);                     // dev_out[i]
    end
    wcfg(CFG_ROUTE, 0, 16, 0, 255);                                  // track 16 = 0
    wcfg(CFG_ROUTE, 0, N_TRACK + S_CLB + 8, 0, 16);                  // clb_in[8] = 0

    sw_valid = 1; sw_ctx = 3'd0; @(posedge clk); #1; sw_valid = 0;
    while (ctx != 3'd0) begin @(posedge clk); #1; end
    while (!ucyc_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    acc = 0; seen = 0;
    for (ucyc = 0; ucyc < N_UCYC; ucyc++) begin
      x = 8'($urandom);
      dev_in = x;
      while (!ucyc_end) begin
        @(posedge clk); #1;
        if (busy && !seen) begin seen = 1; n_refresh++; end
        if (!busy) seen = 0;
      end
      // Context 0 ran from reset, before it was configured, so its
      // flip-flops hold an arbitrary start value: take it from cycle 0.
      if (ucyc == 0) acc = dev_out;
      check(dev_out == acc, $sformatf("accumulator %0d exp %0d (cycle %0d)", dev_out, acc, ucyc));
      acc = acc + x;
      @(posedge clk); #1;
    end
    check(!restore_err, "no LUT row destroyed");
    check(n_refresh >= 1, $sformatf("refresh pauses during the run: %0d", n_refresh));
    check(n_len > 0, "user cycle length measured");
    $display("mechanisms: user_cycles=%0d refreshes=%0d timed_cycles=%0d", N_UCYC, n_refresh, n_len);
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
