// draf_top: a small DRAF array - DRAM-based reconfigurable logic with
// multiple configuration contexts.
//
// The array holds N_CLB configurable logic blocks (each N_BLE DRAM-LUT BLEs),
// one 25 x 18 DSP block and one 36 Kbit BRAM block, joined by the
// multi-context routing fabric. Global logic: the context counter (which
// accelerator is live), the user-cycle/phase timing generator and the
// refresh controller. Everything configurable - LUT truth tables, per-LUT
// phase and mode bits, routing selects, phases per user cycle - is stored
// once per context and written through the cfg bus (draf_pkg::cfg_wr_t).
//
// Routing source numbering (CFG_ROUTE data for a track):
//   0 .. N_IN-1                 device inputs dev_in
//   then N_CLB*N_BLE*SA_W       BLE outputs, CLB-major, 4 bits per BLE
//   then A_W+B_W                DSP product bits
//   then 36                     BRAM read data bits
// Sink numbering (CFG_ROUTE idx = N_TRACK + sink):
//   0 .. N_OUTP-1 dev_out; then N_CLB*CLB_IN CLB inputs; then DSP a (25),
//   DSP b (18); then BRAM addr (15), din (36), we (1).
// Units: BLE u = clb*N_BLE + k; CLB c; DSP 0; BRAM 0.
//
// Operation: the host drives dev_in and samples dev_out at ucyc_end (the last
// internal cycle of a user cycle). A context switch (sw_valid, sw_ctx) takes
// effect at the next user-cycle boundary. While busy is 1 the device is
// refreshing and no user cycle ends; the host waits, as it would for a
// stalled pipeline. restore_err reports any LUT row destroyed by a timing
// violation. The block mix follows the DRAF array of CLB, DSP and BRAM
// columns; the sizes and the single routing channel are this design's
// choices, scaled for simulation.
// Lint note: rst_n is reported as both an asynchronous reset and a
// synchronous signal. This comes from the disable iff of the dram_mat timing
// assertions, which are not part of the circuit, so the warning stands.
module draf_top
  import draf_pkg::*;
#(
  parameter int unsigned N_CLB        = 4,
  parameter int unsigned N_BLE        = 4,
  parameter int unsigned CLB_IN       = 16,
  parameter int unsigned N_CTX        = 8,
  parameter int unsigned ROW_BITS     = 6,
  parameter int unsigned COL_BITS     = 1,
  parameter int unsigned N_OUT        = 2,
  parameter int unsigned PH_BITS      = 4,
  parameter int unsigned T_PRE        = 2,
  parameter int unsigned T_ACT        = 2,
  parameter int unsigned T_RST        = 2,
  parameter int unsigned DELTA        = 3,
  parameter int unsigned N_TRACK      = 32,
  parameter int unsigned N_IN         = 8,
  parameter int unsigned N_OUTP       = 8,
  parameter int unsigned REF_ROWS     = 256,
  parameter int unsigned REF_INTERVAL = 64000000,
  parameter int unsigned BRAM_DEPTH36 = 1024,
  localparam int unsigned CTX_W       = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned SA_W        = N_OUT << COL_BITS,
  localparam int unsigned A_W         = 25,
  localparam int unsigned B_W         = 18,
  localparam int unsigned BA_W        = $clog2(BRAM_DEPTH36) + 5,
  localparam int unsigned CIP_W       = $clog2(DELTA + T_ACT),
  localparam int unsigned N_CLBOUT    = N_CLB*N_BLE*SA_W,
  localparam int unsigned N_SRC       = N_IN + N_CLBOUT + A_W + B_W + 36,
  localparam int unsigned N_SINK      = N_OUTP + N_CLB*CLB_IN + A_W + B_W + BA_W + 36 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic              sw_valid,
  input  logic [CTX_W-1:0]  sw_ctx,
  input  logic [N_IN-1:0]   dev_in,
  output logic [N_OUTP-1:0] dev_out,
  output logic [CTX_W-1:0]  ctx,
  output logic              ucyc_end,
  output logic              busy,
  output logic              restore_err
);
  // Timing and control.
  logic [N_CTX-1:0]   ctx_en, used_mask_unused;
  logic [PH_BITS-1:0] cur_phase;
  logic [CIP_W-1:0]   cip;
  logic               run, paused, pause_req;
  logic               ref_mode, ref_step;
  dram_cmd_e          ref_cmd;

  context_counter #(.N_CTX(N_CTX)) u_ctx (
    .clk, .rst_n, .sw_valid, .sw_ctx, .ucyc_end, .ref_mode, .cfg,
    .ctx, .ctx_en, .used_mask (used_mask_unused)
  );

  user_clock_gen #(.N_CTX(N_CTX), .PH_BITS(PH_BITS), .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA)) u_clk (
    .clk, .rst_n, .ctx, .pause_req, .cfg,
    .cur_phase, .cip, .ucyc_end, .run, .paused
  );

  refresh_ctrl #(.REF_ROWS(REF_ROWS), .REF_INTERVAL(REF_INTERVAL),
                 .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST)) u_ref (
    .clk, .rst_n, .paused, .pause_req, .ref_mode, .ref_cmd, .ref_step, .busy
  );

  // Fabric signals.
  logic [N_SRC-1:0]          src;
  logic [N_SINK-1:0]         sink;
  logic [N_CLBOUT-1:0]       clb_out;
  logic [N_CLB-1:0]          clb_err;
  logic signed [A_W+B_W-1:0] dsp_p;
  logic [35:0]               bram_dout;

  assign src = {bram_dout, dsp_p, clb_out, dev_in};

  localparam int unsigned S_CLB  = N_OUTP;
  localparam int unsigned S_DSPA = S_CLB + N_CLB*CLB_IN;
  localparam int unsigned S_DSPB = S_DSPA + A_W;
  localparam int unsigned S_BA   = S_DSPB + B_W;
  localparam int unsigned S_BD   = S_BA + BA_W;
  localparam int unsigned S_BWE  = S_BD + 36;

  assign dev_out = sink[N_OUTP-1:0];

  routing_fabric #(.N_SRC(N_SRC), .N_SINK(N_SINK), .N_TRACK(N_TRACK), .N_CTX(N_CTX)) u_route (
    .clk, .rst_n, .src, .ctx, .cfg, .sink
  );

  for (genvar c = 0; c < N_CLB; c++) begin : g_clb
    clb #(.N_BLE(N_BLE), .CLB_IN(CLB_IN), .N_CTX(N_CTX), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS),
          .N_OUT(N_OUT), .PH_BITS(PH_BITS), .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST),
          .DELTA(DELTA), .CLB_UNIT(c), .UNIT0(c*N_BLE)) u_clb (
      .clk, .rst_n,
      .clb_in  (sink[S_CLB + c*CLB_IN +: CLB_IN]),
      .ctx, .ctx_en, .run, .cur_phase, .cip, .ucyc_end,
      .ref_mode, .ref_cmd, .ref_step, .cfg,
      .clb_out (clb_out[c*N_BLE*SA_W +: N_BLE*SA_W]),
      .restore_err (clb_err[c])
    );
  end

  dsp_block #(.A_W(A_W), .B_W(B_W), .N_CTX(N_CTX), .PH_BITS(PH_BITS), .T_PRE(T_PRE),
              .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA), .UNIT(0)) u_dsp (
    .clk, .rst_n,
    .a (sink[S_DSPA +: A_W]),
    .b (sink[S_DSPB +: B_W]),
    .ctx, .run, .cur_phase, .cip, .cfg,
    .p (dsp_p)
  );

  bram_block #(.DEPTH36(BRAM_DEPTH36), .N_CTX(N_CTX), .PH_BITS(PH_BITS), .T_PRE(T_PRE),
               .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA), .UNIT(0)) u_bram (
    .clk, .rst_n,
    .addr (sink[S_BA +: BA_W]),
    .din  (sink[S_BD +: 36]),
    .we   (sink[S_BWE]),
    .ctx, .run, .cur_phase, .cip, .cfg,
    .dout (bram_dout)
  );

  assign restore_err = |clb_err;

endmodule
