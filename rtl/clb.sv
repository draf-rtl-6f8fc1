// clb: DRAF configurable logic block.
//
// N_BLE basic logic elements share a local interconnect: every LUT input pin
// of every BLE has its own multi-context multiplexer (ctx_route_mux) that
// picks one of the CLB_IN block inputs or one of the BLE outputs. The CLB
// also holds the refresh row address counter that all its BLEs share; it
// advances by one on every ref_step from the refresh controller.
//
// Configuration: BLE k of this CLB answers to unit UNIT0+k for CFG_BLE and
// CFG_LUT_ROW writes; the local multiplexers answer to CFG_LOCAL writes with
// unit = CLB_UNIT and idx = k*LUT_IN + pin, data = select, where selects
// 0..CLB_IN-1 are the block inputs and CLB_IN + k*SA_W + b is bit b of BLE k.
// The BLE count, pin count and full local crossbar are this design's choice.
// Lint note: rst_n is reported as both an asynchronous reset and a
// synchronous signal. This comes from the disable iff of the dram_mat timing
// assertions, which are not part of the circuit, so the warning stands.
module clb
  import draf_pkg::*;
#(
  parameter int unsigned N_BLE    = 4,
  parameter int unsigned CLB_IN   = 16,
  parameter int unsigned N_CTX    = 8,
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 1,
  parameter int unsigned N_OUT    = 2,
  parameter int unsigned PH_BITS  = 4,
  parameter int unsigned T_PRE    = 2,
  parameter int unsigned T_ACT    = 2,
  parameter int unsigned T_RST    = 2,
  parameter int unsigned DELTA    = 3,
  parameter int unsigned CLB_UNIT = 0,
  parameter int unsigned UNIT0    = 0,
  localparam int unsigned SA_W    = N_OUT << COL_BITS,
  localparam int unsigned LUT_IN  = ROW_BITS + N_OUT*COL_BITS,
  localparam int unsigned CTX_W   = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned CIP_W   = $clog2(DELTA + T_ACT),
  localparam int unsigned N_LSRC  = CLB_IN + N_BLE*SA_W,
  localparam int unsigned LSEL_W  = $clog2(N_LSRC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CLB_IN-1:0]      clb_in,
  input  logic [CTX_W-1:0]       ctx,
  input  logic [N_CTX-1:0]       ctx_en,
  input  logic                   run,
  input  logic [PH_BITS-1:0]     cur_phase,
  input  logic [CIP_W-1:0]       cip,
  input  logic                   ucyc_end,
  input  logic                   ref_mode,
  input  dram_cmd_e              ref_cmd,
  input  logic                   ref_step,
  input  cfg_wr_t                cfg,
  output logic [N_BLE*SA_W-1:0]  clb_out,
  output logic                   restore_err
);
  logic [N_LSRC-1:0]   lsrc;
  logic [ROW_BITS-1:0] ref_row;
  logic [N_BLE-1:0]    err;

  assign lsrc = {clb_out, clb_in};

  // Shared refresh row address counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ref_row <= '0;
    else if (ref_step) ref_row <= ref_row + 1'b1;
  end

  wire cfg_hit_local = cfg.we && cfg.kind == CFG_LOCAL && cfg.unit == CFG_UNIT_W'(CLB_UNIT);

  for (genvar k = 0; k < N_BLE; k++) begin : g_ble
    logic [LUT_IN-1:0] pins;

    for (genvar p = 0; p < LUT_IN; p++) begin : g_pin
      ctx_route_mux #(.N_SRC(N_LSRC), .N_CTX(N_CTX)) u_lmux (
        .clk, .rst_n,
        .src     (lsrc),
        .ctx,
        .cfg_we  (cfg_hit_local && cfg.idx == CFG_IDX_W'(k*LUT_IN + p)),
        .cfg_ctx (CTX_W'(cfg.ctx)),
        .cfg_sel (LSEL_W'(cfg.data)),
        .dout    (pins[p])
      );
    end

    ble #(.N_CTX(N_CTX), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .N_OUT(N_OUT),
          .PH_BITS(PH_BITS), .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA),
          .UNIT(UNIT0 + k)) u_ble (
      .clk, .rst_n,
      .lut_in (pins),
      .ctx, .ctx_en, .run, .cur_phase, .cip, .ucyc_end,
      .ref_mode, .ref_cmd, .ref_row, .cfg,
      .dout        (clb_out[k*SA_W +: SA_W]),
      .restore_err (err[k])
    );
  end

  assign restore_err = |err;

endmodule
