// ble: DRAF basic logic element.
//
// A BLE is one multi-context DRAM LUT (lut_subarray), the column logic of
// each MAT, one set of output flip-flops per context, a per-output bypass
// multiplexer and the context output multiplexer, which sits after the FFs.
// Per context the BLE stores a configuration word {frac, bypass[SA_W-1:0],
// phase[PH_BITS-1:0]}:
//   phase   the phase of the user cycle in which this LUT activates
//   bypass  per output: 1 drives the output straight from the sense-amps
//           (the sense-amps act as a register until the next precharge),
//           0 drives it from the context's flip-flop
//   frac    fractured LUT: SA_W outputs of ROW_BITS inputs each
// The LUT timing logic (lut_sequencer) is shared by all contexts and runs the
// PRE-ACT-RST sequence for the current context's phase. During refresh
// (ref_mode) the refresh command and row replace it.
//
// Timing: the flip-flops of the current context load on ucyc_end, the last
// internal cycle of a user cycle; those of other contexts hold. A bypassed
// output is valid from the end of its ACT until the next PRE.
// The structure follows the DRAF BLE; the configuration encoding, FF load
// rule (no user enable) and bus decode are this design's choices.
// Lint note: rst_n is reported as both an asynchronous reset and a
// synchronous signal. This comes from the disable iff of the dram_mat timing
// assertions, which are not part of the circuit, so the warning stands.
module ble
  import draf_pkg::*;
#(
  parameter int unsigned N_CTX    = 8,
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 1,
  parameter int unsigned N_OUT    = 2,
  parameter int unsigned PH_BITS  = 4,
  parameter int unsigned T_PRE    = 2,
  parameter int unsigned T_ACT    = 2,
  parameter int unsigned T_RST    = 2,
  parameter int unsigned DELTA    = 3,
  parameter int unsigned UNIT     = 0,
  localparam int unsigned SA_W    = N_OUT << COL_BITS,
  localparam int unsigned LUT_IN  = ROW_BITS + N_OUT*COL_BITS,
  localparam int unsigned CTX_W   = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned CIP_W   = $clog2(DELTA + T_ACT),
  localparam int unsigned COLA_W  = (N_OUT*COL_BITS > 0) ? N_OUT*COL_BITS : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LUT_IN-1:0]   lut_in,
  input  logic [CTX_W-1:0]    ctx,
  input  logic [N_CTX-1:0]    ctx_en,
  input  logic                run,
  input  logic [PH_BITS-1:0]  cur_phase,
  input  logic [CIP_W-1:0]    cip,
  input  logic                ucyc_end,
  input  logic                ref_mode,
  input  dram_cmd_e           ref_cmd,
  input  logic [ROW_BITS-1:0] ref_row,
  input  cfg_wr_t             cfg,
  output logic [SA_W-1:0]     dout,
  output logic                restore_err
);
  typedef struct packed {
    logic               frac;
    logic [SA_W-1:0]    bypass;
    logic [PH_BITS-1:0] phase;
  } ble_cfg_t;

  ble_cfg_t          cfg_q [N_CTX];
  logic [SA_W-1:0]   sa    [N_CTX];
  logic [SA_W-1:0]   lo    [N_CTX];   // column logic outputs
  logic [SA_W-1:0]   ff    [N_CTX];
  logic [SA_W-1:0]   cout  [N_CTX];   // after bypass mux
  logic [COLA_W-1:0] col_q;
  dram_cmd_e         seq_cmd, sub_cmd;
  logic              seq_eval_unused;

  wire cfg_hit_ble = cfg.we && cfg.kind == CFG_BLE     && cfg.unit == CFG_UNIT_W'(UNIT);
  wire cfg_hit_row = cfg.we && cfg.kind == CFG_LUT_ROW && cfg.unit == CFG_UNIT_W'(UNIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CTX; c++) cfg_q[c] <= '0;
    end else if (cfg_hit_ble) begin
      cfg_q[CTX_W'(cfg.ctx)] <= ble_cfg_t'(cfg.data[$bits(ble_cfg_t)-1:0]);
    end
  end

  lut_sequencer #(.PH_BITS(PH_BITS), .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA)) u_seq (
    .run, .cur_phase, .cip,
    .my_phase (cfg_q[ctx].phase),
    .cmd      (seq_cmd),
    .eval     (seq_eval_unused)
  );

  assign sub_cmd = ref_mode ? ref_cmd : seq_cmd;

  lut_subarray #(.N_CTX(N_CTX), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .N_OUT(N_OUT), .T_RST(T_RST)) u_lut (
    .clk, .rst_n, .lut_in, .ctx_en,
    .cmd      (sub_cmd),
    .ref_mode, .ref_row,
    .cfg_we   (cfg_hit_row),
    .cfg_ctx  (CTX_W'(cfg.ctx)),
    .cfg_row  (ROW_BITS'(cfg.idx)),
    .cfg_data (SA_W'(cfg.data)),
    .sa, .col_q, .restore_err
  );

  for (genvar c = 0; c < N_CTX; c++) begin : g_ctx
    col_logic #(.COL_BITS(COL_BITS), .N_OUT(N_OUT)) u_col (
      .sa   (sa[c]),
      .col  (col_q),
      .frac (cfg_q[c].frac),
      .dout (lo[c])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                      ff[c] <= '0;
      else if (run && ucyc_end && ctx == CTX_W'(c))    ff[c] <= lo[c];
    end

    assign cout[c] = (cfg_q[c].bypass & lo[c]) | (~cfg_q[c].bypass & ff[c]);
  end

  // Context output multiplexer.
  assign dout = cout[ctx];

endmodule
