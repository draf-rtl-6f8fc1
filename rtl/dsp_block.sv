// dsp_block: DRAF arithmetic block with a dedicated 25 x 18 multiplier.
//
// The block samples its two's-complement operands a and b at its configured
// phase (the same instant at which a LUT of that phase activates, see
// lut_sequencer) and holds the A_W+B_W bit product in a register for the rest
// of the user cycle, so blocks of later phases can use it. The phase is
// stored per context (CFG_DSP writes, unit = UNIT, data = phase); the
// multiplier itself is shared by all contexts. The 25 x 18 size follows the
// DRAF description; the phase-based sampling and the signed operands are this
// design's choices. Timing: p changes one internal cycle after the
// evaluation cycle.
module dsp_block
  import draf_pkg::*;
#(
  parameter int unsigned A_W     = 25,
  parameter int unsigned B_W     = 18,
  parameter int unsigned N_CTX   = 8,
  parameter int unsigned PH_BITS = 4,
  parameter int unsigned T_PRE   = 2,
  parameter int unsigned T_ACT   = 2,
  parameter int unsigned T_RST   = 2,
  parameter int unsigned DELTA   = 3,
  parameter int unsigned UNIT    = 0,
  localparam int unsigned CTX_W  = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned CIP_W  = $clog2(DELTA + T_ACT)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [A_W-1:0]  a,
  input  logic signed [B_W-1:0]  b,
  input  logic [CTX_W-1:0]       ctx,
  input  logic                   run,
  input  logic [PH_BITS-1:0]     cur_phase,
  input  logic [CIP_W-1:0]       cip,
  input  cfg_wr_t                cfg,
  output logic signed [A_W+B_W-1:0] p
);
  logic [PH_BITS-1:0] phase_q [N_CTX];
  logic               eval;
  dram_cmd_e          cmd_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CTX; c++) phase_q[c] <= '0;
    end else if (cfg.we && cfg.kind == CFG_DSP && cfg.unit == CFG_UNIT_W'(UNIT)) begin
      phase_q[CTX_W'(cfg.ctx)] <= PH_BITS'(cfg.data);
    end
  end

  lut_sequencer #(.PH_BITS(PH_BITS), .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA)) u_seq (
    .run, .cur_phase, .cip,
    .my_phase (phase_q[ctx]),
    .cmd      (cmd_unused),
    .eval
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    p <= '0;
    else if (eval) p <= a * b;
  end

endmodule
