// user_clock_gen: phase and user-cycle timing of a DRAF device.
//
// The DRAM peripheral logic runs on the internal clock; the design mapped on
// DRAF runs on a user cycle that is a whole number of internal cycles. The
// user cycle is divided into phases, one per LUT on the critical path of the
// mapped design, so the number of phases (nph) is stored per context
// (CFG_GLOBAL, idx = 0, ctx, data = nph). A user cycle is
//   nph phases of PL = DELTA + T_ACT internal cycles, then
//   a tail "phase" number nph of T_RST cycles in which the LUTs of the last
//   phase finish restoring.
// Outputs: cur_phase and cip (cycle inside the phase), ucyc_end (1 in the
// last internal cycle of a user cycle), run (0 while paused).
// pause_req stops the timing at the next user-cycle boundary (paused = 1,
// run = 0) until pause_req drops; refresh uses it. The phase length formula
// follows the DRAF overlap of restore, precharge and routing; the tail and
// the cycle counts are this design's choices.
module user_clock_gen
  import draf_pkg::*;
#(
  parameter int unsigned N_CTX   = 8,
  parameter int unsigned PH_BITS = 4,
  parameter int unsigned T_ACT   = 2,
  parameter int unsigned T_RST   = 2,
  parameter int unsigned DELTA   = 3,
  localparam int unsigned PL     = DELTA + T_ACT,
  localparam int unsigned CIP_W  = $clog2(PL),
  localparam int unsigned CTX_W  = (N_CTX > 1) ? $clog2(N_CTX) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CTX_W-1:0]   ctx,
  input  logic               pause_req,
  input  cfg_wr_t            cfg,
  output logic [PH_BITS-1:0] cur_phase,
  output logic [CIP_W-1:0]   cip,
  output logic               ucyc_end,
  output logic               run,
  output logic               paused
);
  logic [PH_BITS-1:0] nph_q [N_CTX];
  logic [PH_BITS-1:0] nph;

  assign nph = nph_q[ctx];
  assign run = !paused;
  assign ucyc_end = run && (cur_phase >= nph) && (cip >= CIP_W'(T_RST - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CTX; c++) nph_q[c] <= PH_BITS'(1);
    end else if (cfg.we && cfg.kind == CFG_GLOBAL && cfg.idx == '0) begin
      nph_q[CTX_W'(cfg.ctx)] <= PH_BITS'(cfg.data);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_phase <= '0;
      cip       <= '0;
      paused    <= 1'b0;
    end else if (paused) begin
      if (!pause_req) paused <= 1'b0;
    end else if (ucyc_end) begin
      cur_phase <= '0;
      cip       <= '0;
      paused    <= pause_req;
    end else if (cur_phase < nph && cip == CIP_W'(PL - 1)) begin
      cur_phase <= cur_phase + 1'b1;
      cip       <= '0;
    end else begin
      cip <= cip + 1'b1;
    end
  end

  initial begin
    assert (T_RST <= PL) else $error("user_clock_gen: tail longer than a phase");
  end

endmodule
