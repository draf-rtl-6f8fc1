// routing_fabric: the static, multi-context global interconnect of a DRAF
// array.
//
// N_SRC source signals (block outputs and device inputs) reach N_SINK sink
// signals (block inputs and device outputs) over N_TRACK routing tracks.
// Each track is driven by a switch multiplexer that can pick any source, and
// each sink by a connection-box multiplexer that can pick any track. Every
// multiplexer keeps one select word per context (ctx_route_mux), so a
// context switch re-routes the whole fabric at once; nothing is decided at
// runtime. Configuration: CFG_ROUTE writes with idx < N_TRACK set track idx
// (data = source number), idx = N_TRACK + s sets sink s (data = track
// number). The fabric is combinational; its delay is hidden in the phase
// timing of the LUTs (the DELTA window). A single channel in which every
// track reaches every block is this design's simplification of the 2-D
// island layout with segmented tracks.
module routing_fabric
  import draf_pkg::*;
#(
  parameter int unsigned N_SRC   = 32,
  parameter int unsigned N_SINK  = 32,
  parameter int unsigned N_TRACK = 32,
  parameter int unsigned N_CTX   = 8,
  localparam int unsigned CTX_W  = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned SSEL_W = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  localparam int unsigned TSEL_W = (N_TRACK > 1) ? $clog2(N_TRACK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_SRC-1:0]  src,
  input  logic [CTX_W-1:0]  ctx,
  input  cfg_wr_t           cfg,
  output logic [N_SINK-1:0] sink
);
  logic [N_TRACK-1:0] track;

  wire cfg_hit = cfg.we && cfg.kind == CFG_ROUTE;

  for (genvar t = 0; t < N_TRACK; t++) begin : g_track
    ctx_route_mux #(.N_SRC(N_SRC), .N_CTX(N_CTX)) u_sw (
      .clk, .rst_n, .src, .ctx,
      .cfg_we  (cfg_hit && cfg.idx == CFG_IDX_W'(t)),
      .cfg_ctx (CTX_W'(cfg.ctx)),
      .cfg_sel (SSEL_W'(cfg.data)),
      .dout    (track[t])
    );
  end

  for (genvar s = 0; s < N_SINK; s++) begin : g_sink
    ctx_route_mux #(.N_SRC(N_TRACK), .N_CTX(N_CTX)) u_cb (
      .clk, .rst_n,
      .src     (track),
      .ctx,
      .cfg_we  (cfg_hit && cfg.idx == CFG_IDX_W'(N_TRACK + s)),
      .cfg_ctx (CTX_W'(cfg.ctx)),
      .cfg_sel (TSEL_W'(cfg.data)),
      .dout    (sink[s])
    );
  end

endmodule
