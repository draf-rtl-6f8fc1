// ctx_route_mux: one multi-context routing switch of the DRAF interconnect.
//
// A static FPGA routing multiplexer is controlled by select bits held in
// SRAM cells. DRAF keeps one copy of those bits per context, so the routing
// is time-multiplexed between contexts at no runtime cost: the current
// context (ctx) picks which stored select word drives the multiplexer.
// The select words are written one context at a time (cfg_we, cfg_ctx,
// cfg_sel) and reset to 0, i.e. source 0. Selecting a source index at or
// above N_SRC drives 0. Combinational from src and ctx to dout.
module ctx_route_mux #(
  parameter int unsigned N_SRC  = 8,
  parameter int unsigned N_CTX  = 8,
  localparam int unsigned SEL_W = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  localparam int unsigned CTX_W = (N_CTX > 1) ? $clog2(N_CTX) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] src,
  input  logic [CTX_W-1:0] ctx,
  input  logic             cfg_we,
  input  logic [CTX_W-1:0] cfg_ctx,
  input  logic [SEL_W-1:0] cfg_sel,
  output logic             dout
);
  logic [SEL_W-1:0] sel_q [N_CTX];
  logic [SEL_W-1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CTX; c++) sel_q[c] <= '0;
    end else if (cfg_we) begin
      sel_q[cfg_ctx] <= cfg_sel;
    end
  end

  assign sel  = sel_q[ctx];
  assign dout = (32'(sel) < N_SRC) ? src[sel] : 1'b0;

endmodule
