// context_counter: the global context counter of a DRAF device.
//
// Switching between the accelerators stored in the contexts only means
// loading a new value into this register: every MAT, routing switch and
// per-context configuration register is indexed by it. A switch request
// (sw_valid, sw_ctx) is held until the end of the current user cycle
// (ucyc_end) and then applied, so the new context is in use from the next
// user cycle on. The decoder drives one context enable per context; during
// refresh (ref_mode) it drives the used-context mask instead, so every used
// context of every subarray is refreshed at once and unused ones are skipped.
// Configuration: CFG_GLOBAL, idx = 1, data = used-context mask (reset: all
// contexts used). Deferring the switch to the user-cycle boundary is this
// design's choice.
module context_counter
  import draf_pkg::*;
#(
  parameter int unsigned N_CTX  = 8,
  localparam int unsigned CTX_W = (N_CTX > 1) ? $clog2(N_CTX) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sw_valid,
  input  logic [CTX_W-1:0] sw_ctx,
  input  logic             ucyc_end,
  input  logic             ref_mode,
  input  cfg_wr_t          cfg,
  output logic [CTX_W-1:0] ctx,
  output logic [N_CTX-1:0] ctx_en,
  output logic [N_CTX-1:0] used_mask
);
  logic             pend;
  logic [CTX_W-1:0] pend_ctx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx       <= '0;
      pend      <= 1'b0;
      pend_ctx  <= '0;
      used_mask <= '1;
    end else begin
      if (cfg.we && cfg.kind == CFG_GLOBAL && cfg.idx == CFG_IDX_W'(1))
        used_mask <= N_CTX'(cfg.data);
      if (ucyc_end && (pend || sw_valid)) begin
        ctx  <= sw_valid ? sw_ctx : pend_ctx;
        pend <= 1'b0;
      end else if (sw_valid) begin
        pend     <= 1'b1;
        pend_ctx <= sw_ctx;
      end
    end
  end

  always_comb begin
    if (ref_mode) ctx_en = used_mask;
    else begin
      ctx_en      = '0;
      ctx_en[ctx] = 1'b1;
    end
  end

endmodule
