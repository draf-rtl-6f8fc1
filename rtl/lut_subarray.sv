// lut_subarray: the DRAM subarray that implements one multi-context DRAF LUT.
//
// The LUT inputs are split into a row address (ROW_BITS) and one column
// address of COL_BITS per output. A single row decoder, shared by all
// contexts, selects the master wordline (passed on as the latched row
// number); N_CTX MATs
// (one per context) sit on those wordlines, and ctx_en selects which of them
// really activates. Amortising the row decoder over the contexts is what makes
// extra contexts cheap.
//
// Both addresses are latched on the first ACT cycle and held until the next
// ACT, so the master wordline stays on the same row through RST and PRE, and
// the column address used by the column logic stays valid for the rest of
// the user cycle even if the inputs change. During refresh (ref_mode) the row
// comes from ref_row and the column latch is left alone.
//
// Timing: commands take effect at the clock edge; sa is valid from the cycle
// after the first ACT cycle until the next PRE. Defaults are the evaluated
// 7-input, 2-output, 8-context LUT: 8 MATs x 64 rows x 4 cells = 2048 bits.
// Lint note: rst_n is reported as both an asynchronous reset and a
// synchronous signal. This comes from the disable iff of the dram_mat timing
// assertions, which are not part of the circuit, so the warning stands.
module lut_subarray
  import draf_pkg::*;
#(
  parameter int unsigned N_CTX    = 8,
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned COL_BITS = 1,
  parameter int unsigned N_OUT    = 2,
  parameter int unsigned T_RST    = 2,
  localparam int unsigned SA_W    = N_OUT << COL_BITS,
  localparam int unsigned LUT_IN  = ROW_BITS + N_OUT*COL_BITS,
  localparam int unsigned CTX_W   = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned COLA_W  = (N_OUT*COL_BITS > 0) ? N_OUT*COL_BITS : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LUT_IN-1:0]   lut_in,
  input  logic [N_CTX-1:0]    ctx_en,
  input  dram_cmd_e           cmd,
  input  logic                ref_mode,
  input  logic [ROW_BITS-1:0] ref_row,
  input  logic                cfg_we,
  input  logic [CTX_W-1:0]    cfg_ctx,
  input  logic [ROW_BITS-1:0] cfg_row,
  input  logic [SA_W-1:0]     cfg_data,
  output logic [SA_W-1:0]     sa [N_CTX],
  output logic [COLA_W-1:0]   col_q,
  output logic                restore_err
);
  logic [ROW_BITS-1:0] row_q, row_now;
  logic                act_q;
  logic                act_first;
  logic [N_CTX-1:0]    err;
  logic [N_CTX-1:0]    sa_valid_unused;

  assign act_first = (cmd == CMD_ACT) && !act_q;
  assign row_now   = act_first ? (ref_mode ? ref_row : lut_in[ROW_BITS-1:0]) : row_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q <= '0;
      col_q <= '0;
      act_q <= 1'b0;
    end else begin
      act_q <= (cmd == CMD_ACT);
      if (act_first) begin
        row_q <= row_now;
        if (!ref_mode && N_OUT*COL_BITS > 0)
          col_q <= COLA_W'(lut_in >> ROW_BITS);
      end
    end
  end

  for (genvar c = 0; c < N_CTX; c++) begin : g_mat
    dram_mat #(.ROW_BITS(ROW_BITS), .SA_W(SA_W), .T_RST(T_RST)) u_mat (
      .clk, .rst_n,
      .row         (row_now),
      .ctx_en      (ctx_en[c]),
      .cmd,
      .cfg_we      (cfg_we && cfg_ctx == CTX_W'(c)),
      .cfg_row,
      .cfg_data,
      .sa          (sa[c]),
      .sa_valid    (sa_valid_unused[c]),
      .restore_err (err[c])
    );
  end

  assign restore_err = |err;

endmodule
