// dram_mat: one MAT of a DRAF LUT subarray, i.e. the DRAM storage of one
// configuration context of one LUT.
//
// The MAT holds 2**ROW_BITS rows of SA_W cells and one row of SA_W sense
// amplifiers. The shared row decoder raises one master wordline; here it is
// passed as its row number (row). The local wordline driver of this MAT ANDs
// the master wordline with ctx_en, so only the MAT of the selected context
// is activated, restored or precharged: with ctx_en low the MAT ignores every
// command. That AND gate is the DRAF multi-context mechanism.
//
// Commands (one per internal clock, see draf_pkg::dram_cmd_e):
//   ACT  first cycle copies the selected row into the sense-amps; the cells
//        of that row are now "destroyed" (a DRAM read is destructive).
//   RST  writes the sense-amps back into the row; after T_RST consecutive
//        RST cycles the row is safe again.
//   PRE  clears the sense-amps (bitlines to Vref). If the open row has not
//        been fully restored its data is lost: the row is cleared, the sticky
//        restore_err output is set and an assertion fires.
// sa stays valid from the end of ACT until the next PRE, which is what lets
// LUT outputs stay stable for the rest of a user cycle.
//
// Charge sharing and sensing are reduced to a register copy; the loss of a
// row on an early precharge is this model's way of making the destructive
// read visible. Configuration rows are written through cfg_we/cfg_row/
// cfg_data, a port of this design's own (the loading path is not specified).
// Lint note: rst_n is reported as both an asynchronous reset and a
// synchronous signal. The synchronous use is only the disable iff of the
// timing assertions below, which are not part of the circuit, so the
// warning stands.
module dram_mat
  import draf_pkg::*;
#(
  parameter int unsigned ROW_BITS = 6,
  parameter int unsigned SA_W     = 4,
  parameter int unsigned T_RST    = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [ROW_BITS-1:0]   row,
  input  logic                  ctx_en,
  input  dram_cmd_e             cmd,
  input  logic                  cfg_we,
  input  logic [ROW_BITS-1:0]   cfg_row,
  input  logic [SA_W-1:0]       cfg_data,
  output logic [SA_W-1:0]       sa,
  output logic                  sa_valid,
  output logic                  restore_err
);
  localparam int unsigned NROW = 2**ROW_BITS;

  typedef enum logic [1:0] {MS_PRECH, MS_ACT, MS_RST, MS_OPEN} mat_state_e;

  logic [SA_W-1:0] cells [NROW];
  logic            lwl;            // local wordline driver enable
  mat_state_e      state;
  logic            destroyed;
  logic [$clog2(T_RST+1)-1:0] rst_cnt;

  // Local wordline drivers: master wordline AND context enable.
  assign lwl = ctx_en;

  assign sa_valid = (state == MS_RST) || (state == MS_OPEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= MS_PRECH;
      sa          <= '0;
      destroyed   <= 1'b0;
      rst_cnt     <= '0;
      restore_err <= 1'b0;
    end else if (lwl) begin
      unique case (cmd)
        CMD_ACT: begin
          if (state != MS_ACT) begin
            sa        <= cells[row];
            destroyed <= 1'b1;
            rst_cnt   <= '0;
          end
          state <= MS_ACT;
        end
        CMD_RST: begin
          if (state == MS_ACT || state == MS_RST) begin
            state   <= MS_RST;
            rst_cnt <= rst_cnt + 1'b1;
            if (32'(rst_cnt) + 1 >= T_RST) begin
              destroyed <= 1'b0;
              state     <= MS_OPEN;
            end
          end
        end
        CMD_PRE: begin
          if (destroyed) restore_err <= 1'b1;
          destroyed <= 1'b0;
          state     <= MS_PRECH;
          sa        <= '0;
          rst_cnt   <= '0;
        end
        default: ;
      endcase
    end
  end

  // Cell array: configuration writes, restore write-back, loss on early PRE.
  always_ff @(posedge clk) begin
    if (cfg_we)
      cells[cfg_row] <= cfg_data;
    else if (lwl && cmd == CMD_RST && (state == MS_ACT || state == MS_RST))
      cells[row] <= sa;
    else if (lwl && cmd == CMD_PRE && destroyed)
      cells[row] <= '0;
  end

  // Timing rules of the subarray.
  a_pre_after_restore: assert property (@(posedge clk) disable iff (!rst_n)
      !(ctx_en && cmd == CMD_PRE && destroyed))
    else $warning("dram_mat: precharge before restore completed, row lost");
  a_act_after_pre: assert property (@(posedge clk) disable iff (!rst_n)
      !(ctx_en && cmd == CMD_ACT && state inside {MS_RST, MS_OPEN}))
    else $error("dram_mat: activate without precharge");
  a_rst_after_act: assert property (@(posedge clk) disable iff (!rst_n)
      !(ctx_en && cmd == CMD_RST && state == MS_PRECH))
    else $error("dram_mat: restore of a precharged subarray");

endmodule
